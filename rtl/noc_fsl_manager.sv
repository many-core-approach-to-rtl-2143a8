// noc_fsl_manager -- input side of one router port.
//
// Reads packets arriving on the port's incoming FSL link. The first word of
// a packet is the router header (see dct_noc_pkg): it is consumed here, its
// size is loaded into a down counter and its destination field becomes a
// request to the moderator of every output port it names (one for unicast,
// several for multicast/broadcast). Each following payload word is passed
// on only when every requested moderator has granted access and none of the
// requested output links is full; it is then removed from the input link.
// The request is held for the whole packet, so packets never interleave on
// an output.
//
// States: IDLE -> WAIT_HEADER -> READ_FSL (pop the header)
//         -> [WAIT_DATA -> WRITE_DATA -> READ_FSL] x size -> IDLE
// A payload word therefore takes at least three cycles. The state machine
// and header layout follow the document. `m_data` is the head of the input
// link, combinationally (no data register).
module noc_fsl_manager
  import dct_noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // Incoming FSL link of this port (slave side)
  output logic              s_read,
  input  word_t             s_data,
  input  logic              s_exists,
  // Towards the moderators
  output logic              m_write,
  output word_t             m_data,
  output logic [NPORTS-1:0] request,   // bit o: wants output port o
  input  logic [NPORTS-1:0] reply      // bit o: granted by moderator o and link o not full
);
  typedef enum logic [2:0] {IDLE, WAIT_HEADER, READ_FSL, WAIT_DATA, WRITE_DATA} state_t;

  state_t      state;
  logic [15:0] remaining;
  logic        has_permission;
  noc_header_t header;

  assign header         = noc_header_t'(s_data);
  assign has_permission = (reply == request);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      request   <= '0;
      remaining <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          request   <= '0;
          remaining <= '0;
          state     <= WAIT_HEADER;
        end
        WAIT_HEADER: if (s_exists) begin
          remaining <= header.size;
          request   <= dst_to_mask(header.dst_port);
          state     <= READ_FSL;
        end
        READ_FSL:   state <= (remaining == '0) ? IDLE : WAIT_DATA;
        WAIT_DATA:  if (s_exists) state <= WRITE_DATA;
        WRITE_DATA: if (has_permission) begin
          remaining <= remaining - 1'b1;
          state     <= READ_FSL;
        end
        default:    state <= IDLE;
      endcase
    end
  end

  assign s_read  = (state == READ_FSL) & s_exists;
  assign m_write = (state == WRITE_DATA) & has_permission;
  assign m_data  = s_data;
endmodule
