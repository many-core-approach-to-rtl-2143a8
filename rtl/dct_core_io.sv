// dct_core_io -- communication/control block of a DCT core.
//
// Input manager: accepts every word offered on the incoming FSL link (the
// core never stalls its input; the pipeline takes one pixel per cycle),
// registers it, and decodes it into one-cycle strobes for the coefficient
// block. Bits [31:28] are load_x, load_y, load_freq and clear; a word with
// none of them set is a pixel in [7:0] and raises coeff_enable. With a load
// bit set, [9:0] is parameter A and [19:10] parameter B.
//
// Output manager: when the coefficient block pulses coeff_ready, the value
// is latched and a two-word packet goes out on the outgoing FSL link: a
// router header (size 1, destination RETURN_PORT) and then {ID, coeff}. Each
// word is written only while the link is not full (m_write = !m_full).
//
// Timing: a word present at a clock edge drives the strobes during the next
// cycle. The reply starts the cycle after coeff_ready and takes two
// unstalled cycles. A coeff_ready arriving while a reply is still being sent
// is lost (the controller asks for one coefficient at a time).
// Word format, header contents and ID field follow the document; the
// return port as a parameter is this design's own.
module dct_core_io
  import dct_noc_pkg::*;
#(
  parameter logic [7:0]  ID          = 8'd0,
  parameter int unsigned RETURN_PORT = 0
) (
  input  logic               clk,
  input  logic               rst,
  // Incoming FSL link (slave side)
  output logic               s_read,
  input  word_t              s_data,
  input  logic               s_exists,
  // Outgoing FSL link (master side)
  output logic               m_write,
  output word_t              m_data,
  input  logic               m_full,
  // Coefficient block
  input  logic               coeff_ready,
  input  logic [COEFF_W-1:0] coeff,
  output logic               coeff_enable,
  output logic               coeff_clear,
  output logic [PIXEL_W-1:0] pixel,
  output logic [PARAM_W-1:0] param_a,
  output logic [PARAM_W-1:0] param_b,
  output logic               load_x,
  output logic               load_y,
  output logic               load_freq
);
  typedef enum logic [1:0] {TX_IDLE, TX_HEADER, TX_DATA} tx_state_t;

  word_t              in_q;
  logic               in_valid;
  tx_state_t          tx_state;
  logic [COEFF_W-1:0] coeff_q;

  // ---------------- input manager ----------------
  assign s_read = s_exists;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_valid <= 1'b0;
      in_q     <= '0;
    end else begin
      in_valid <= s_exists;
      in_q     <= s_exists ? s_data : '0;
    end
  end

  always_comb begin
    load_x       = in_valid & in_q[LOAD_X_BIT];
    load_y       = in_valid & in_q[LOAD_Y_BIT];
    load_freq    = in_valid & in_q[LOAD_FREQ_BIT];
    coeff_clear  = in_valid & in_q[CLEAR_BIT];
    coeff_enable = in_valid & ~|in_q[LOAD_X_BIT:CLEAR_BIT];
    param_a      = in_q[PARAM_W-1:0];
    param_b      = in_q[2*PARAM_W-1:PARAM_W];
    pixel        = in_q[PIXEL_W-1:0];
  end

  // ---------------- output manager ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      tx_state <= TX_IDLE;
      coeff_q  <= '0;
    end else begin
      unique case (tx_state)
        TX_IDLE:   if (coeff_ready) begin
                     coeff_q  <= coeff;
                     tx_state <= TX_HEADER;
                   end
        TX_HEADER: if (!m_full) tx_state <= TX_DATA;
        TX_DATA:   if (!m_full) tx_state <= TX_IDLE;
        default:   tx_state <= TX_IDLE;
      endcase
    end
  end

  always_comb begin
    m_write = (tx_state != TX_IDLE) && !m_full;
    unique case (tx_state)
      TX_HEADER: m_data = make_header(16'd1, NPORTS'(1) << RETURN_PORT);
      TX_DATA:   m_data = {ID, coeff_q};
      default:   m_data = '0;
    endcase
  end

  // A full link must never be written.
  assert property (@(posedge clk) disable iff (rst) m_full |-> !m_write);
endmodule
