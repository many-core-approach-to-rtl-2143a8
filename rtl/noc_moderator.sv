// noc_moderator -- output side of one router port: round-robin arbiter and
// 4:1 multiplexer.
//
// Every FSL manager that has a packet for this output raises its bit of
// `request`. A sweep pointer visits the managers in turn; when it points at
// a requester the moderator locks onto it, grants it (`grant`), and routes
// its write strobe and data to the output link until the manager drops its
// request at the end of the packet. On release the pointer moves on to the
// next manager, so a manager can use this output again only after the
// others have been checked (no starvation).
//
// Timing: the grant appears the cycle after the pointer reaches a
// requester; with the pointer elsewhere it takes up to NPORTS-1 more cycles.
// The sweep-and-lock scheme follows the document; moving the pointer on at
// release is this design's reading of its round-robin rule (the document's
// code keeps the pointer where it was).
module noc_moderator
  import dct_noc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic [NPORTS-1:0]        write_in,
  input  word_t [NPORTS-1:0]       data_in,
  input  logic [NPORTS-1:0]        request,
  output logic [NPORTS-1:0]        grant,
  output logic                     out_write,
  output word_t                    out_data
);
  logic [$clog2(NPORTS)-1:0] sweep;
  logic                      locked;

  always_ff @(posedge clk) begin
    if (rst) begin
      sweep  <= '0;
      locked <= 1'b0;
    end else if (!locked) begin
      if (|request) begin
        if (request[sweep]) locked <= 1'b1;
        else                sweep  <= sweep + 1'b1;
      end
    end else if (!request[sweep]) begin
      locked <= 1'b0;
      sweep  <= sweep + 1'b1;
    end
  end

  always_comb begin
    grant        = '0;
    grant[sweep] = locked & request[sweep];
    out_write    = locked & write_in[sweep];
    out_data     = locked ? data_in[sweep] : '0;
  end

  // At most one manager is granted; it is the one being routed.
  assert property (@(posedge clk) disable iff (rst) $onehot0(grant));
  assert property (@(posedge clk) disable iff (rst) out_write |-> locked);
endmodule
