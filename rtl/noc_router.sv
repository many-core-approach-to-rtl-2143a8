// noc_router -- four-port network-on-chip router.
//
// Each port has an incoming and an outgoing FSL link. An FSL manager per
// input strips the header of a packet and asks the moderators of the
// requested outputs for access; a moderator per output arbitrates round
// robin among the four managers and multiplexes the granted one onto its
// link. The answer a manager sees from output o is moderator o's grant
// ANDed with "link o not full", so a word is only written where there is
// room, and a multicast word waits until every requested output can take it.
// Any input can reach any output, its own included.
//
// Port p's links are element p of each array. Latency through an idle
// router: the first payload word is written in the cycle after the third
// clock edge that follows the header's arrival (a few edges more when the
// moderator's pointer has further to sweep), then one word every 3 cycles. Organisation (FSL manager +
// moderator per port, full-gated permission) follows the document. Packets
// whose destination sets overlap and that are both multicast can block each
// other (each holds part of the outputs); the intended use has a single
// broadcasting source.
module noc_router
  import dct_noc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // Incoming links (slave side)
  output logic [NPORTS-1:0]   s_read,
  input  word_t [NPORTS-1:0]  s_data,
  input  logic [NPORTS-1:0]   s_exists,
  // Outgoing links (master side)
  output logic [NPORTS-1:0]   m_write,
  output word_t [NPORTS-1:0]  m_data,
  input  logic [NPORTS-1:0]   m_full
);
  logic  [NPORTS-1:0]              mgr_write;
  word_t [NPORTS-1:0]              mgr_data;
  logic  [NPORTS-1:0][NPORTS-1:0]  req;     // req[p][o]: manager p wants output o
  logic  [NPORTS-1:0][NPORTS-1:0]  reply;   // reply[p][o]
  logic  [NPORTS-1:0][NPORTS-1:0]  mod_req; // mod_req[o][p]
  logic  [NPORTS-1:0][NPORTS-1:0]  grant;   // grant[o][p]

  always_comb begin
    for (int p = 0; p < NPORTS; p++)
      for (int o = 0; o < NPORTS; o++) begin
        mod_req[o][p] = req[p][o];
        reply[p][o]   = grant[o][p] & ~m_full[o];
      end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    noc_fsl_manager u_mgr (
      .clk, .rst,
      .s_read(s_read[p]), .s_data(s_data[p]), .s_exists(s_exists[p]),
      .m_write(mgr_write[p]), .m_data(mgr_data[p]),
      .request(req[p]), .reply(reply[p])
    );
    noc_moderator u_mod (
      .clk, .rst,
      .write_in(mgr_write), .data_in(mgr_data),
      .request(mod_req[p]), .grant(grant[p]),
      .out_write(m_write[p]), .out_data(m_data[p])
    );
  end
endmodule
