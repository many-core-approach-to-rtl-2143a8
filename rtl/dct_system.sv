// dct_system -- many-core 2D-DCT system: one router, three DCT cores.
//
// The system splits a 2D-DCT by frequency: each DCT core computes one
// coefficient X(u,v) over a window of pixels, so several cores work on
// different coefficients of the same image at the same time. A four-port
// router (noc_router) connects them: port 0 belongs to the controller, ports
// 1, 2 and 3 to DCT cores with IDs 0, 1 and 2. Every connection is a pair
// of FSL FIFO links (fsl_fifo), one per direction, as in the document's
// test system.
//
// The controller (a soft processor in the document) is outside this module;
// its two links are the ctrl_* ports:
//   ctrl_m_*  controller -> router port 0 (controller writes)
//   ctrl_s_*  router port 0 -> controller (controller reads)
// A typical run: for each core send a packet (header to that core's port,
// then load_freq, load_x, load_y and clear words), multicast the pixels of
// the window to all cores in one packet, then read one two-word reply per
// core (header, {ID, coefficient}). The cores reply to port 0.
//
// Parameters: LOG2_N = 3 gives 8x8 blocks (document); FIFO_DEPTH is this
// design's choice for the vendor links.
module dct_system
  import dct_noc_pkg::*;
#(
  parameter int unsigned LOG2_N     = 3,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst,
  // Controller -> network
  input  logic  ctrl_m_write,
  input  word_t ctrl_m_data,
  output logic  ctrl_m_full,
  // Network -> controller
  input  logic  ctrl_s_read,
  output word_t ctrl_s_data,
  output logic  ctrl_s_exists
);
  localparam int unsigned NCORES = NPORTS - 1;

  // Links into the router (towards its FSL managers)
  logic  [NPORTS-1:0] in_write, in_full, in_read, in_exists;
  word_t [NPORTS-1:0] in_wdata, in_rdata;
  // Links out of the router (from its moderators)
  logic  [NPORTS-1:0] out_write, out_full, out_read, out_exists;
  word_t [NPORTS-1:0] out_wdata, out_rdata;

  assign in_write[0]   = ctrl_m_write;
  assign in_wdata[0]   = ctrl_m_data;
  assign ctrl_m_full   = in_full[0];
  assign out_read[0]   = ctrl_s_read;
  assign ctrl_s_data   = out_rdata[0];
  assign ctrl_s_exists = out_exists[0];

  for (genvar p = 0; p < NPORTS; p++) begin : g_link
    fsl_fifo #(.DEPTH(FIFO_DEPTH)) u_to_router (
      .clk, .rst,
      .m_write(in_write[p]), .m_data(in_wdata[p]), .m_full(in_full[p]),
      .s_read(in_read[p]), .s_data(in_rdata[p]), .s_exists(in_exists[p])
    );
    fsl_fifo #(.DEPTH(FIFO_DEPTH)) u_from_router (
      .clk, .rst,
      .m_write(out_write[p]), .m_data(out_wdata[p]), .m_full(out_full[p]),
      .s_read(out_read[p]), .s_data(out_rdata[p]), .s_exists(out_exists[p])
    );
  end

  noc_router u_router (
    .clk, .rst,
    .s_read(in_read), .s_data(in_rdata), .s_exists(in_exists),
    .m_write(out_write), .m_data(out_wdata), .m_full(out_full)
  );

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    dct_core #(.ID(8'(c)), .LOG2_N(LOG2_N), .RETURN_PORT(0)) u_core (
      .clk, .rst,
      .s_read(out_read[c+1]), .s_data(out_rdata[c+1]), .s_exists(out_exists[c+1]),
      .m_write(in_write[c+1]), .m_data(in_wdata[c+1]), .m_full(in_full[c+1])
    );
  end
endmodule
