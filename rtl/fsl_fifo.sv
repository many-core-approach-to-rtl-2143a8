// fsl_fifo -- Fast Simplex Link: a one-way, point-to-point FIFO channel.
//
// The writer (master side) presents m_data with m_write and must not write
// while m_full is high; the reader (slave side) sees the oldest word on
// s_data with s_exists high and removes it with s_read. Reading and writing
// in the same cycle is allowed. A written word becomes
// visible the next cycle. DEPTH entries, a power of two.
//
// The document uses the FPGA vendor's FSL core and gives only its function
// (a FIFO-based unidirectional link with write/full and read/exists); this
// is a plain synchronous FIFO with the same signals, and the depth of 16 is
// this design's choice.
module fsl_fifo
  import dct_noc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  m_write,
  input  word_t m_data,
  output logic  m_full,
  input  logic  s_read,
  output word_t s_data,
  output logic  s_exists
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t       mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;
  logic        do_write, do_read;

  assign s_exists = (wr_ptr != rd_ptr);
  assign m_full   = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign do_read  = s_read & s_exists;
  assign do_write = m_write & ~m_full;
  assign s_data   = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_write) wr_ptr <= wr_ptr + 1'b1;
      if (do_read)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_write) mem[wr_ptr[AW-1:0]] <= m_data;
  end

  assert property (@(posedge clk) disable iff (rst) !(m_write && m_full));
endmodule
