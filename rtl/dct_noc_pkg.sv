// dct_noc_pkg -- types and constants shared by the router and the DCT cores.
//
// Word layout. The FSL bus numbers its bits 0..31 with bit 0 the most
// significant; here every 32-bit word is written [31:0] with bit 31 the most
// significant, so FSL bit k is bit 31-k below.
//
// Router header (consumed by the router that reads it):
//   [31:16] size      number of payload words that follow
//   [15:12] not used
//   [11:8]  dst_port  one bit per output port, bit 11 = port 0 ... bit 8 = port 3;
//                     several bits set = multicast, all four = broadcast
//   [7:4]   noc_y     router row index (carried, not used by a single router)
//   [3:0]   noc_x     router column index (carried, not used)
//
// DCT core payload word:
//   [31] load_x   [30] load_y   [29] load_freq   [28] clear accumulator
//   with a load bit set: [9:0] = parameter A (start / u), [19:10] = parameter B (end / v)
//   with no control bit set: [7:0] = pixel
// Coefficient reply: header for one word to port 0, then {ID[7:0], coeff[23:0]}.
package dct_noc_pkg;

  localparam int unsigned WORD_W   = 32;
  localparam int unsigned NPORTS   = 4;
  localparam int unsigned PIXEL_W  = 8;
  localparam int unsigned PARAM_W  = 10;
  localparam int unsigned COEFF_W  = 24;
  localparam int unsigned COS_W    = 9;   // |cos| with 8 fraction bits, 256 = 1.0
  localparam int unsigned PROD_W   = 16;  // pixel*|cos*cos| with 8 fraction bits

  // Payload control bits
  localparam int unsigned LOAD_X_BIT    = 31;
  localparam int unsigned LOAD_Y_BIT    = 30;
  localparam int unsigned LOAD_FREQ_BIT = 29;
  localparam int unsigned CLEAR_BIT     = 28;

  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    logic [15:0] size;
    logic [3:0]  not_used;
    logic [3:0]  dst_port;  // [3] = port 0 ... [0] = port 3
    logic [3:0]  noc_y;
    logic [3:0]  noc_x;
  } noc_header_t;

  // Request mask as used inside the router: bit p = output port p.
  function automatic logic [NPORTS-1:0] dst_to_mask(logic [3:0] dst_port);
    return {dst_port[0], dst_port[1], dst_port[2], dst_port[3]};
  endfunction

  function automatic logic [3:0] mask_to_dst(logic [NPORTS-1:0] mask);
    return {mask[0], mask[1], mask[2], mask[3]};
  endfunction

  function automatic word_t make_header(logic [15:0] size, logic [NPORTS-1:0] mask);
    noc_header_t h;
    h.size     = size;
    h.not_used = 4'h0;
    h.dst_port = mask_to_dst(mask);
    h.noc_y    = 4'h0;
    h.noc_x    = 4'h0;
    return word_t'(h);
  endfunction

  // Magnitude of cos(i*pi/2^(log2n+1)), i in [0, 2^(log2n+1)), rounded to
  // 8 fraction bits: the samples of [0, pi) held by the cosine table.
  function automatic logic [COS_W-1:0] cos_sample(int i, int log2n);
    real a, c;
    a = 3.14159265358979323846 * real'(i) / real'(2 ** (log2n + 1));
    c = $cos(a);
    if (c < 0.0) c = -c;
    return COS_W'($rtoi(c * 256.0 + 0.5));
  endfunction

endpackage
