// pdwt_pkg -- constants and types shared by the parameterized-DWT encryption datapath.
//
// The key of one frame is 153 bits for the 6-level configuration: one 8-bit alpha code for
// each of the 12 one-dimensional filter passes (a row and a column pass per level), then a
// 3-bit orientation code for each of the 19 subbands. The functions below give the key
// layout for any number of levels so that reduced configurations use the same packing.
//
// alpha = 1 + 3*code/256, i.e. the interval [1,4) cut into 256 steps of 0.01171875. The
// filter constants are signed COEF_W-bit numbers with COEF_FRAC fractional bits (Q1.10 by
// default, a 12-bit constant as in the 8x12 constant-multiplier example).
package pdwt_pkg;

  localparam int unsigned ALPHA_W   = 8;   // bits per alpha code
  localparam int unsigned ORIENT_W  = 3;   // bits per subband orientation code
  localparam int unsigned COEF_W    = 12;  // filter-constant width
  localparam int unsigned COEF_FRAC = 10;  // fractional bits of a filter constant
  localparam int unsigned N_LO_TAPS = 5;   // w0..w4 feed the 9-tap low pass
  localparam int unsigned N_HI_TAPS = 4;   // w0..w3 feed the 7-tap high pass

  // Orientation code of one subband: {transpose, reverse rows, reverse columns}
  typedef struct packed {
    logic transpose;  // swap row and column index (applied first)
    logic row_rev;    // read rows in reverse order
    logic col_rev;    // read columns in reverse order
  } orient_t;

  // Subband kind inside one decomposition level (Mallat layout)
  typedef enum logic [1:0] {
    SB_HL = 2'd0,  // top-right quadrant: high pass along rows
    SB_LH = 2'd1,  // bottom-left quadrant: high pass along columns
    SB_HH = 2'd2,  // bottom-right quadrant
    SB_LL = 2'd3   // final low-low band
  } subband_e;

  function automatic int unsigned n_kernels(int unsigned levels);
    return 2 * levels;
  endfunction

  function automatic int unsigned n_subbands(int unsigned levels);
    return 3 * levels + 1;
  endfunction

  function automatic int unsigned key_width(int unsigned levels);
    return ALPHA_W * n_kernels(levels) + ORIENT_W * n_subbands(levels);
  endfunction

endpackage
