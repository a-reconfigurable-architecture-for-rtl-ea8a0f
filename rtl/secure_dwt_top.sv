// secure_dwt_top -- keyed compression-cum-encryption transform of one image frame.
//
// A frame of N x N pixels is decomposed by a LEVELS-level 2-D wavelet transform whose
// filters are the parameterized 9/7 pair: every one of the 2*LEVELS one-dimensional passes
// (a row and a column pass per level) uses its own alpha, and each of the 3*LEVELS+1
// resulting subbands is then read out in one of eight orientations (transposed or not,
// rows and columns forward or reversed). The alpha codes and orientation codes together
// form the secret key; only a receiver with the same key can undo the transform. With the
// defaults (512 x 512, 6 levels) the key is 12*8 + 19*3 = 153 bits.
//
// Key layout (key_in, loaded by key_we while the transform is idle):
//   key_in[8*j +: 8]              alpha code of pass j (j = 2l: rows, 2l+1: columns of
//                                 level l, l = 0 is the finest), alpha = 1 + 3*code/256
//   key_in[16*LEVELS + 3*s +: 3]  orientation {transpose, row_rev, col_rev} of subband s
//                                 (s = 0: LL, then HL, LH, HH of level 1, level 2, ...)
//
// Blocks: dwt2d_ctrl (sequencer), pdwt_filter (the one-dimensional filter with
// reconfigurable constant multipliers), subband_reorient (read-address map), and two
// frame_ram instances (the N*N coefficient frame and a one-line buffer).
//
// Operation: pulse start; pixels are taken in raster order while pix_ready is high
// (pix_valid qualifies each one); after the transform, N*N coefficients (signed MEM_W-bit,
// Mallat layout, re-oriented) leave in raster order on coef_valid/coef_data with no
// back-pressure; done pulses once at the end. busy is high from start until done.
//
// The filter pair, the RCM-based multiplier-free filter, the 8-bit alpha grid over [1,4),
// the per-pass alphas and the eight per-subband orientations follow the published scheme;
// the key bit layout, the single time-shared filter, the memory organisation and the
// read-out order are this design's choices. The subband index of the re-orientation map
// (sb_idx) is not needed here and is left for observation.
module secure_dwt_top
  import pdwt_pkg::*;
#(
  parameter int unsigned N      = 512,
  parameter int unsigned LEVELS = 6,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned MEM_W  = 16,
  parameter int unsigned LUT_IN = 4,
  localparam int unsigned KEY_W = key_width(LEVELS),
  localparam int unsigned AW    = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              key_we,
  input  logic [KEY_W-1:0]  key_in,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              pix_ready,
  input  logic              pix_valid,
  input  logic [PIX_W-1:0]  pix_data,
  output logic              coef_valid,
  output logic [MEM_W-1:0]  coef_data
);

  localparam int unsigned NK  = n_kernels(LEVELS);
  localparam int unsigned NSB = n_subbands(LEVELS);
  localparam int unsigned F_W = MEM_W + 2;

  // ---------------- key register ----------------
  logic [KEY_W-1:0]   key;
  logic [ALPHA_W-1:0] alpha [NK];
  orient_t            orient [NSB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               key <= '0;
    else if (key_we && !busy) key <= key_in;
  end

  always_comb begin
    for (int j = 0; j < NK; j++)  alpha[j]  = key[ALPHA_W*j +: ALPHA_W];
    for (int s = 0; s < NSB; s++) orient[s] = orient_t'(key[ALPHA_W*NK + ORIENT_W*s +: ORIENT_W]);
  end

  // ---------------- interconnect ----------------
  logic              fm_we, fm_re, lb_we, lb_re;
  logic [2*AW-1:0]   fm_waddr, fm_raddr;
  logic [MEM_W-1:0]  fm_wdata, fm_rdata, lb_wdata, lb_rdata;
  logic [AW-1:0]     lb_waddr, lb_raddr;
  logic              f_cfg_start, f_cfg_busy, f_in_valid, f_out_valid;
  logic [ALPHA_W-1:0] f_cfg_alpha;
  logic [MEM_W-1:0]  f_in_data;
  logic signed [F_W-1:0] f_out_lo, f_out_hi;
  logic [AW-1:0]     ro_r, ro_c, src_r, src_c;
  logic [$clog2(NSB)-1:0] sb_idx;

  dwt2d_ctrl #(.N(N), .LEVELS(LEVELS), .PIX_W(PIX_W), .MEM_W(MEM_W), .F_W(F_W)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .alpha,
    .pix_ready, .pix_valid, .pix_data,
    .fm_we, .fm_waddr, .fm_wdata, .fm_re, .fm_raddr, .fm_rdata,
    .lb_we, .lb_waddr, .lb_wdata, .lb_re, .lb_raddr, .lb_rdata,
    .f_cfg_start, .f_cfg_alpha, .f_cfg_busy, .f_in_valid, .f_in_data,
    .f_out_valid, .f_out_lo, .f_out_hi,
    .ro_r, .ro_c, .src_r, .src_c,
    .coef_valid, .coef_data
  );

  frame_ram #(.DEPTH(N * N), .WIDTH(MEM_W)) u_frame (
    .clk, .wr_en(fm_we), .wr_addr(fm_waddr), .wr_data(fm_wdata),
    .rd_en(fm_re), .rd_addr(fm_raddr), .rd_data(fm_rdata)
  );

  frame_ram #(.DEPTH(N), .WIDTH(MEM_W)) u_line (
    .clk, .wr_en(lb_we), .wr_addr(lb_waddr), .wr_data(lb_wdata),
    .rd_en(lb_re), .rd_addr(lb_raddr), .rd_data(lb_rdata)
  );

  pdwt_filter #(.DATA_W(MEM_W), .LUT_IN(LUT_IN), .OUT_W(F_W)) u_filter (
    .clk, .rst_n,
    .cfg_start(f_cfg_start), .cfg_alpha(f_cfg_alpha), .cfg_busy(f_cfg_busy),
    .in_valid(f_in_valid), .in_data(f_in_data),
    .out_valid(f_out_valid), .out_lo(f_out_lo), .out_hi(f_out_hi)
  );

  subband_reorient #(.N(N), .LEVELS(LEVELS)) u_reorient (
    .r(ro_r), .c(ro_c), .orient, .src_r, .src_c, .sb_idx
  );

endmodule
