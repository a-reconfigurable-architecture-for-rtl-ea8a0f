// subband_reorient -- memory-access mapping that re-orients every subband of a multi-level
// 2-D wavelet decomposition.
//
// The coefficients sit in the usual Mallat layout of an N x N array: the level-l detail
// subbands (l = 1 is the finest) are the S x S quadrants with S = N >> l at (0,S) (HL),
// (S,0) (LH) and (S,S) (HH); the final low band LL is the (N >> LEVELS)-square at (0,0).
// Subband index: 0 is LL, 1 + 3*(l-1) + {0,1,2} are HL, LH, HH of level l.
//
// Each subband has a 3-bit code {transpose, row_rev, col_rev} (orient_t). For an output
// position (r,c) inside a subband with local coordinates (i,j) the coefficient read is the
// one at local (i',j') with, first, (i,j) swapped if transpose is set, then i' = S-1-i if
// row_rev and j' = S-1-j if col_rev. This gives the eight orientations of a square block:
// the four row/column reading orders and their transposes. Nothing is computed on the
// data; only the read address changes, so the re-orientation costs no arithmetic.
//
// Purely combinational: (r,c) in, (src_r,src_c) and the subband index out.
module subband_reorient
  import pdwt_pkg::*;
#(
  parameter int unsigned N      = 512,
  parameter int unsigned LEVELS = 6,
  localparam int unsigned AW    = $clog2(N),
  localparam int unsigned NSB   = 3 * LEVELS + 1
) (
  input  logic [AW-1:0]  r,
  input  logic [AW-1:0]  c,
  input  orient_t        orient [NSB],
  output logic [AW-1:0]  src_r,
  output logic [AW-1:0]  src_c,
  output logic [$clog2(NSB)-1:0] sb_idx
);

  logic [AW-1:0] size, base_r, base_c, li, lj, ti, tj;
  orient_t       o;

  always_comb begin
    // final LL band unless a detail level claims the position
    size   = AW'(N >> LEVELS);
    base_r = '0;
    base_c = '0;
    sb_idx = '0;
    // coarsest level first; the finest level that contains (r,c) wins
    for (int l = LEVELS; l >= 1; l--) begin
      if ((r >= AW'(N >> l)) || (c >= AW'(N >> l))) begin
        size = AW'(N >> l);
        if (r < AW'(N >> l)) begin            // HL
          base_r = '0;        base_c = size;  sb_idx = $bits(sb_idx)'(1 + 3 * (l - 1));
        end else if (c < AW'(N >> l)) begin   // LH
          base_r = size;      base_c = '0;    sb_idx = $bits(sb_idx)'(2 + 3 * (l - 1));
        end else begin                        // HH
          base_r = size;      base_c = size;  sb_idx = $bits(sb_idx)'(3 + 3 * (l - 1));
        end
      end
    end
    o  = orient[sb_idx];
    li = r - base_r;
    lj = c - base_c;
    ti = o.transpose ? lj : li;
    tj = o.transpose ? li : lj;
    if (o.row_rev) ti = size - 1'b1 - ti;
    if (o.col_rev) tj = size - 1'b1 - tj;
    src_r = base_r + ti;
    src_c = base_c + tj;
  end

endmodule
