// coef_gen -- computes the nine filter constants of the parameterized 9/7 wavelet from an
// 8-bit alpha code.
//
// alpha = 1 + 3*code/256 = q/256 with q = 256 + 3*code. The low pass (9 taps) and high
// pass (7 taps) constants are the rational functions of alpha, alpha^2 and 1/alpha of the
// parameterized filter pair:
//   K4 = -9a/64 + a^2/32 + 15/64 - 1/(8a)      K3 = -a^2/16 + 11a/32 - 11/16 + 1/(2a)
//   K2 = 1/8 - 1/(2a)                          K1 =  a^2/16 - 11a/32 + 15/16 - 1/(2a)
//   K0 = 9a/32 - a^2/16 - 7/32 + 5/(4a)
//   Kh0 = 1/4 + a/8     Kh1 = -(7/32 + a/32)     Kh2 = 1/8 - a/16     Kh3 = -(1/32 - a/32)
// The high pass constants are those of the synthesis low pass with the odd taps negated
// (modulation by (-1)^n), which turns it into the analysis high pass; that sign convention
// is this design's choice.
//
// How it works: after start, a shift-and-add loop forms q^2 and a restoring divider forms
// R = floor(2^32 / q) (1/alpha with 24 fractional bits); both run in the same 33 cycles.
// Every constant is then a sum of shifted copies of q, q^2, R and fixed numbers, evaluated
// with 24 fractional bits and rounded to nearest at COEF_FRAC bits (saturated to COEF_W).
// No multiplier is used.
//
// Interface/timing: pulse start with alpha_code; busy is high for 34 cycles, then done
// pulses for one cycle and k_lo/k_hi hold the constants until the next start.
module coef_gen
  import pdwt_pkg::*;
#(
  parameter int unsigned CW = COEF_W,
  parameter int unsigned CF = COEF_FRAC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [ALPHA_W-1:0]   alpha_code,
  output logic                 busy,
  output logic                 done,
  output logic signed [CW-1:0] k_lo [N_LO_TAPS],
  output logic signed [CW-1:0] k_hi [N_HI_TAPS]
);

  localparam int unsigned IF = 24;   // internal fractional bits
  localparam int unsigned AW = 40;   // internal word

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} state_e;
  state_e state;

  logic [9:0]  q;          // alpha * 256
  logic [5:0]  step;
  logic [19:0] sq;         // q^2
  logic [9:0]  rem;        // divider remainder (< q)
  logic [32:0] quo;        // quotient bits

  // divider: dividend is 2^32, so only the first bit shifted in is one
  logic [10:0] rem_sh;
  assign rem_sh = {rem, (step == 6'd0)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      q     <= '0;
      step  <= '0;
      sq    <= '0;
      rem   <= '0;
      quo   <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          q     <= 10'd256 + 10'(alpha_code) + 10'({alpha_code, 1'b0});
          step  <= '0;
          sq    <= '0;
          rem   <= '0;
          quo   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          // shift-and-add square, one multiplier bit per cycle
          if (step < 6'd10 && q[step[3:0]]) sq <= sq + (20'(q) << step);
          // restoring division, one quotient bit per cycle (33 bits)
          if (rem_sh >= 11'(q)) begin
            rem <= 10'(rem_sh - 11'(q));
            quo <= {quo[31:0], 1'b1};
          end else begin
            rem <= rem_sh[9:0];
            quo <= {quo[31:0], 1'b0};
          end
          step <= step + 1'b1;
          if (step == 6'd32) state <= S_FIN;
        end
        default: state <= S_IDLE;  // S_FIN: constants are latched below
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ---------------- shift-and-add evaluation (24 fractional bits) ----------------
  logic signed [AW-1:0] a, a2, r;
  logic signed [AW-1:0] lo_f [N_LO_TAPS];
  logic signed [AW-1:0] hi_f [N_HI_TAPS];

  localparam logic signed [AW-1:0] ONE = AW'(1) <<< IF;

  always_comb begin
    a  = AW'(q)  <<< (IF - 8);     // alpha
    a2 = AW'(sq) <<< (IF - 16);    // alpha^2
    r  = AW'(quo);                 // 1/alpha (floor)
    // K4 = -9a/64 + a^2/32 + 15/64 - r/8
    lo_f[4] = -(((a <<< 3) + a) >>> 6) + (a2 >>> 5) + (((ONE <<< 4) - ONE) >>> 6) - (r >>> 3);
    // K3 = -a^2/16 + 11a/32 - 11/16 + r/2
    lo_f[3] = -(a2 >>> 4) + (((a <<< 3) + (a <<< 1) + a) >>> 5)
              - (((ONE <<< 3) + (ONE <<< 1) + ONE) >>> 4) + (r >>> 1);
    // K2 = 1/8 - r/2
    lo_f[2] = (ONE >>> 3) - (r >>> 1);
    // K1 = a^2/16 - 11a/32 + 15/16 - r/2
    lo_f[1] = (a2 >>> 4) - (((a <<< 3) + (a <<< 1) + a) >>> 5)
              + (((ONE <<< 4) - ONE) >>> 4) - (r >>> 1);
    // K0 = 9a/32 - a^2/16 - 7/32 + 5r/4
    lo_f[0] = (((a <<< 3) + a) >>> 5) - (a2 >>> 4) - (((ONE <<< 3) - ONE) >>> 5)
              + (((r <<< 2) + r) >>> 2);
    // high pass (odd taps negated)
    hi_f[0] = (ONE >>> 2) + (a >>> 3);
    hi_f[1] = -((((ONE <<< 3) - ONE) >>> 5) + (a >>> 5));
    hi_f[2] = (ONE >>> 3) - (a >>> 4);
    hi_f[3] = -((ONE >>> 5) - (a >>> 5));
  end

  function automatic logic signed [CW-1:0] to_coef(logic signed [AW-1:0] v);
    logic signed [AW-1:0] rv;
    rv = (v + (AW'(1) <<< (IF - CF - 1))) >>> (IF - CF);
    if (rv > AW'((1 << (CW - 1)) - 1))  return CW'((1 << (CW - 1)) - 1);
    if (rv < -AW'(1 << (CW - 1)))       return CW'(-(1 << (CW - 1)));
    return CW'(rv);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int i = 0; i < N_LO_TAPS; i++) k_lo[i] <= '0;
      for (int i = 0; i < N_HI_TAPS; i++) k_hi[i] <= '0;
    end else begin
      done <= (state == S_FIN);
      if (state == S_FIN) begin
        for (int i = 0; i < N_LO_TAPS; i++) k_lo[i] <= to_coef(lo_f[i]);
        for (int i = 0; i < N_HI_TAPS; i++) k_hi[i] <= to_coef(hi_f[i]);
      end
    end
  end

endmodule
