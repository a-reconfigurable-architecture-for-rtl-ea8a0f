// pdwt_filter -- one-dimensional parameterized 9/7 DWT filter, one sample per clock,
// built without multipliers.
//
// Datapath:
//   1. an eight-register delay line that, with the live input, forms the nine-sample
//      window x(k+4) .. x(k-4); it advances on every accepted sample;
//   2. the symmetric taps are folded by four adders into w0 = x(k) and
//      wi = x(k+i) + x(k-i), i = 1..4 (registered, together with the delay line);
//   3. nine reconfigurable constant multipliers (rcm) form Ki*wi for the low pass
//      (i = 0..4) and Khi*wi for the high pass (i = 0..3) (registered);
//   4. an adder tree of four adders (low pass) and three adders (high pass) sums the
//      products; the sums are rounded to nearest at COEF_FRAC bits and saturated to OUT_W.
// Both outputs refer to the window centred on x(k); a 2-D sequencer keeps the low pass at
// even k and the high pass at odd k (decimation by two).
//
// Key change: a pulse on cfg_start with an 8-bit alpha code makes coef_gen compute the nine
// constants, after which every rcm reloads its LUTs (16 cycles). cfg_busy stays high for
// that whole time (about 52 cycles) and the stream must not be fed meanwhile.
//
// Timing: a sample presented with in_valid at clock edge e is the newest sample of the
// window whose results are on out_lo/out_hi with out_valid right after edge e+2.
// The pipeline does not stall; samples may arrive on any cycle.
module pdwt_filter
  import pdwt_pkg::*;
#(
  parameter int unsigned DATA_W = 8,           // input sample width (signed)
  parameter int unsigned CW     = COEF_W,
  parameter int unsigned CF     = COEF_FRAC,
  parameter int unsigned LUT_IN = 4,
  parameter int unsigned OUT_W  = DATA_W + 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // key (alpha) reconfiguration
  input  logic                     cfg_start,
  input  logic [ALPHA_W-1:0]       cfg_alpha,
  output logic                     cfg_busy,
  // sample stream
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_lo,
  output logic signed [OUT_W-1:0]  out_hi
);

  localparam int unsigned W_W   = DATA_W + 1;
  localparam int unsigned P_W   = W_W + CW;
  localparam int unsigned S_W   = P_W + 3;

  // ---------------- constants ----------------
  logic                 cg_busy, cg_done;
  logic signed [CW-1:0] k_lo [N_LO_TAPS];
  logic signed [CW-1:0] k_hi [N_HI_TAPS];

  coef_gen #(.CW(CW), .CF(CF)) u_coef (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (cfg_start),
    .alpha_code (cfg_alpha),
    .busy       (cg_busy),
    .done       (cg_done),
    .k_lo       (k_lo),
    .k_hi       (k_hi)
  );

  // ---------------- stage 1: delay line and symmetric-tap adders ----------------
  // tap[0] is the live input x(k+4); tap[j] = sr[j-1] for j = 1..8, so the centre x(k)
  // is sr[3] and eight registers hold the rest of the window.
  logic signed [DATA_W-1:0] sr [8];
  logic signed [W_W-1:0]    w  [N_LO_TAPS];
  logic                     v2;

  function automatic logic signed [DATA_W-1:0] tap(int j, logic signed [DATA_W-1:0] x,
                                                   logic signed [DATA_W-1:0] d [8]);
    return (j == 0) ? x : d[j-1];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) sr[i] <= '0;
      for (int i = 0; i < N_LO_TAPS; i++) w[i] <= '0;
      v2 <= 1'b0;
    end else begin
      v2 <= in_valid;
      if (in_valid) begin
        sr[0] <= in_data;
        for (int i = 1; i < 8; i++) sr[i] <= sr[i-1];
      end
      w[0] <= W_W'(sr[3]);
      for (int i = 1; i < N_LO_TAPS; i++)
        w[i] <= W_W'(tap(4 - i, in_data, sr)) + W_W'(sr[3 + i]);
    end
  end

  // ---------------- stage 3: reconfigurable constant multipliers ----------------
  logic                 ld;
  logic [N_LO_TAPS+N_HI_TAPS-1:0] rdy;
  logic signed [P_W-1:0] p_lo [N_LO_TAPS];
  logic signed [P_W-1:0] p_hi [N_HI_TAPS];
  logic                  v3;

  assign ld = cg_done;   // constants are stable from the cycle done rises

  for (genvar i = 0; i < N_LO_TAPS; i++) begin : g_lo
    rcm #(.IN_W(W_W), .CONST_W(CW), .LUT_IN(LUT_IN)) u_rcm (
      .clk(clk), .rst_n(rst_n), .load(ld), .const_in(k_lo[i]), .ready(rdy[i]),
      .x(w[i]), .prod(p_lo[i])
    );
  end
  for (genvar i = 0; i < N_HI_TAPS; i++) begin : g_hi
    rcm #(.IN_W(W_W), .CONST_W(CW), .LUT_IN(LUT_IN)) u_rcm (
      .clk(clk), .rst_n(rst_n), .load(ld), .const_in(k_hi[i]), .ready(rdy[N_LO_TAPS+i]),
      .x(w[i]), .prod(p_hi[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v3 <= 1'b0;
    else        v3 <= v2;
  end

  assign cfg_busy = cfg_start | cg_busy | cg_done | ~(&rdy);

  // ---------------- stage 4: adder trees, rounding, saturation ----------------
  logic signed [S_W-1:0] s_lo, s_hi;

  always_comb begin
    s_lo = '0;
    for (int i = 0; i < N_LO_TAPS; i++) s_lo += S_W'(p_lo[i]);
    s_hi = '0;
    for (int i = 0; i < N_HI_TAPS; i++) s_hi += S_W'(p_hi[i]);
  end

  function automatic logic signed [OUT_W-1:0] round_sat(logic signed [S_W-1:0] v);
    logic signed [S_W-1:0] rv;
    rv = (v + (S_W'(1) <<< (CF - 1))) >>> CF;
    if (rv > S_W'((1 << (OUT_W - 1)) - 1)) return OUT_W'((1 << (OUT_W - 1)) - 1);
    if (rv < -S_W'(1 << (OUT_W - 1)))      return OUT_W'(-(1 << (OUT_W - 1)));
    return OUT_W'(rv);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_lo    <= '0;
      out_hi    <= '0;
    end else begin
      out_valid <= v3;
      out_lo    <= round_sat(s_lo);
      out_hi    <= round_sat(s_hi);
    end
  end

endmodule
