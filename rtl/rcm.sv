// rcm -- reconfigurable constant multiplier (multiplier-less product of a stream by a key
// dependent constant).
//
// The signed IN_W-bit input is sign-extended to NSL slices of LUT_IN bits. Each slice
// addresses its own LUT (rcm_lut) that holds slice_value * constant, so the product is the
// sum of the NSL look-ups, each shifted left by LUT_IN times its slice position. Lower
// slices are unsigned digits, the top slice is a signed (two's complement) digit. With the
// default LUT_IN = 4 this is the split-input form of the constant multiplier (4-input LUTs
// plus an adder); LUT_IN = IN_W gives the single wide-LUT form.
//
// Reconfiguration: a pulse on load with a new constant starts a reload. For 2**LUT_IN cycles
// the multiplier accumulates j*constant (j = 0, 1, ...) and writes entry j of every slice
// LUT; the top slice receives (j - 2**LUT_IN)*constant for j >= 2**(LUT_IN-1). ready is
// low during the reload and the product is meaningless then. The LUT contents themselves
// are computed here by repeated addition; how the contents are produced is this design's
// choice (an FPGA would receive them in its configuration bit stream).
//
// Timing: one register after the look-up-and-add, so prod is valid one clock after x.
module rcm #(
  parameter int unsigned IN_W    = 8,
  parameter int unsigned CONST_W = 12,
  parameter int unsigned LUT_IN  = 4
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             load,      // start reload with const_in
  input  logic signed [CONST_W-1:0]        const_in,
  output logic                             ready,     // LUTs hold the current constant
  input  logic signed [IN_W-1:0]           x,
  output logic signed [IN_W+CONST_W-1:0]   prod
);

  localparam int unsigned NSL    = (IN_W + LUT_IN - 1) / LUT_IN;
  localparam int unsigned EXT_W  = NSL * LUT_IN;
  localparam int unsigned ENT_W  = LUT_IN + CONST_W;       // one slice product
  localparam int unsigned NENT   = 1 << LUT_IN;
  localparam int unsigned PROD_W = IN_W + CONST_W;
  localparam int unsigned SUM_W  = EXT_W + CONST_W;

  // ---------------- reload sequencer ----------------
  logic                      busy;
  logic [LUT_IN-1:0]         idx;
  logic signed [ENT_W-1:0]   acc;      // idx * constant
  logic signed [CONST_W-1:0] cst;
  logic signed [ENT_W-1:0]   top_ent;  // signed-digit entry for the top slice

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      acc  <= '0;
      cst  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      idx  <= '0;
      acc  <= '0;
      cst  <= const_in;
    end else if (busy) begin
      idx <= idx + 1'b1;
      acc <= acc + ENT_W'(cst);
      if (idx == LUT_IN'(NENT - 1)) busy <= 1'b0;
    end
  end

  assign ready   = ~busy & ~load;
  assign top_ent = idx[LUT_IN-1] ? acc - (ENT_W'(cst) <<< LUT_IN) : acc;

  // ---------------- slice LUTs ----------------
  logic signed [EXT_W-1:0] xe;
  logic [ENT_W-1:0]        ent [NSL];

  assign xe = EXT_W'(x);  // sign extension of a signed operand

  for (genvar s = 0; s < NSL; s++) begin : g_slice
    rcm_lut #(.ADDR_W(LUT_IN), .DATA_W(ENT_W)) u_lut (
      .clk     (clk),
      .wr_en   (busy),
      .wr_addr (idx),
      .wr_data ((s == NSL - 1) ? top_ent : acc),
      .rd_addr (xe[s*LUT_IN +: LUT_IN]),
      .rd_data (ent[s])
    );
  end

  // ---------------- shift and add ----------------
  logic signed [SUM_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int s = 0; s < NSL; s++)
      sum += SUM_W'(signed'(ent[s])) <<< (s * LUT_IN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prod <= '0;
    else        prod <= PROD_W'(sum);
  end

endmodule
