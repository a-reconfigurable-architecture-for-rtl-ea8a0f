// rcm_lut -- writable ADDR_W-input look-up table with DATA_W output bits.
//
// This is the storage element of the reconfigurable constant multiplier. Following the
// construction of a (k+1)-input LUT from two k-input LUTs and a 2:1 multiplexer steered by
// the extra input bit, the table is held as 2**(ADDR_W-4) banks of 4-input LUTs (16 entries
// each) and a multiplexer tree: level j of the tree is steered by address bit 4+j. With
// ADDR_W = 4 there is a single bank and no multiplexer.
//
// Interface: the read port is combinational (rd_addr -> rd_data, one look-up delay). The
// write port stores wr_data at wr_addr on the rising edge when wr_en is high; it is used
// only while the owning multiplier reloads its constant. Contents are not reset: the owner
// always writes every entry before it reports ready.
module rcm_lut #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  localparam int unsigned BASE_W = 4;
  localparam int unsigned LVLS   = (ADDR_W > BASE_W) ? ADDR_W - BASE_W : 0;
  localparam int unsigned NBANK  = 1 << LVLS;

  initial begin
    assert (ADDR_W >= BASE_W) else $fatal(1, "rcm_lut: ADDR_W must be at least 4");
  end

  // 4-input LUT banks
  logic [DATA_W-1:0] bank [NBANK][16];

  localparam int unsigned BSEL_W = (LVLS > 0) ? LVLS : 1;
  logic [BSEL_W-1:0] wr_bank;

  assign wr_bank = BSEL_W'(wr_addr >> BASE_W);

  always_ff @(posedge clk) begin
    if (wr_en) bank[wr_bank][wr_addr[BASE_W-1:0]] <= wr_data;
  end

  // Multiplexer tree: node[l][i] is the output of the i-th (4+l)-input LUT.
  logic [DATA_W-1:0] node [LVLS+1][NBANK];

  always_comb begin
    for (int i = 0; i < NBANK; i++) node[0][i] = bank[i][rd_addr[BASE_W-1:0]];
    for (int l = 1; l <= LVLS; l++) begin
      for (int i = 0; i < NBANK; i++) node[l][i] = '0;
      for (int i = 0; i < (NBANK >> l); i++)
        node[l][i] = rd_addr[BASE_W+l-1] ? node[l-1][2*i+1] : node[l-1][2*i];
    end
  end

  assign rd_data = node[LVLS][0];

endmodule
