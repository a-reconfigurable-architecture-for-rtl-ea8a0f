// frame_ram -- simple two-port RAM (one synchronous write port, one synchronous read port).
//
// Used for the N x N coefficient frame, which the transform updates in place and from which
// the encrypted coefficients are read out in re-oriented order, and for the one-line buffer
// that holds a row or column while it is filtered.
//
// Timing: a write of wr_data at wr_addr takes effect at the rising edge with wr_en high.
// rd_data shows the word at rd_addr one clock after rd_en. A read of the address written in
// the same cycle returns the old word. Contents are not reset.
module frame_ram #(
  parameter int unsigned DEPTH  = 512 * 512,
  parameter int unsigned WIDTH  = 16,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
