// tb_rcm_lut -- self-checking test of the writable look-up table built from 4-input banks
// and a multiplexer tree. A 6-input, 16-bit table (four banks, two multiplexer levels) is
// filled with random words, read back at every address and at random addresses after
// partial rewrites, and compared with a shadow copy kept by the testbench.
module tb_rcm_lut;
  localparam int AW = 6, DW = 16;
  logic clk = 0;
  logic wr_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [DW-1:0] wr_data, rd_data;
  logic [DW-1:0] shadow [1 << AW];
  int checks = 0, failures = 0;

  rcm_lut #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [DW-1:0] d);
    @(negedge clk);
    wr_en = 1; wr_addr = AW'(a); wr_data = d;
    shadow[a] = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic chk(int a);
    rd_addr = AW'(a);
    #1;
    checks++;
    if (rd_data !== shadow[a]) begin
      failures++;
      $display("FAIL addr %0d: got %h expected %h", a, rd_data, shadow[a]);
    end
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    for (int a = 0; a < (1 << AW); a++) wr(a, DW'($urandom));
    @(negedge clk);
    for (int a = 0; a < (1 << AW); a++) chk(a);
    for (int n = 0; n < 40; n++) begin
      wr($urandom_range(0, (1 << AW) - 1), DW'($urandom));
      @(negedge clk);
      for (int m = 0; m < 4; m++) chk($urandom_range(0, (1 << AW) - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
