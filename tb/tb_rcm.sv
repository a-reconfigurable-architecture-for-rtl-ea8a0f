// tb_rcm -- self-checking test of the reconfigurable constant multiplier.
//
// Two instances: a 9-bit x 12-bit multiplier with 4-input LUT slices (three slices, the
// top one a signed digit) and an 8-bit x 12-bit one with a single 8-input LUT. For a list
// of constants (extremes, zero, random) each is loaded, the reload time is checked to be
// 16 (resp. 256) cycles of ready low, and then a random signed stream is multiplied; every
// product is compared one clock later with the testbench's own x * constant.
module tb_rcm;
  logic clk = 0, rst_n = 0;
  logic load;
  logic signed [11:0] cst;
  logic rdy_a, rdy_b;
  logic signed [8:0]  xa;
  logic signed [7:0]  xb;
  logic signed [20:0] pa;
  logic signed [19:0] pb;
  int checks = 0, failures = 0;

  rcm #(.IN_W(9), .CONST_W(12), .LUT_IN(4)) dut_a (
    .clk, .rst_n, .load, .const_in(cst), .ready(rdy_a), .x(xa), .prod(pa));
  rcm #(.IN_W(8), .CONST_W(12), .LUT_IN(8)) dut_b (
    .clk, .rst_n, .load, .const_in(cst), .ready(rdy_b), .x(xb), .prod(pb));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_const(logic signed [11:0] c);
    int na, nb;
    @(negedge clk);
    cst = c; load = 1;
    @(negedge clk);
    load = 0;
    na = 1; nb = 1;   // the load cycle itself
    while (!(rdy_a && rdy_b)) begin
      if (!rdy_a) na++;
      if (!rdy_b) nb++;
      @(negedge clk);
    end
    checks += 2;
    if (na != 17) begin failures++; $display("FAIL reload A took %0d cycles", na); end
    if (nb != 257) begin failures++; $display("FAIL reload B took %0d cycles", nb); end
  endtask

  task automatic stream(logic signed [11:0] c, int n);
    logic signed [8:0] pxa;
    logic signed [7:0] pxb;
    pxa = 0; pxb = 0;
    for (int i = 0; i <= n; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks += 2;
        if (pa !== 21'(pxa * c)) begin failures++; $display("FAIL A %0d*%0d = %0d", pxa, c, pa); end
        if (pb !== 20'(pxb * c)) begin failures++; $display("FAIL B %0d*%0d = %0d", pxb, c, pb); end
      end
      if (i == 1) begin xa = -9'sd256; xb = -8'sd128; end
      else if (i == 2) begin xa = 9'sd255; xb = 8'sd127; end
      else begin xa = 9'($urandom); xb = 8'($urandom); end
      pxa = xa; pxb = xb;
    end
  endtask

  initial begin
    logic signed [11:0] consts [8];
    consts = '{12'sd0, 12'sd1, -12'sd1, 12'sd2047, -12'sd2048, 12'sd929, -12'sd333, 12'sd1024};
    load = 0; cst = 0; xa = 0; xb = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (consts[i]) begin
      load_const(consts[i]);
      stream(consts[i], 60);
    end
    for (int n = 0; n < 6; n++) begin
      logic signed [11:0] c;
      c = 12'($urandom);
      load_const(c);
      stream(c, 60);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
