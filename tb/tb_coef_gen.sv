// tb_coef_gen -- self-checking test of the alpha-to-constants generator.
//
// For all 256 alpha codes: start, check that done arrives after exactly 34 busy cycles,
// compare the nine constants with the fixed-point recipe computed by the testbench with
// multiplications and divisions, and check that each lies within 0.51 LSB of the exact
// real-valued expression.
module tb_coef_gen;
  import pdwt_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [7:0] alpha_code;
  logic signed [11:0] k_lo [5];
  logic signed [11:0] k_hi [4];
  int checks = 0, failures = 0;

  coef_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; alpha_code = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int code = 0; code < 256; code++) begin
      int cyc;
      @(negedge clk);
      start = 1; alpha_code = 8'(code);
      @(negedge clk);
      start = 0; alpha_code = 8'($urandom);
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 35) begin failures++; $display("FAIL code %0d: %0d cycles to done", code, cyc); end
      for (int i = 0; i < 5; i++) begin
        real e;
        checks += 2;
        if (k_lo[i] != coef_int(code, 0, i)) begin
          failures++; $display("FAIL code %0d K%0d = %0d expected %0d", code, i, k_lo[i], coef_int(code, 0, i));
        end
        e = real'(k_lo[i]) - coef_real(code, 0, i) * 1024.0;
        if (e > 0.51 || e < -0.51) begin failures++; $display("FAIL code %0d K%0d off by %f", code, i, e); end
      end
      for (int i = 0; i < 4; i++) begin
        real e;
        checks += 2;
        if (k_hi[i] != coef_int(code, 1, i)) begin
          failures++; $display("FAIL code %0d Kh%0d = %0d expected %0d", code, i, k_hi[i], coef_int(code, 1, i));
        end
        e = real'(k_hi[i]) - coef_real(code, 1, i) * 1024.0;
        if (e > 0.51 || e < -0.51) begin failures++; $display("FAIL code %0d Kh%0d off by %f", code, i, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
