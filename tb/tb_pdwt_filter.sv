// tb_pdwt_filter -- self-checking test of the one-dimensional parameterized DWT filter.
//
// For several alpha codes (both ends of the range and random ones) the filter is
// reconfigured, the reconfiguration time is checked (cfg_busy high for 52 cycles), and a
// random signed 8-bit stream with occasional gaps in in_valid is fed, including full-scale
// runs. Every out_valid result is compared with the 9-tap low pass and 7-tap high pass of
// the testbench model on the last nine accepted samples, and its latency is checked to be
// two clocks after the edge that took the newest sample.
module tb_pdwt_filter;
  import pdwt_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_start, cfg_busy, in_valid, out_valid;
  logic [7:0] cfg_alpha;
  logic signed [7:0] in_data;
  logic signed [9:0] out_lo, out_hi;
  int checks = 0, failures = 0;
  int cyc = 0;

  pdwt_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [$];     // accepted samples, newest last
  int     hcyc [$];     // cycle at which each was accepted
  int     klo [5], khi [4];
  int     nout, nexp;

  // accept samples at the rising edge; cyc counts rising edges
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      hist.push_back(longint'(in_data));
      hcyc.push_back(cyc);
    end
    cyc++;
  end

  // check outputs
  always @(negedge clk) if (rst_n && out_valid) begin
    longint win [9];
    int n;
    // newest sample of this window was taken two edges before the one that raised
    // out_valid, i.e. at edge cyc-3
    n = 0;
    for (int t = hist.size() - 1; t >= 0; t--) if (hcyc[t] == cyc - 3) begin n = t + 1; break; end
    if (n == 0 && hist.size() >= 9) begin
      checks++; failures++; $display("FAIL out_valid with no sample two clocks earlier");
    end
    if (n >= 9) begin
      for (int t = 0; t < 9; t++) win[t] = hist[n - 9 + t];
      checks += 2;
      if (out_lo !== 10'(fir_lo(win, klo, 10))) begin
        failures++; $display("FAIL lo %0d expected %0d", out_lo, fir_lo(win, klo, 10));
      end
      if (out_hi !== 10'(fir_hi(win, khi, 10))) begin
        failures++; $display("FAIL hi %0d expected %0d", out_hi, fir_hi(win, khi, 10));
      end
      nout++;
    end
  end

  task automatic configure(int code);
    int nb;
    @(negedge clk);
    cfg_start = 1; cfg_alpha = 8'(code);
    for (int i = 0; i < 5; i++) klo[i] = coef_int(code, 0, i);
    for (int i = 0; i < 4; i++) khi[i] = coef_int(code, 1, i);
    nb = 0;
    @(negedge clk);
    cfg_start = 0;
    nb = 1;
    while (cfg_busy) begin @(negedge clk); nb++; end
    checks++;
    if (nb != 52) begin failures++; $display("FAIL cfg_busy for %0d cycles", nb); end
    hist.delete(); hcyc.delete();
  endtask

  task automatic feed(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      if ((i / 16) % 4 == 3)      in_data = (i % 2) ? 8'sd127 : -8'sd128;
      else if ((i / 16) % 4 == 2) in_data = 8'sd127;
      else                        in_data = 8'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    nexp += hist.size() - 8;
  endtask

  initial begin
    int codes [6];
    codes = '{0, 255, 128, 17, 200, 85};
    cfg_start = 0; cfg_alpha = 0; in_valid = 0; in_data = 0; nout = 0; nexp = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (codes[i]) begin
      configure(codes[i]);
      feed(200);
    end
    checks++;
    // every accepted sample from the ninth on must have produced exactly one result
    if (nout != nexp || nout < 900) begin
      failures++; $display("FAIL %0d results checked, %0d expected", nout, nexp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
