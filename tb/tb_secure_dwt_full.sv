// tb_secure_dwt_full -- one complete frame through the transform at its full size:
// 512 x 512 pixels, 6 levels, 12 filter passes, 19 subbands, 153-bit key, every parameter
// at its default. A random 153-bit key and a textured random image are used; all 262144
// output coefficients are compared with the testbench model, the number of filter
// reconfigurations (12) and of done pulses (1) is checked, and the frame's cycle count is
// checked against the schedule's formula 2N^2 + sum over levels of 2S(2S+14) + 53 per
// reconfiguration + 2 (1,950,910 clocks).
module tb_secure_dwt_full;
  import pdwt_pkg::*;
  import pdwt_ref_pkg::*;
  localparam int N = 512, L = 6, KW = key_width(L), NSB = 3 * L + 1, NK = 2 * L;

  logic clk = 0, rst_n = 0;
  logic key_we, start, busy, done, pix_ready, pix_valid, coef_valid;
  logic [KW-1:0] key_in;
  logic [7:0] pix_data;
  logic [15:0] coef_data;
  int checks = 0, failures = 0;

  secure_dwt_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_cfg = 0, n_done = 0, ncyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.f_cfg_start) n_cfg++;
    if (done) n_done++;
    if (busy) ncyc++;
  end

  initial begin
    logic [KW-1:0] key;
    int alpha [], orient [];
    longint pix [], got [];
    int no, nbad;
    key_we = 0; start = 0; pix_valid = 0; pix_data = 0; key_in = 0;
    for (int i = 0; i < KW; i += 32) key[i +: 32] = $urandom;   // upper bits fall off
    alpha = new[NK];
    orient = new[NSB];
    for (int j = 0; j < NK; j++)  alpha[j]  = int'(key[8*j +: 8]);
    for (int s = 0; s < NSB; s++) orient[s] = int'(key[8*NK + 3*s +: 3]);
    pix = new[N * N];
    got = new[N * N];
    for (int i = 0; i < N * N; i++)
      pix[i] = ((i / N) + 2 * (i % N) + $urandom_range(0, 40)) % 256;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    key_we = 1; key_in = key;
    @(negedge clk);
    key_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    pix_valid = 1;
    for (int i = 0; i < N * N; ) begin
      pix_data = 8'(pix[i]);
      @(posedge clk);
      if (pix_ready) i++;
      @(negedge clk);
    end
    pix_valid = 0;
    no = 0;
    while (!done) begin
      @(posedge clk);
      #1;
      if (coef_valid) begin
        if (no < N * N) got[no] = longint'($signed(coef_data));
        no++;
      end
    end
    @(posedge clk);
    #1;
    checks += 3;
    if (no != N * N) begin failures++; $display("FAIL %0d coefficients out", no); end
    if (n_cfg != NK) begin failures++; $display("FAIL %0d reconfigurations", n_cfg); end
    if (n_done != 1 || busy) begin failures++; $display("FAIL done/busy"); end
    img = new[N * N];
    for (int i = 0; i < N * N; i++) img[i] = pix[i];
    dwt2d(N, L, alpha, 16);
    nbad = 0;
    for (int o = 0; o < N * N; o++) begin
      int sr, sc;
      void'(reorient(N, L, o / N, o % N, orient, sr, sc));
      checks++;
      if (got[o] != img[sr * N + sc]) begin
        failures++;
        if (nbad < 10) $display("FAIL out %0d: got %0d expected %0d", o, got[o], img[sr * N + sc]);
        nbad++;
      end
    end
    // schedule: load and read-out N*N each, 2S+14 per line of every pass, 53 per
    // filter reconfiguration, 2 for start and done
    begin
      int exp_cyc;
      exp_cyc = 2 * N * N + 2 * L * 53 + 2;
      for (int l = 0; l < L; l++) exp_cyc += 2 * (N >> l) * (2 * (N >> l) + 14);
      checks++;
      if (ncyc != exp_cyc) begin failures++; $display("FAIL %0d cycles, expected %0d", ncyc, exp_cyc); end
    end
    $display("frame of %0dx%0d, %0d levels: %0d busy cycles", N, N, L, ncyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
