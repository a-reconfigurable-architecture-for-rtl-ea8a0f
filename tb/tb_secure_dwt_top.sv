// tb_secure_dwt_top -- end-to-end test of the keyed transform on a reduced frame
// (64 x 64, 3 levels: 6 filter passes, 10 subbands, 78-bit key).
//
// Three frames: a random image under key A (orientations 0..7 over the subbands so all
// eight occur), the same image under a random key B, and a smooth ramp image under key A.
// Each frame's N*N output coefficients are compared with the testbench model (fixed-point
// 2-D transform with symmetric extension, then the re-oriented read-out). The test also
// checks that key B changes most coefficients, that done pulses once per frame, and counts
// each mechanism of the design, failing if one never happens: filter reconfiguration per
// pass, each decomposition level, symmetric extension at both line ends, low and high
// pass decimation writes, each of the eight orientations, and stalls of the pixel input.
module tb_secure_dwt_top;
  import pdwt_pkg::*;
  import pdwt_ref_pkg::*;
  localparam int N = 64, L = 3, KW = key_width(L), NSB = 3 * L + 1, NK = 2 * L;

  logic clk = 0, rst_n = 0;
  logic key_we, start, busy, done, pix_ready, pix_valid, coef_valid;
  logic [KW-1:0] key_in;
  logic [7:0] pix_data;
  logic [15:0] coef_data;
  int checks = 0, failures = 0;

  secure_dwt_top #(.N(N), .LEVELS(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_cfg, n_ext_lo, n_ext_hi, n_wr_lo, n_wr_hi, n_stall, n_done;
  int n_level [L];
  int n_orient [8];

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.f_cfg_start) n_cfg++;
    if (dut.u_ctrl.lb_re) begin
      if (dut.u_ctrl.cnt < 4) n_ext_lo++;
      if (int'(dut.u_ctrl.cnt) >= int'(dut.u_ctrl.size) + 4) n_ext_hi++;
      n_level[dut.u_ctrl.level]++;
    end
    if (dut.u_ctrl.f_out_valid && dut.u_ctrl.ocnt >= 8) begin
      if (dut.u_ctrl.k[0]) n_wr_hi++; else n_wr_lo++;
    end
    if (pix_ready && !pix_valid) n_stall++;
    if (int'(dut.u_ctrl.state) == 6) n_orient[dut.orient[dut.sb_idx]]++;
    if (done) n_done++;
  end

  // ---------------- one frame ----------------
  longint pix [];
  longint got [];

  task automatic run_frame(logic [KW-1:0] key, output int ndiff_out);
    int alpha [], orient [];
    int no, d0;
    alpha = new[NK];
    orient = new[NSB];
    for (int j = 0; j < NK; j++)  alpha[j]  = int'(key[8*j +: 8]);
    for (int s = 0; s < NSB; s++) orient[s] = int'(key[8*NK + 3*s +: 3]);
    got = new[N * N];
    d0 = n_done;
    @(negedge clk);
    key_we = 1; key_in = key;
    @(negedge clk);
    key_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    // pixels
    for (int i = 0; i < N * N; ) begin
      pix_valid = ($urandom_range(0, 9) != 0);
      pix_data  = 8'(pix[i]);
      @(posedge clk);
      if (pix_valid && pix_ready) i++;
      @(negedge clk);
    end
    pix_valid = 0;
    // coefficients
    no = 0;
    while (!done) begin
      @(posedge clk);
      #1;
      if (coef_valid) begin
        if (no < N * N) got[no] = longint'($signed(coef_data));
        no++;
      end
    end
    checks++;
    if (no != N * N) begin failures++; $display("FAIL %0d coefficients out", no); end
    // model
    img = new[N * N];
    for (int i = 0; i < N * N; i++) img[i] = pix[i];
    dwt2d(N, L, alpha, 16);
    ndiff_out = 0;
    for (int o = 0; o < N * N; o++) begin
      int sr, sc;
      void'(reorient(N, L, o / N, o % N, orient, sr, sc));
      checks++;
      if (got[o] != img[sr * N + sc]) begin
        failures++;
        if (ndiff_out < 10) $display("FAIL out %0d (%0d,%0d): got %0d expected %0d",
                                      o, o / N, o % N, got[o], img[sr * N + sc]);
        ndiff_out++;
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (n_done - d0 != 1 || busy) begin failures++; $display("FAIL done pulses %0d busy %0d", n_done - d0, busy); end
  endtask

  initial begin
    logic [KW-1:0] key_a, key_b;
    longint out_a [];
    int nd, ndiff;
    key_we = 0; start = 0; pix_valid = 0; pix_data = 0; key_in = 0;
    n_cfg = 0; n_ext_lo = 0; n_ext_hi = 0; n_wr_lo = 0; n_wr_hi = 0; n_stall = 0; n_done = 0;
    foreach (n_level[i]) n_level[i] = 0;
    foreach (n_orient[i]) n_orient[i] = 0;
    for (int j = 0; j < NK; j++)  key_a[8*j +: 8] = 8'($urandom);
    key_a[0 +: 8] = 8'd0;     // alpha = 1
    key_a[8 +: 8] = 8'd255;   // alpha close to 4
    for (int s = 0; s < NSB; s++) key_a[8*NK + 3*s +: 3] = 3'(s % 8);
    key_b = {$urandom, $urandom, $urandom};
    pix = new[N * N];
    for (int i = 0; i < N * N; i++) pix[i] = $urandom_range(0, 255);
    repeat (3) @(negedge clk);
    rst_n = 1;

    run_frame(key_a, nd);
    out_a = got;
    run_frame(key_b, nd);
    ndiff = 0;
    for (int o = 0; o < N * N; o++) if (got[o] != out_a[o]) ndiff++;
    checks++;
    if (ndiff < N * N / 2) begin failures++; $display("FAIL key B changed only %0d coefficients", ndiff); end
    for (int i = 0; i < N * N; i++) pix[i] = ((i / N) * 3 + (i % N) * 2) % 256;
    run_frame(key_a, nd);

    // mechanism coverage
    checks++;
    if (n_cfg != 3 * NK) begin failures++; $display("FAIL %0d reconfigurations", n_cfg); end
    for (int l = 0; l < L; l++) begin
      checks++;
      if (n_level[l] == 0) begin failures++; $display("FAIL level %0d never filtered", l); end
    end
    for (int o = 0; o < 8; o++) begin
      checks++;
      if (n_orient[o] == 0) begin failures++; $display("FAIL orientation %0d never used", o); end
    end
    checks += 5;
    if (n_ext_lo == 0 || n_ext_hi == 0) begin failures++; $display("FAIL no boundary extension"); end
    if (n_wr_lo == 0) begin failures++; $display("FAIL no low pass writes"); end
    if (n_wr_hi == 0) begin failures++; $display("FAIL no high pass writes"); end
    if (n_stall == 0) begin failures++; $display("FAIL no input stall"); end
    if (n_wr_lo != n_wr_hi) begin failures++; $display("FAIL %0d low vs %0d high writes", n_wr_lo, n_wr_hi); end
    $display("reconfigurations %0d, extension reads %0d/%0d, low/high writes %0d/%0d, input stalls %0d",
             n_cfg, n_ext_lo, n_ext_hi, n_wr_lo, n_wr_hi, n_stall);
    $display("level reads %0d %0d %0d", n_level[0], n_level[1], n_level[2]);
    $display("orientation use %p", n_orient);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
