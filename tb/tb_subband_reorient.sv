// tb_subband_reorient -- self-checking test of the subband re-orientation map for a
// 64 x 64 frame with 3 levels (10 subbands). For several keys, one of which gives the
// subbands all eight orientations, every output position is mapped and compared with the
// testbench's own mapping; the map is also checked to be a permutation of the frame.
module tb_subband_reorient;
  import pdwt_pkg::*;
  import pdwt_ref_pkg::*;
  localparam int N = 64, L = 3, NSB = 3 * L + 1;
  logic [5:0] r, c, src_r, src_c;
  orient_t orient [NSB];
  logic [3:0] sb_idx;
  int checks = 0, failures = 0;

  subband_reorient #(.N(N), .LEVELS(L)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ok [];
    ok = new[NSB];
    for (int key = 0; key < 6; key++) begin
      bit seen [N*N];
      for (int s = 0; s < NSB; s++) begin
        ok[s] = (key == 0) ? s % 8 : (key == 1) ? 7 - (s % 8) : $urandom_range(0, 7);
        orient[s] = orient_t'(ok[s]);
      end
      for (int i = 0; i < N * N; i++) seen[i] = 0;
      for (int rr = 0; rr < N; rr++) begin
        for (int cc = 0; cc < N; cc++) begin
          int er, ec, esb;
          r = 6'(rr); c = 6'(cc);
          #1;
          esb = reorient(N, L, rr, cc, ok, er, ec);
          checks++;
          if (src_r != 6'(er) || src_c != 6'(ec) || sb_idx != 4'(esb)) begin
            failures++;
            $display("FAIL (%0d,%0d): got (%0d,%0d) sb %0d expected (%0d,%0d) sb %0d",
                     rr, cc, src_r, src_c, sb_idx, er, ec, esb);
          end
          seen[{src_r, src_c}] = 1;
        end
      end
      checks++;
      for (int i = 0; i < N * N; i++) if (!seen[i]) begin
        failures++; $display("FAIL key %0d: address %0d never read", key, i); break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
