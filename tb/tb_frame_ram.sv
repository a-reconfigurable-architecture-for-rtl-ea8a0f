// tb_frame_ram -- self-checking test of the two-port RAM: random writes and reads against
// a shadow copy, one-clock read latency, and old data returned by a read of the address
// being written in the same cycle.
module tb_frame_ram;
  localparam int D = 64, W = 16;
  logic clk = 0;
  logic wr_en, rd_en;
  logic [5:0] wr_addr, rd_addr;
  logic [W-1:0] wr_data, rd_data;
  logic [W-1:0] shadow [D];
  int checks = 0, failures = 0;

  frame_ram #(.DEPTH(D), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_d;
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(a); wr_data = W'($urandom); shadow[a] = wr_data;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_addr = 6'($urandom);
      wr_data = W'($urandom);
      rd_en = 1;
      rd_addr = (n % 5 == 0) ? wr_addr : 6'($urandom);
      exp_d = shadow[rd_addr];            // value before this cycle's write
      if (wr_en) shadow[wr_addr] = wr_data;
      @(negedge clk);
      wr_en = 0; rd_en = 0;
      checks++;
      if (rd_data !== exp_d) begin
        failures++; $display("FAIL read %0d: got %h expected %h", rd_addr, rd_data, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
