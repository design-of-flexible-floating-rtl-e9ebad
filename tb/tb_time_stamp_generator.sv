// tb_time_stamp_generator: hits at random cycles with random fine codes
// (some with bubbles); the time stamp must equal coarse * 192 + ones.
// Also runs past the 16-bit coarse wrap.
module tb_time_stamp_generator;
  localparam int CELLS = 192;
  logic             clk = 0, rst_n = 0, hit = 0;
  logic [CELLS-1:0] taps = '0;
  logic             ts_valid;
  logic [39:0]      timestamp;
  logic [15:0]      coarse;
  int checks = 0, failures = 0;
  longint edges = 0;         // edges since reset released
  int wraps = 0;

  time_stamp_generator dut (.*);

  always #2 clk = ~clk;      // 250 MHz
  always @(posedge clk) if (rst_n) edges++;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int gap, n;
      longint c_at_hit;
      gap = (t % 50 == 49) ? 70000 : 1 + int'($urandom % 300);
      repeat (gap) @(negedge clk);
      n = int'($urandom % (CELLS + 1));
      taps = '0;
      for (int i = 0; i < n; i++) taps[i] = 1'b1;
      if (t % 3 == 0 && n > 2 && n < CELLS) begin   // a bubble
        taps[n-2] = 1'b0;
        taps[n]   = 1'b1;
      end
      hit = 1;
      c_at_hit = edges % 65536;    // coarse counter value seen by this edge
      @(negedge clk);
      hit = 0;
      taps = '0;
      @(negedge clk);
      checks++;
      if (!ts_valid || timestamp != 40'(c_at_hit * CELLS + n)) begin
        failures++;
        if (failures < 10)
          $display("FAIL ts=%0d expected %0d", timestamp, c_at_hit * CELLS + n);
      end
    end
    wraps = int'(edges / 65536);
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL coarse never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
