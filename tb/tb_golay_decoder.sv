// tb_golay_decoder: random codewords with 0..4 bit errors at random
// positions, then every error pattern of weight 1..4 over the 24 bits;
// up to 3 errors must be corrected and counted, 4 must be flagged.
// Also checks the worst-case latency bound.
module tb_golay_decoder;
  import tb_ref_pkg::*;
  import fam_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [23:0] rx = '0;
  logic        busy, done;
  logic [11:0] msg;
  logic [23:0] corrected;
  logic [2:0]  n_err;
  dec_status_e status;
  int checks = 0, failures = 0;
  int cycle = 0;
  int max_lat = 0;
  int seen [5];

  golay_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run(logic [11:0] m, int nerr);
    logic [23:0] e;
    e = '0;
    while ($countones(e) < nerr) e[$urandom % 24] = 1'b1;
    run_pattern(m, e);
  endtask

  // Decode codeword(m) ^ e and check the result against the weight of e.
  task automatic run_pattern(logic [11:0] m, logic [23:0] e);
    logic [23:0] c;
    int t0, nerr;
    c = golay24_ref(m);
    nerr = $countones(e);
    @(negedge clk);
    rx = c ^ e;
    start = 1;
    @(posedge clk);
    #1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) begin @(posedge clk); #1; end
    if (cycle - t0 > max_lat) max_lat = cycle - t0;
    seen[nerr]++;
    if (nerr <= 3) begin
      check("corrected", corrected, c);
      check("msg", msg, m);
      check("n_err", n_err, nerr);
      check("status", status, nerr == 0 ? DEC_CLEAN : DEC_CORRECTED);
    end else begin
      check("status4", status, DEC_UNCORRECTED);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // an error on the parity bit alone, and on the top message bit
    run(12'h456, 0);
    for (int t = 0; t < 3000; t++) run(12'($urandom), t % 5);
    // every error pattern of weight 1..4 over the 24 bits (2324 + 10626)
    for (int a = 0; a < 24; a++) begin
      run_pattern(12'($urandom), 24'(1) << a);
      for (int b = a + 1; b < 24; b++) begin
        run_pattern(12'($urandom), (24'(1) << a) | (24'(1) << b));
        for (int c = b + 1; c < 24; c++) begin
          run_pattern(12'($urandom), (24'(1) << a) | (24'(1) << b) | (24'(1) << c));
          for (int d = c + 1; d < 24; d++)
            run_pattern(12'($urandom), (24'(1) << a) | (24'(1) << b) | (24'(1) << c) | (24'(1) << d));
        end
      end
    end
    checks++;
    if (max_lat > 12 + 1 + 23 + 2) begin
      failures++;
      $display("FAIL latency %0d", max_lat);
    end
    $display("max latency %0d cycles; words with 0..4 errors: %0d %0d %0d %0d %0d",
             max_lat, seen[0], seen[1], seen[2], seen[3], seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
