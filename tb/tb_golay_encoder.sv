// tb_golay_encoder: every codeword against the reference encoding, its
// latency, and the code's minimum distance seen on random pairs.
module tb_golay_encoder;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [11:0] msg = '0;
  logic        busy, valid;
  logic [23:0] codeword;
  int checks = 0, failures = 0;
  int cycle = 0;
  int min_dist = 99;
  logic [23:0] prev = '0;

  golay_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run(logic [11:0] m, bit have_prev);
    int t0;
    @(negedge clk);
    msg = m;
    start = 1;
    @(posedge clk);
    #1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    check("busy", busy, 1);
    while (!valid) begin @(posedge clk); #1; end
    check("codeword", codeword, golay24_ref(m));
    check("latency", cycle - t0, subs_ref({m, 11'h0}) + 4);
    check("even weight", $countones(codeword) % 2, 0);
    if (have_prev && prev != codeword && $countones(prev ^ codeword) < min_dist)
      min_dist = $countones(prev ^ codeword);
    prev = codeword;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(12'h456, 0);
    check("456h codeword", codeword, {12'h456, 11'h5EA, 1'b0});
    for (int m = 0; m < 4096; m += 3) run(12'(m), 1);
    for (int t = 0; t < 500; t++) run(12'($urandom), 1);
    checks++;
    if (min_dist < 8) begin
      failures++;
      $display("FAIL minimum distance %0d", min_dist);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
