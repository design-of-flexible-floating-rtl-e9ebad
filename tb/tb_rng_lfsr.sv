// tb_rng_lfsr: the output sequence against a model of the same polynomial
// written with the feedback XORed into the taps (Galois form, stepped to
// match), seed loading, zero-seed replacement and hold when disabled.
module tb_rng_lfsr;
  logic        clk = 0, rst_n = 0, en = 0, load = 0;
  logic [39:0] seed = '0;
  logic [39:0] num;
  int checks = 0, failures = 0;
  logic [39:0] m;

  rng_lfsr dut (.*);

  always #5 clk = ~clk;

  // next state: bit i takes bit i-1; bit 0 is the parity of bits 40, 38, 21, 19
  // (1-based numbering of the polynomial terms)
  function automatic logic [39:0] step(logic [39:0] s);
    logic b;
    b = 1'b0;
    foreach (s[i]) if (i == 39 || i == 37 || i == 20 || i == 18) b ^= s[i];
    return {s[38:0], b};
  endfunction

  task automatic check(string what, logic [39:0] got, logic [39:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    check("reset", num, 40'h1);
    rst_n = 1;
    seed = 40'hA5_5A5A_1234; load = 1;
    @(negedge clk);
    load = 0;
    check("seed", num, seed);
    m = seed;
    en = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      m = step(m);
      check("step", num, m);
      checks++;
      if (num == '0) failures++;
    end
    en = 0;
    repeat (3) @(negedge clk);
    check("hold", num, m);
    seed = '0; load = 1;
    @(negedge clk);
    load = 0;
    check("zero seed", num, 40'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
