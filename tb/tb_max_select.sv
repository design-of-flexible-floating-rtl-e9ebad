// tb_max_select: largest of six values, its position, the tie rule under
// p, and the one-edge output delay.
module tb_max_select;
  logic        clk = 0, rst_n = 0, ld = 0, p = 0;
  logic [11:0] r1 = 0, r2 = 0, r3 = 0, r4 = 0, r6 = 0, r8 = 0;
  logic        valid;
  logic [11:0] r3_out;
  logic [2:0]  o;
  logic [3:0]  pe;
  int checks = 0, failures = 0;

  max_select dut (.*);

  always #5 clk = ~clk;

  task automatic run(logic [11:0] v [6], logic pri);
    logic [11:0] best;
    int bi;
    @(negedge clk);
    {r1, r2, r3, r4, r6, r8} = {v[0], v[1], v[2], v[3], v[4], v[5]};
    p  = pri;
    ld = 1;
    @(negedge clk);
    ld = 0;
    checks++;
    if (valid) begin failures++; $display("FAIL valid too early"); end
    @(negedge clk);
    best = 0;
    bi = -1;
    // expected: largest value; among equal ones the first (p=0) or last (p=1)
    // in the order of the pairing tree (R1,R2) (R3,R4) (R6,R8)
    for (int i = 0; i < 6; i++) if (bi < 0 || v[i] > best) begin best = v[i]; bi = i; end
    if (pri) for (int i = 0; i < 6; i++) if (v[i] == best) bi = i;
    checks++;
    if (!valid || r3_out != best || o != 3'(bi) || pe != 4'($clog2(int'(best) + 1))) begin
      failures++;
      $display("FAIL p=%0b got %h/%0d/%0d expected %h/%0d", pri, r3_out, o, pe, best, bi);
    end
  endtask

  initial begin
    logic [11:0] v [6];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 6; i++) v[i] = (t % 2) ? 12'($urandom % 4) : 12'($urandom);
      run(v, 1'(t / 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
