// tb_crc_divider: remainders and cycle counts of the leading-one divider,
// including the 456h example, against a bit-serial CRC register and a
// long-division count.
module tb_crc_divider;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [22:0] dividend = '0;
  logic        busy, done;
  logic [10:0] remainder;
  int checks = 0, failures = 0;
  int cycle = 0;

  crc_divider dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run(logic [22:0] d, bit is_msg);
    int t0, lat;
    @(negedge clk);
    dividend = d;
    start = 1;
    @(posedge clk);
    #1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) begin @(posedge clk); #1; end
    lat = cycle - t0;
    check("remainder", remainder, is_msg ? crc_ref(d[22:11]) : rem23_ref(d));
    check("cycles", lat, subs_ref(d) + 1);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // worked example: message 456h, P(x) = AE3h
    run({12'h456, 11'h0}, 1);
    check("456h example", remainder, 11'h5EA);
    run('0, 0);
    run({12'hFFF, 11'h0}, 1);
    for (int t = 0; t < 300; t++) run({12'($urandom), 11'h0}, 1);
    for (int t = 0; t < 300; t++) run(23'($urandom), 0);
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
