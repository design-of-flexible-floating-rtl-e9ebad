// tb_error_correction: bytes keyed with num ^ timestamp, encoded, sent
// through a channel that flips 0..4 random bits, decoded and un-keyed.
module tb_error_correction;
  import tb_ref_pkg::*;
  import fam_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0, rx_valid = 0;
  logic [7:0]  in_data = '0;
  logic [39:0] num = '0, timestamp = '0;
  logic        tx_valid, dec_valid;
  logic [23:0] tx_codeword, rx_codeword = '0;
  logic [7:0]  decoded_bits, out;
  int checks = 0, failures = 0;

  error_correction dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      logic [7:0]  d, key;
      logic [23:0] e;
      int nerr;
      d = 8'($urandom);
      @(negedge clk);
      in_data   = d;
      num       = {$urandom, $urandom};
      timestamp = {$urandom, $urandom};
      key       = num[7:0] ^ timestamp[7:0];
      start = 1;
      @(negedge clk);
      start = 0;
      num = '0; timestamp = '0; in_data = '0;   // inputs need only be valid with start
      while (!tx_valid) begin @(posedge clk); #1; end
      check("tx", tx_codeword, golay24_ref({4'h0, d ^ key}));
      nerr = t % 5;
      e = '0;
      while ($countones(e) < nerr) e[$urandom % 24] = 1'b1;
      @(negedge clk);
      rx_codeword = tx_codeword ^ e;
      rx_valid = 1;
      @(negedge clk);
      rx_valid = 0;
      while (!dec_valid) begin @(posedge clk); #1; end
      if (nerr <= 3) begin
        check("decoded", decoded_bits, d);
        check("count", out[2:0], nerr);
        check("status", out[5:4], nerr == 0 ? DEC_CLEAN : DEC_CORRECTED);
        check("pad", out[3], 0);
      end else begin
        check("status4", out[5:4], DEC_UNCORRECTED);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
