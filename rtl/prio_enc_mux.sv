// prio_enc_mux: priority encoder followed by an N:1 multiplexer.
//
// Request lines w[N-1:0] stand for W1..WN; the highest-numbered asserted
// line wins. Its number (1..N) is given on o[3:0], with 0 meaning no line
// is asserted. The same code selects S<o> from the candidates s[] (s[0] is
// S1); when no line is asserted the output is zero. The N=12 form serves
// both the check-bit generator and the syndrome division (a 12:1 mux over
// the shifted divisors); N=11 gives the W2..W12 / 11:1 variant. That the
// highest-numbered line has priority is this design's choice.
// Purely combinational.
module prio_enc_mux #(
  parameter int unsigned N = 12,   // request lines (at most 15)
  parameter int unsigned W = 23    // width of each candidate
) (
  input  logic [N-1:0] w,
  input  logic [W-1:0] s [N],
  output logic [3:0]   o,
  output logic [W-1:0] y
);
  always_comb begin
    o = 4'd0;
    for (int i = 0; i < N; i++)
      if (w[i]) o = 4'(i + 1);
  end

  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      if (o == 4'(i + 1)) y = s[i];
  end
endmodule
