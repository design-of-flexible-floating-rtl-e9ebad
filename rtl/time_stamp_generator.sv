// time_stamp_generator: coarse counter plus tapped-delay-line fine code.
//
// A free-running COARSE_W-bit counter counts clock periods; with 16 bits
// at 250 MHz it wraps after 2^16 * 4 ns = 262.144 us. The delay line
// itself (CELLS carry-chain cells the hit runs through) is a physical
// structure outside this module: its outputs arrive on taps, already a
// thermometer-like code. When hit is high, the D flip-flops capture the
// taps together with the coarse count. On the next cycle a ones counter
// converts the captured taps into the fine count (a ones count tolerates
// bubbles in the code) and the time stamp is formed as
//   timestamp = coarse * CELLS + fine
// i.e. the coarse count in units of delay cells plus the fine count.
// CELLS = 192, the 250 MHz clock, the 262.14 us range and the 40-bit
// output follow the source; the ones-counter encoder and the exact
// combination formula are this design's choices.
//
// Timing: hit sampled on one edge, timestamp and ts_valid (one-cycle
// pulse) on the next.
module time_stamp_generator #(
  parameter int unsigned CELLS    = 192,
  parameter int unsigned COARSE_W = 16,
  parameter int unsigned TS_W     = 40,
  localparam int unsigned FINE_W  = $clog2(CELLS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hit,
  input  logic [CELLS-1:0] taps,
  output logic             ts_valid,
  output logic [TS_W-1:0]  timestamp,
  output logic [COARSE_W-1:0] coarse
);
  logic [CELLS-1:0]    taps_q;
  logic [COARSE_W-1:0] coarse_q;
  logic                hit_q;
  logic [FINE_W-1:0]   fine;

  assign fine = FINE_W'($countones(taps_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coarse    <= '0;
      taps_q    <= '0;
      coarse_q  <= '0;
      hit_q     <= 1'b0;
      ts_valid  <= 1'b0;
      timestamp <= '0;
    end else begin
      coarse <= coarse + 1'b1;
      hit_q  <= hit;
      if (hit) begin
        taps_q   <= taps;
        coarse_q <= coarse;
      end
      ts_valid <= hit_q;
      if (hit_q)
        timestamp <= TS_W'(coarse_q) * TS_W'(CELLS) + TS_W'(fine);
    end
  end
endmodule
