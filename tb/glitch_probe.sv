// glitch_probe: simulation-only monitor of the coarse switch strength as the
// power stage sees it when the High SR word h(t) reaches the switches HDLY ns
// later than the Medium SR word m(t) (unmatched driver delays).
//
// It forms the seen coarse strength L*m + L*M*h_delayed and, for every clock
// cycle, compares it with the settled value before the edge: a dip below it
// during an up-shift, or a rise above it during a down-shift, is a glitch.
// It reports the largest glitch in units of one Medium step (L counts) and
// the number of clock cycles in which the settled value moved.
module glitch_probe #(
  parameter int unsigned L    = 8,
  parameter int unsigned M    = 4,
  parameter int unsigned H    = 16,
  parameter int unsigned HDLY = 20
) (
  input logic         clk,
  input logic [M-1:0] m_word,
  input logic [H-1:0] h_word,
  input logic         going_up,   // direction of the ramp being measured
  input logic         clear,      // restart the statistics
  output int          max_glitch_steps,
  output int          moves
);
  timeunit 1ns;
  timeprecision 100ps;

  logic [H-1:0] h_del;
  assign #(HDLY) h_del = h_word;

  int seen, settled, worst;

  always_comb seen = int'(L) * ($countones(m_word) + int'(M) * $countones(h_del));

  always @(negedge clk) settled = seen;   // both words have settled by now

  always @(seen) if (!clear) begin
    if (going_up && seen < settled) begin
      if ((settled - seen) / int'(L) > worst) worst = (settled - seen) / int'(L);
    end else if (!going_up && seen > settled) begin
      if ((seen - settled) / int'(L) > worst) worst = (seen - settled) / int'(L);
    end
  end

  always @(posedge clk) begin
    #(HDLY + 5);
    if (clear) begin
      worst = 0;
      moves = 0;
    end else if (seen != settled) moves++;
  end

  assign max_glitch_steps = worst;

  initial begin worst = 0; moves = 0; settled = 0; end
endmodule
