// low_sr: fine-tuning shift register of the tri-loop controller.
//
// The L-bit thermometer word l(t)<1:L> drives the L unit (1x) power switches.
// While `en` is high (Fine_en; the section's clock is gated off otherwise) the
// word moves one count per clock in the direction of the 1b comparator: `up`
// shifts a one in, otherwise a one is shifted out. When it is already full
// and must go up, it asks the Medium SR for one step (carry.carry, carry.up=1)
// and restarts at LOW_CARRY_IN ones, so the total strength grows by exactly
// one count; when empty and going down it borrows one Medium step
// (carry.up=0) and restarts at LOW_CARRY_OUT ones. If the upper sections are
// saturated (`next_full` / `next_empty`) the word simply stays.
//
// Timing: the carry is combinational from the current word, `en` and `up`,
// and is taken by the Medium SR at the same clock edge at which this word
// reloads. The Carry1/In1 connection follows the architecture; the reload
// values (a carry without any jump of the total) and the use of a clock
// enable in place of a gated clock are this design's choices.
module low_sr
  import dldo_pkg::*;
#(
  parameter int unsigned L             = L_DEF,
  parameter int unsigned LOW_CARRY_IN  = 1,
  parameter int unsigned LOW_CARRY_OUT = L - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,          // Fine_en
  input  logic         up,          // 1b comparator: V_OUT below V_REF
  input  logic         next_full,   // Medium and High sections all on
  input  logic         next_empty,  // Medium and High sections all off
  output logic [L-1:0] word,        // l(t)<1:L>, bit 0 = l<1>
  output carry_t       carry        // Carry1 / In1
);

  logic full, empty;
  assign full  = word[L-1];
  assign empty = !word[0];

  always_comb begin
    carry.up    = up;
    carry.carry = en && (up ? (full && !next_full) : (empty && !next_empty));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0;
    end else if (en) begin
      if (up) begin
        if (!full)          word <= {word[L-2:0], 1'b1};
        else if (carry.carry) word <= L'(therm(LOW_CARRY_IN));
      end else begin
        if (!empty)         word <= {1'b0, word[L-1:1]};
        else if (carry.carry) word <= L'(therm(LOW_CARRY_OUT));
      end
    end
  end

  // A thermometer word never has a one above a zero.
  assert property (@(posedge clk) disable iff (!rst_n) ((word + 1'b1) & word) == '0)
    else $error("low_sr: word %b is not a thermometer code", word);

endmodule
