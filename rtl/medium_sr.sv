// medium_sr: coarse-tuning shift register with glitch-reducing carry.
//
// The M-bit thermometer word m(t)<1:M> drives M power switches of weight L.
// The section is clocked (here: enabled) when Coarse_en is high, and then
// moves one step - L counts of the total - per clock in the direction `dz_up`
// of the dead-zone comparator; outside coarse mode it moves one step on a
// Carry1 from the Low SR, in the direction In1.
//
// When a step up finds the word full, the High SR is stepped up (Carry2,
// In2=1) and m(t) reloads to CARRY_IN_M ones; when a step down finds it
// empty, the High SR is stepped down (In2=0) and m(t) reloads to CARRY_OUT_M
// ones. With the defaults M=4, CARRY_IN_M=3, CARRY_OUT_M=1 this is the
// glitch-reduction scheme: on carry-in the coarse word h*M+m goes 4 -> 3 -> 7
// when m(t) settles before h(t), a transient error of one step instead of
// three, and consecutive up-shifts ramp faster (+1, +3, +1, +3 ...). The
// plain carry is CARRY_IN_M=1, CARRY_OUT_M=M-1. Saturation of the High SR
// (`next_full`, `next_empty`) holds the word. These reload rules are from the
// design; the priority of Coarse_en over Carry1 is this implementation's.
//
// Timing: Carry2 is combinational from the word and the step request and is
// taken by the High SR at the same clock edge. `full`/`empty` report the
// Medium and High sections together, for the Low SR.
module medium_sr
  import dldo_pkg::*;
#(
  parameter int unsigned M           = M_DEF,
  parameter int unsigned CARRY_IN_M  = M - 1,
  parameter int unsigned CARRY_OUT_M = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         coarse_en,   // Coarse_en from the dead-zone comparator
  input  logic         dz_up,       // Up from the dead-zone comparator
  input  carry_t       c_in,        // Carry1 / In1 from the Low SR
  input  logic         next_full,   // High SR all on
  input  logic         next_empty,  // High SR all off
  output logic [M-1:0] word,        // m(t)<1:M>
  output carry_t       c_out,       // Carry2 / In2 to the High SR
  output logic         full,        // Medium and High all on
  output logic         empty        // Medium and High all off
);

  logic step, dir, w_full, w_empty;
  assign w_full  = word[M-1];
  assign w_empty = !word[0];
  assign full    = w_full && next_full;
  assign empty   = w_empty && next_empty;

  always_comb begin
    step        = coarse_en || c_in.carry;
    dir         = coarse_en ? dz_up : c_in.up;
    c_out.up    = dir;
    c_out.carry = step && (dir ? (w_full && !next_full) : (w_empty && !next_empty));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0;
    end else if (step) begin
      if (dir) begin
        if (!w_full)          word <= {word[M-2:0], 1'b1};
        else if (c_out.carry) word <= M'(therm(CARRY_IN_M));
      end else begin
        if (!w_empty)         word <= {1'b0, word[M-1:1]};
        else if (c_out.carry) word <= M'(therm(CARRY_OUT_M));
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ((word + 1'b1) & word) == '0)
    else $error("medium_sr: word %b is not a thermometer code", word);

endmodule
