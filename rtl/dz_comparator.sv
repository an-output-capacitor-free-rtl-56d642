// dz_comparator: behavioural model of the clocked dead-zone (window)
// comparator.
//
// The real part is an analog clocked comparator pair; this model takes V_OUT
// and V_REF as numbers (100 uV per LSB) and, at every rising clock edge,
// registers Coarse_en = V_OUT outside V_REF +/- DZ_HALF and Up = V_OUT below
// V_REF. Coarse_en starts coarse tuning and Up gives its direction. The
// dead-zone behaviour is the design's; the width of the zone (20 mV half
// width by default), the one-cycle latency and the numeric inputs are this
// model's choices.
module dz_comparator
  import dldo_pkg::*;
#(
  parameter int unsigned DZ_HALF = 200   // half width of the dead zone, LSBs
) (
  input  logic  clk,
  input  logic  rst_n,
  input  volt_t vout,
  input  volt_t vref,
  output logic  coarse_en,
  output logic  up
);

  logic [16:0] lo_sum, hi_sum;
  assign lo_sum = {1'b0, vout} + 17'(DZ_HALF);   // V_OUT + DZ/2
  assign hi_sum = {1'b0, vref} + 17'(DZ_HALF);   // V_REF + DZ/2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coarse_en <= 1'b0;
      up        <= 1'b0;
    end else begin
      coarse_en <= (lo_sum < {1'b0, vref}) || ({1'b0, vout} > hi_sum);
      up        <= vout < vref;
    end
  end

endmodule
