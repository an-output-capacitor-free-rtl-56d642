// quant_cmp: behavioural model of the clocked 1b quantization comparator
// (CMP) of the fine loop.
//
// The real part is an analog latched comparator; this model registers, at
// every rising clock edge, Up = V_OUT below V_REF, with V_OUT and V_REF given
// as numbers (100 uV per LSB). Up steers the Low SR one count per cycle. The
// one-cycle latency and the numeric inputs are this model's choices; an
// input offset can be set with OFFSET (V_OUT is compared with V_REF+OFFSET).
module quant_cmp
  import dldo_pkg::*;
#(
  parameter int OFFSET = 0   // input-referred offset, LSBs
) (
  input  logic  clk,
  input  logic  rst_n,
  input  volt_t vout,
  input  volt_t vref,
  output logic  up
);

  logic signed [17:0] thr;
  assign thr = $signed({2'b00, vref}) + 18'(OFFSET);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) up <= 1'b0;
    else        up <= $signed({2'b00, vout}) < thr;
  end

endmodule
