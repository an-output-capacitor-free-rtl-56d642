// high_sr: most significant shift register of the power-switch array.
//
// The H-bit thermometer word h(t)<1:H> drives H power switches of weight
// L*M. It is clocked only by Carry2 from the Medium SR (modelled as a clock
// enable): on each carry it shifts a one in (In2=1) or out (In2=0). It holds
// at all-ones and all-zeros; `full`/`empty` tell the lower sections so that
// they do not issue a carry that cannot be taken. The word and its carry
// driving follow the architecture; the saturation handshake is this
// implementation's own.
module high_sr
  import dldo_pkg::*;
#(
  parameter int unsigned H = H_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  carry_t       c_in,   // Carry2 / In2 from the Medium SR
  output logic [H-1:0] word,   // h(t)<1:H>
  output logic         full,
  output logic         empty
);

  assign full  = word[H-1];
  assign empty = !word[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      word <= '0;
    else if (c_in.carry) begin
      if (c_in.up && !full)       word <= {word[H-2:0], 1'b1};
      else if (!c_in.up && !empty) word <= {1'b0, word[H-1:1]};
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ((word + 1'b1) & word) == '0)
    else $error("high_sr: word %b is not a thermometer code", word);

endmodule
