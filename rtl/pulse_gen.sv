// pulse_gen: fine-tuning window generator.
//
// When Coarse_en falls (coarse tuning has brought V_OUT into the dead zone),
// Fine_en goes high for T1 clock cycles and is then forced down. With both
// enables low the controller is in freeze mode: every shift register holds,
// which removes the limit-cycle oscillation of the 1b fine loop and its
// switching power. A new Coarse_en ends a running window at once. That Fine_en
// follows the fall of Coarse_en and lasts T1 is the design's; the value of T1
// and its counting in clock cycles are this implementation's choices.
//
// Timing: the window is registered and gated by Coarse_en. Fine_en is high
// in the T1 cycles that follow the first clock edge at which Coarse_en is
// seen low after being high.
module pulse_gen #(
  parameter int unsigned T1 = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic coarse_en,
  output logic fine_en
);

  logic window;   // registered fine-tuning window

  localparam int unsigned CW = $clog2(T1 + 1);

  logic          coarse_q;
  logic [CW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coarse_q <= 1'b0;
      left     <= '0;
      window   <= 1'b0;
    end else begin
      coarse_q <= coarse_en;
      if (coarse_en) begin
        left   <= '0;
        window <= 1'b0;
      end else if (coarse_q) begin
        left   <= CW'(T1 - 1);
        window <= 1'b1;
      end else if (left != '0) begin
        left    <= left - 1'b1;
      end else begin
        window <= 1'b0;
      end
    end
  end

  // Coarse_en masks the window at once, so the two tuning modes never
  // overlap, not even in the cycle in which Coarse_en returns.
  assign fine_en = window && !coarse_en;

endmodule
