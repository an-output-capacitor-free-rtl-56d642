// aa_dldo: tri-loop controller of the analog-assisted digital LDO.
//
// The regulator's PMOS power-switch array is split into three thermometer
// sections: L unit switches (Low SR, word l), M switches of weight L (Medium
// SR, word m) and H switches of weight L*M (High SR, word h), so the total
// strength is code = l + L*m + L*M*h with only L+M+H shift-register bits.
// Three loops act on V_OUT:
//   1. the analog-assisted loop (outside this module: the switch drivers'
//      ground rails are AC-coupled to V_OUT) answers a load step instantly;
//   2. coarse tuning: while the dead-zone comparator sees V_OUT outside the
//      dead zone it raises Coarse_en and the Medium SR moves one step (L
//      counts) per clock in the direction Up, carrying into the High SR;
//   3. fine tuning: when Coarse_en falls the pulse generator raises Fine_en
//      for T1 cycles and the Low SR follows the 1b comparator one count per
//      clock, carrying into the Medium SR. After T1 every section holds
//      (freeze), which stops the limit cycle of the 1b loop.
// The sections' clocks are gated in the design (a multiplexer between CLK and
// ground per section); here each gate is a clock enable of the one clock:
// Low by Fine_en, Medium by Coarse_en or Carry1, High by Carry2.
//
// On a carry into the High SR the Medium SR reloads to CARRY_IN_M ones, on a
// carry out of it to CARRY_OUT_M ones. The defaults (M-1 and 1) are the
// glitch-reduction scheme of the design: if h(t) settles later than m(t),
// the switch strength dips by one Medium step (L counts) on a carry-in
// instead of M-1 steps, and consecutive coarse up-steps ramp faster.
//
// Interface: V_OUT and V_REF arrive as numbers (100 uV per LSB) for the
// comparator models; l_word, m_word and h_word are the switch gate words
// (1 = switch on). Timing: the comparators register their decisions at a
// clock edge; the shift registers act on them at the next edge, so a change
// of V_OUT moves the words two edges later.
module aa_dldo
  import dldo_pkg::*;
#(
  parameter int unsigned L       = L_DEF,
  parameter int unsigned M       = M_DEF,
  parameter int unsigned H       = H_DEF,
  parameter int unsigned T1      = 32,
  parameter int unsigned DZ_HALF = 200,
  // Medium SR reload on a carry into / out of the High SR: M-1 and 1 is the
  // glitch-reduction scheme, 1 and M-1 the plain carry.
  parameter int unsigned CARRY_IN_M  = M - 1,
  parameter int unsigned CARRY_OUT_M = 1,
  localparam int unsigned CODE_W = $clog2(L + L*M + L*M*H + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  volt_t             vout,
  input  volt_t             vref,
  output logic [L-1:0]      l_word,
  output logic [M-1:0]      m_word,
  output logic [H-1:0]      h_word,
  output logic              coarse_en,
  output logic              fine_en,
  output logic              freeze,
  output logic [CODE_W-1:0] code
);

  logic   dz_up, cmp_up;
  logic   mh_full, mh_empty, h_full, h_empty;
  carry_t carry1, carry2;

  dz_comparator #(.DZ_HALF(DZ_HALF)) u_dz (
    .clk, .rst_n, .vout, .vref, .coarse_en, .up(dz_up)
  );

  quant_cmp u_cmp (
    .clk, .rst_n, .vout, .vref, .up(cmp_up)
  );

  pulse_gen #(.T1(T1)) u_pulse (
    .clk, .rst_n, .coarse_en, .fine_en
  );

  low_sr #(.L(L)) u_low (
    .clk, .rst_n, .en(fine_en), .up(cmp_up),
    .next_full(mh_full), .next_empty(mh_empty),
    .word(l_word), .carry(carry1)
  );

  medium_sr #(.M(M), .CARRY_IN_M(CARRY_IN_M), .CARRY_OUT_M(CARRY_OUT_M)) u_med (
    .clk, .rst_n, .coarse_en, .dz_up, .c_in(carry1),
    .next_full(h_full), .next_empty(h_empty),
    .word(m_word), .c_out(carry2), .full(mh_full), .empty(mh_empty)
  );

  high_sr #(.H(H)) u_high (
    .clk, .rst_n, .c_in(carry2), .word(h_word), .full(h_full), .empty(h_empty)
  );

  assign freeze = !coarse_en && !fine_en;

  // Total switch strength in unit-switch counts (for observation).
  always_comb begin
    code = '0;
    for (int i = 0; i < L; i++) code += CODE_W'(l_word[i]);
    for (int i = 0; i < M; i++) code += CODE_W'(m_word[i]) * CODE_W'(L);
    for (int i = 0; i < H; i++) code += CODE_W'(h_word[i]) * CODE_W'(L * M);
  end

endmodule
