// tb_glitch_reduction: compares the carry schemes of the Medium-to-High SR
// boundary with the controller in open loop.
//
// Three controllers run side by side:
//   A: M=8, H=8,  plain carry    (m: 8->1 on carry-in, 0->7 on carry-out)
//   B: M=4, H=16, plain carry    (m: 4->1, 0->3)
//   C: M=4, H=16, glitch reduction, the default (m: 4->3, 0->1)
// All have 64 coarse levels (M*H). V_OUT is held far below V_REF, so each
// controller ramps its coarse word up from zero to full, then far above,
// so it ramps down to zero. The High SR word reaches the switches 20 ns late.
// Expected largest glitch, in Medium steps of L counts: A 7, B 3, C 1, both
// ways. Expected number of cycles in which the coarse word moves on a full
// ramp: 68 for the plain carry with M=4 (one step per cycle, M*H+M steps) and
// 36 with glitch reduction (each carry-in or carry-out moves three steps).
module tb_glitch_reduction;
  import dldo_pkg::*;
  timeunit 1ns;
  timeprecision 100ps;

  localparam int unsigned L = 8;

  logic clk = 0, rst_n = 0, going_up = 1, clear = 1;
  volt_t vout = '0, vref = 16'd5000;

  logic [L-1:0] la, lb, lc;
  logic [7:0]  ma;  logic [7:0]  ha;
  logic [3:0]  mb;  logic [15:0] hb;
  logic [3:0]  mc;  logic [15:0] hc;
  logic ca, cb, cc, fa, fb, fc, za, zb, zc;
  logic [9:0] codea, codeb, codec;
  int ga, gb, gc, na, nb, nc;
  int checks = 0, failures = 0;

  aa_dldo #(.M(8), .H(8), .CARRY_IN_M(1), .CARRY_OUT_M(7)) dut_a (
    .clk, .rst_n, .vout, .vref, .l_word(la), .m_word(ma), .h_word(ha),
    .coarse_en(ca), .fine_en(fa), .freeze(za), .code(codea));
  aa_dldo #(.M(4), .H(16), .CARRY_IN_M(1), .CARRY_OUT_M(3)) dut_b (
    .clk, .rst_n, .vout, .vref, .l_word(lb), .m_word(mb), .h_word(hb),
    .coarse_en(cb), .fine_en(fb), .freeze(zb), .code(codeb));
  aa_dldo dut_c (
    .clk, .rst_n, .vout, .vref, .l_word(lc), .m_word(mc), .h_word(hc),
    .coarse_en(cc), .fine_en(fc), .freeze(zc), .code(codec));

  glitch_probe #(.L(L), .M(8), .H(8))  pa (.clk, .m_word(ma), .h_word(ha), .going_up, .clear, .max_glitch_steps(ga), .moves(na));
  glitch_probe #(.L(L), .M(4), .H(16)) pb (.clk, .m_word(mb), .h_word(hb), .going_up, .clear, .max_glitch_steps(gb), .moves(nb));
  glitch_probe #(.L(L), .M(4), .H(16)) pc (.clk, .m_word(mc), .h_word(hc), .going_up, .clear, .max_glitch_steps(gc), .moves(nc));

  always #50 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- ramp up
    @(negedge clk);
    vout = '0; going_up = 1; clear = 0;
    repeat (100) @(posedge clk);
    @(negedge clk); clear = 1;
    $display("ramp up:   glitch A %0dxL  B %0dxL  C %0dxL; moving cycles A %0d  B %0d  C %0d", ga, gb, gc, na, nb, nc);
    expect_eq("A carry-in glitch", ga, 7);
    expect_eq("B carry-in glitch", gb, 3);
    expect_eq("C carry-in glitch", gc, 1);
    expect_eq("B up-ramp cycles", nb, 68);
    expect_eq("C up-ramp cycles", nc, 36);
    expect_eq("A full word", int'(codea), 8 * 8 + 8 * 8 * 8);
    expect_eq("C full word", int'(codec), 8 * 4 + 8 * 4 * 16);
    // ---- ramp down
    @(posedge clk); @(negedge clk);
    vout = 16'd10000; going_up = 0; clear = 0;
    repeat (100) @(posedge clk);
    @(negedge clk); clear = 1;
    $display("ramp down: glitch A %0dxL  B %0dxL  C %0dxL; moving cycles A %0d  B %0d  C %0d", ga, gb, gc, na, nb, nc);
    expect_eq("A carry-out glitch", ga, 7);
    expect_eq("B carry-out glitch", gb, 3);
    expect_eq("C carry-out glitch", gc, 1);
    expect_eq("B down-ramp cycles", nb, 68);
    expect_eq("C down-ramp cycles", nc, 36);
    expect_eq("C empty word", int'(codec), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
