// tb_aa_dldo: end-to-end test of the tri-loop controller closed around a
// behavioural model of the power stage, AA network and load (ldo_plant),
// with every parameter of the controller at its default (L=8, M=4, H=16,
// 10 MHz clock).
//
// The regulator starts from all switches off with a 2 mA load, then sees a
// sequence of load steps: 2 -> 12 -> 2 mA twice (the transient of the
// design's measurements, 1 ns edges) followed by random loads between 1 and
// 14 mA. Every clock cycle it checks, from the mode that was active before
// the edge, how far the total switch code moved:
//   coarse: +-L per cycle, or +-3L on a carry into or out of the High SR
//           (glitch-reduction reload of the Medium SR), or 0 at saturation;
//   fine:   +-1 per cycle, or +-17 when a Low carry ripples into the High SR;
//   freeze: no change, and no shift register enabled (clock gated off).
// It also checks that every fine window that ends in freeze lasted T1
// cycles, and that after each load step the loop ends in freeze with V_OUT
// inside the dead zone. It counts each mechanism (coarse entry, fine window,
// freeze, Carry1 up/down, Carry2 up/down, fine-loop limit cycle, AA-assisted
// droop) and fails on any that never happened.
module tb_aa_dldo;
  import dldo_pkg::*;
  timeunit 1ns;
  timeprecision 100ps;

  localparam int unsigned L = L_DEF, M = M_DEF, H = H_DEF;
  localparam int unsigned T1 = 32;
  localparam int unsigned DZ_HALF = 200;
  localparam int VREF = 5000;              // 0.5 V
  localparam int STEP_CYCLES = 400;        // 40 us per load level
  localparam int N_RANDOM = 24;

  logic clk = 0, rst_n = 0;
  volt_t vout, vref;
  logic [L-1:0] l_word;
  logic [M-1:0] m_word;
  logic [H-1:0] h_word;
  logic coarse_en, fine_en, freeze;
  logic [9:0] code;
  int unsigned iload_ua = 2000;

  assign vref = volt_t'(VREF);

  aa_dldo dut (.*);
  ldo_plant #(.L(L), .M(M), .H(H)) plant (.l_word, .m_word, .h_word, .iload_ua, .vout);

  always #50 clk = ~clk;   // 10 MHz sampling clock

  int checks = 0, failures = 0;
  int n_coarse = 0, n_fine = 0, n_freeze = 0, n_c1_up = 0, n_c1_dn = 0;
  int n_c2_up = 0, n_c2_dn = 0, n_lco = 0, n_t1 = 0, n_aa = 0;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- per-cycle checker
  logic pc, pf, pz, pcmp;
  int   pcode, delta, fine_len = 0, last_dir = 0;
  logic c1, c1u, c2, c2u;
  always @(negedge clk) if (rst_n) begin
    pc = coarse_en; pf = fine_en; pz = freeze; pcode = int'(code);
    c1 = dut.carry1.carry; c1u = dut.carry1.up; c2 = dut.carry2.carry; c2u = dut.carry2.up;
    pcmp = dut.cmp_up;
    // freeze: no shift register may be clocked
    if (freeze) begin
      checks++;
      if (dut.u_low.en || dut.u_med.step || c2) begin
        failures++; $display("%t a shift register is enabled in freeze", $time);
      end
    end
  end

  logic coarse_q = 0, fine_q = 0, freeze_q = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    delta = int'(code) - pcode;
    checks++;
    if (pc) begin
      if (!(delta inside {0, L, -L, 3*L, -3*L})) begin
        failures++; $display("%t coarse cycle moved the code by %0d", $time, delta);
      end
    end else if (pf) begin
      if (!(delta inside {0, 1, -1, 17, -17})) begin
        failures++; $display("%t fine cycle moved the code by %0d", $time, delta);
      end
      if (last_dir != 0 && (pcmp ? 1 : -1) != last_dir) n_lco++;
      last_dir = pcmp ? 1 : -1;
    end else if (delta != 0) begin
      failures++; $display("%t code moved by %0d in freeze", $time, delta);
    end
    if (pc && c2) begin if (c2u) n_c2_up++; else n_c2_dn++; end
    if (pf && c1) begin if (c1u) n_c1_up++; else n_c1_dn++; end
    if (coarse_en && !coarse_q) n_coarse++;
    if (fine_en && !fine_q) begin n_fine++; fine_len = 0; last_dir = 0; end
    if (fine_en) fine_len++;
    if (freeze && !freeze_q && fine_q) begin
      n_freeze++;
      checks++;
      if (fine_len != T1) begin
        failures++; $display("%t fine window of %0d cycles, expected %0d", $time, fine_len, T1);
      end else n_t1++;
    end
    coarse_q = coarse_en; fine_q = fine_en; freeze_q = freeze;
  end

  // ---- minimum and maximum of V_OUT after each load step
  int vmin, vmax;
  always @(vout) begin
    if (int'(vout) < vmin) vmin = int'(vout);
    if (int'(vout) > vmax) vmax = int'(vout);
  end

  int settle_cycles;
  task automatic settle_and_check(string tag);
    int waited = 0, n = 0;
    // wait for the loop to run through coarse and fine into freeze
    // settle_cycles: cycles from the load step to the last entry into freeze
    settle_cycles = 0;
    while (n < STEP_CYCLES) begin
      @(posedge clk); n++;
      #1 if (!freeze) settle_cycles = n + 1;
    end
    while (!freeze && waited < 4000) begin @(posedge clk); waited++; end
    #2;
    checks++;
    if (!freeze || int'(vout) > VREF + int'(DZ_HALF) || int'(vout) < VREF - int'(DZ_HALF)) begin
      failures++;
      $display("%s: not regulated, freeze=%b vout=%0d code=%0d", tag, freeze, vout, code);
    end
  endtask

  task automatic load_step(int unsigned ua, string tag);
    int v0 = int'(vout);
    vmin = v0; vmax = v0;
    iload_ua = ua;
    settle_and_check(tag);
    $display("%-12s load %5.2f mA: V_OUT %0.1f mV -> min %0.1f / max %0.1f mV, settled %0.1f mV, code %0d, last frozen after %0d cycles",
             tag, real'(ua) / 1000.0, real'(v0) / 10.0, real'(vmin) / 10.0, real'(vmax) / 10.0,
             real'(vout) / 10.0, code, settle_cycles);
    if (VREF - vmin > 10 * int'(DZ_HALF) / 4 && vmin > 0) n_aa++;
    if (vmax - VREF > 10 * int'(DZ_HALF) / 4) n_aa++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_step(2000, "start-up");
    for (int k = 0; k < 2; k++) begin
      load_step(12000, "step up");
      load_step(2000, "step down");
    end
    for (int k = 0; k < N_RANDOM; k++)
      load_step($urandom_range(1000, 14000), "random");

    $display("coarse entries %0d, fine windows %0d, freezes after T1 %0d", n_coarse, n_fine, n_freeze);
    $display("Carry1 up/down %0d/%0d, Carry2 up/down %0d/%0d, fine reversals %0d, large transients %0d",
             n_c1_up, n_c1_dn, n_c2_up, n_c2_dn, n_lco, n_aa);
    checks++;
    if (n_coarse == 0 || n_fine == 0 || n_freeze == 0 || n_t1 == 0 || n_c1_up == 0 || n_c1_dn == 0 ||
        n_c2_up == 0 || n_c2_dn == 0 || n_lco == 0 || n_aa == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
