// tb_medium_sr: self-checking test of the coarse shift register and its
// glitch-reducing carry.
//
// Part 1 replays the carry-in sequence of the glitch-reduction scheme with
// the High SR modelled as a counter: consecutive coarse up-steps must give
// the coarse word h*M+m = 1,2,3,4,7,8,11,12,... (m reloads to 3 on carry-in)
// and down-steps must reload m to 1 on carry-out. One step is taken per clock
// while Coarse_en is high. Part 2 drives random Coarse_en, Up, Carry1 and
// saturation flags against a count-based reference.
module tb_medium_sr;
  import dldo_pkg::*;
  localparam int unsigned M = 4;
  localparam int unsigned H = 16;

  logic clk = 0, rst_n = 0, coarse_en = 0, dz_up = 0, next_full = 0, next_empty = 1;
  carry_t c_in = '0, c_out;
  logic [M-1:0] word;
  logic full, empty;
  int checks = 0, failures = 0;
  int unsigned ref_m = 0, ref_h = 0;
  int n_cin = 0, n_cout = 0;

  medium_sr #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference step: returns the expected carry request.
  function automatic bit model_step(bit step, bit dir, bit nf, bit ne);
    bit c = 0;
    if (!step) return 0;
    if (dir) begin
      if (ref_m < M) ref_m++;
      else if (!nf) begin ref_m = 3; c = 1; end
    end else begin
      if (ref_m > 0) ref_m--;
      else if (!ne) begin ref_m = 1; c = 1; end
    end
    return c;
  endfunction

  task automatic check_word(string tag);
    checks++;
    if (word !== M'(therm(ref_m))) begin
      failures++;
      $display("%s: word %b, expected %0d ones", tag, word, ref_m);
    end
  endtask

  int exp_seq[12] = '{1, 2, 3, 4, 7, 8, 11, 12, 15, 16, 19, 20};

  initial begin
    bit exp_c, step, dir;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- Part 1: coarse ramp up, one step per clock
    @(negedge clk);
    coarse_en = 1; dz_up = 1;
    for (int i = 0; i < 12; i++) begin
      next_full = (ref_h == H); next_empty = (ref_h == 0);
      #1;
      exp_c = model_step(1, 1, next_full, next_empty);
      checks++;
      if (c_out.carry !== exp_c || (exp_c && !c_out.up)) begin
        failures++; $display("ramp-up step %0d: carry %b exp %b", i, c_out.carry, exp_c);
      end
      @(posedge clk);
      if (exp_c) begin ref_h++; n_cin++; end
      #1;
      check_word("ramp-up");
      checks++;
      if (int'(ref_h) * M + $countones(word) != exp_seq[i]) begin
        failures++;
        $display("ramp-up step %0d: coarse word %0d, expected %0d", i, ref_h * M + $countones(word), exp_seq[i]);
      end
      @(negedge clk);
    end
    // ---- ramp down through two carry-outs: m must reload to 1
    dz_up = 0;
    for (int i = 0; i < 8; i++) begin
      next_full = (ref_h == H); next_empty = (ref_h == 0);
      #1;
      exp_c = model_step(1, 0, next_full, next_empty);
      checks++;
      if (c_out.carry !== exp_c || (exp_c && c_out.up)) begin
        failures++; $display("ramp-down step %0d: carry %b exp %b", i, c_out.carry, exp_c);
      end
      @(posedge clk);
      if (exp_c) begin ref_h--; n_cout++; end
      #1;
      check_word("ramp-down");
      @(negedge clk);
    end
    coarse_en = 0;
    // ---- Part 2: random stimulus
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      coarse_en = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 15) == 0) dz_up = ~dz_up;
      c_in.carry = ($urandom_range(0, 2) == 0);
      c_in.up    = ($urandom_range(0, 1) == 1);
      next_full  = ($urandom_range(0, 7) == 0);
      next_empty = ($urandom_range(0, 7) == 0);
      #1;
      checks++;
      if (full !== (ref_m == M && next_full) || empty !== (ref_m == 0 && next_empty)) begin
        failures++; $display("random cyc %0d: full/empty %b/%b", cyc, full, empty);
      end
      step = coarse_en || c_in.carry;
      dir  = coarse_en ? dz_up : c_in.up;
      exp_c = model_step(step, dir, next_full, next_empty);
      checks++;
      if (c_out.carry !== exp_c || (exp_c && c_out.up !== dir)) begin
        failures++; $display("random cyc %0d: carry %b/%b exp %b/%b", cyc, c_out.carry, c_out.up, exp_c, dir);
      end
      if (exp_c) begin if (dir) n_cin++; else n_cout++; end
      @(posedge clk); #1;
      check_word("random");
    end
    checks++;
    if (n_cin < 2 || n_cout < 2) begin
      failures++; $display("coverage hole: carry-in %0d carry-out %0d", n_cin, n_cout);
    end
    $display("carry-in %0d, carry-out %0d", n_cin, n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
