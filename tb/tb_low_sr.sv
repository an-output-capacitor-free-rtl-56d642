// tb_low_sr: self-checking test of the fine-tuning shift register.
//
// Drives random enable, direction and upper-section saturation flags, and
// compares the thermometer word and the Carry1/In1 request every cycle with
// a count-based reference: the word moves one count per enabled cycle, and
// at its ends requests a carry and reloads to 1 (up) or L-1 (down) ones.
// It also counts that every kind of event happened at least once.
module tb_low_sr;
  import dldo_pkg::*;
  localparam int unsigned L = 8;

  logic clk = 0, rst_n = 0, en = 0, up = 0, next_full = 0, next_empty = 0;
  logic [L-1:0] word;
  carry_t carry;
  int checks = 0, failures = 0;
  int n_up_carry = 0, n_dn_carry = 0, n_sat = 0;
  int unsigned ref_l = 0;

  low_sr #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_carry;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      en         = ($urandom_range(0, 9) != 0);
      // long runs in one direction so both ends are reached
      if ($urandom_range(0, 15) == 0) up = ~up;
      next_full  = ($urandom_range(0, 7) == 0);
      next_empty = ($urandom_range(0, 7) == 0);
      #1;
      exp_carry = en && (up ? (ref_l == L && !next_full) : (ref_l == 0 && !next_empty));
      checks++;
      if (carry.carry !== exp_carry || (exp_carry && carry.up !== up)) begin
        failures++;
        $display("carry mismatch cyc %0d: got %b/%b exp %b l=%0d", cyc, carry.carry, carry.up, exp_carry, ref_l);
      end
      if (en) begin
        if (up) begin
          if (ref_l < L) ref_l++;
          else if (exp_carry) begin ref_l = 1; n_up_carry++; end
          else n_sat++;
        end else begin
          if (ref_l > 0) ref_l--;
          else if (exp_carry) begin ref_l = L - 1; n_dn_carry++; end
          else n_sat++;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (word !== L'(therm(ref_l))) begin
        failures++;
        $display("word mismatch cyc %0d: got %b exp %0d ones", cyc, word, ref_l);
      end
    end
    checks++;
    if (n_up_carry == 0 || n_dn_carry == 0 || n_sat == 0) begin
      failures++;
      $display("coverage hole: up carries %0d down carries %0d saturations %0d", n_up_carry, n_dn_carry, n_sat);
    end
    $display("up carries %0d, down carries %0d, held at saturation %0d", n_up_carry, n_dn_carry, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
