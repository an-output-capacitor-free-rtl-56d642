// tb_high_sr: self-checking test of the High SR.
//
// Random Carry2/In2 requests with long runs in one direction, so both
// saturation ends are reached; the word must move one step per carry, hold
// at all-ones and all-zeros, and report full/empty.
module tb_high_sr;
  import dldo_pkg::*;
  localparam int unsigned H = 16;

  logic clk = 0, rst_n = 0;
  carry_t c_in = '0;
  logic [H-1:0] word;
  logic full, empty;
  int checks = 0, failures = 0, n_top = 0, n_bot = 0;
  int unsigned ref_h = 0;

  high_sr #(.H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      c_in.carry = ($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 40) == 0) c_in.up = ~c_in.up;
      #1;
      checks++;
      if (full !== (ref_h == H) || empty !== (ref_h == 0)) begin
        failures++; $display("cyc %0d: full/empty %b/%b at %0d", cyc, full, empty, ref_h);
      end
      if (c_in.carry) begin
        if (c_in.up) begin if (ref_h < H) ref_h++; else n_top++; end
        else         begin if (ref_h > 0) ref_h--; else n_bot++; end
      end
      @(posedge clk); #1;
      checks++;
      if (word !== H'(therm(ref_h))) begin
        failures++; $display("cyc %0d: word %b expected %0d ones", cyc, word, ref_h);
      end
    end
    checks++;
    if (n_top == 0 || n_bot == 0) begin
      failures++; $display("coverage hole: top %0d bottom %0d", n_top, n_bot);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
