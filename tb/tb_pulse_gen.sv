// tb_pulse_gen: self-checking test of the fine-tuning window.
//
// Coarse_en pulses of random length are applied with random gaps. After each
// fall of Coarse_en, Fine_en must be high for exactly T1 cycles (or, if
// Coarse_en returns earlier, until it returns), and low whenever Coarse_en is high.
module tb_pulse_gen;
  localparam int unsigned T1 = 32;

  logic clk = 0, rst_n = 0, coarse_en = 0, fine_en;
  int checks = 0, failures = 0, n_full = 0, n_cut = 0;

  pulse_gen #(.T1(T1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hi_len, gap, high_cnt;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Fine_en stays low after reset without a coarse phase
    repeat (5) begin
      @(posedge clk); #1;
      checks++; if (fine_en) begin failures++; $display("fine_en after reset"); end
    end
    for (int k = 0; k < 60; k++) begin
      hi_len = $urandom_range(1, 6);
      gap    = (k % 3 == 0) ? $urandom_range(3, T1 - 2) : $urandom_range(T1 + 2, T1 + 20);
      @(negedge clk); coarse_en = 1;
      repeat (hi_len) begin
        @(posedge clk); #1;
        checks++; if (fine_en) begin failures++; $display("fine_en high during coarse"); end
        @(negedge clk);
      end
      coarse_en = 0;
      high_cnt = 0;
      repeat (gap) begin
        @(posedge clk); #1;
        if (fine_en) high_cnt++;
        @(negedge clk);
      end
      checks++;
      if (gap > int'(T1)) begin
        n_full++;
        if (high_cnt != T1) begin failures++; $display("window %0d cycles, expected %0d", high_cnt, T1); end
      end else begin
        n_cut++;
        if (high_cnt != gap) begin failures++; $display("cut window %0d cycles, expected %0d", high_cnt, gap); end
      end
    end
    checks++;
    if (n_full == 0 || n_cut == 0) begin failures++; $display("coverage hole"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
