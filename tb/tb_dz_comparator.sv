// tb_dz_comparator: self-checking test of the dead-zone comparator model.
//
// Random V_OUT around V_REF (with points exactly on both boundaries); the
// registered Coarse_en and Up must match the window decision one edge later.
module tb_dz_comparator;
  import dldo_pkg::*;
  localparam int unsigned DZ_HALF = 200;

  logic clk = 0, rst_n = 0, coarse_en, up;
  volt_t vout = '0, vref = 16'd5000;
  int checks = 0, failures = 0, n_in = 0, n_hi = 0, n_lo = 0;

  dz_comparator #(.DZ_HALF(DZ_HALF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    bit exp_c, exp_u;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      vref = 16'(4000 + $urandom_range(0, 2000));
      case (i % 5)
        0: d = int'(DZ_HALF);
        1: d = -int'(DZ_HALF);
        2: d = int'(DZ_HALF) + 1;
        3: d = -int'(DZ_HALF) - 1;
        default: d = $urandom_range(0, 1200) - 600;
      endcase
      vout = 16'(int'(vref) + d);
      exp_c = (d > int'(DZ_HALF)) || (d < -int'(DZ_HALF));
      exp_u = d < 0;
      @(posedge clk); #1;
      checks++;
      if (coarse_en !== exp_c || up !== exp_u) begin
        failures++; $display("d=%0d: coarse_en %b up %b, expected %b %b", d, coarse_en, up, exp_c, exp_u);
      end
      if (!exp_c) n_in++; else if (exp_u) n_lo++; else n_hi++;
    end
    checks++;
    if (n_in == 0 || n_lo == 0 || n_hi == 0) begin failures++; $display("coverage hole"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
