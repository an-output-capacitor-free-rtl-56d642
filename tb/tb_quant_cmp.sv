// tb_quant_cmp: self-checking test of the 1b comparator model: the
// registered Up must equal V_OUT < V_REF of the previous edge, including
// equal inputs.
module tb_quant_cmp;
  import dldo_pkg::*;

  logic clk = 0, rst_n = 0, up;
  volt_t vout = '0, vref = '0;
  int checks = 0, failures = 0, n_up = 0, n_dn = 0;

  quant_cmp dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_u;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      vref = 16'($urandom_range(0, 65535));
      vout = (i % 4 == 0) ? vref : 16'(int'(vref) + $urandom_range(0, 40) - 20);
      exp_u = vout < vref;
      @(posedge clk); #1;
      checks++;
      if (up !== exp_u) begin failures++; $display("vout %0d vref %0d: up %b", vout, vref, up); end
      if (exp_u) n_up++; else n_dn++;
    end
    checks++;
    if (n_up == 0 || n_dn == 0) begin failures++; $display("coverage hole"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
