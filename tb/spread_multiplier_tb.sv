// spread_multiplier_tb: self-checking test of the spreading multiplier.
//
// Random enable, data_bit and pcs_chip for 1000 clocks; one clock later
// mod_out must be data_bit XOR pcs_chip and mod_valid 1 where enable was
// high, and both 0 where it was low or in reset.
module spread_multiplier_tb;

  logic clk = 1'b0;
  logic rst, enable, data_bit, pcs_chip, mod_out, mod_valid;
  logic e_out, e_valid;
  int checks = 0, failures = 0;

  spread_multiplier dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; enable = 1'b1; data_bit = 1'b1; pcs_chip = 1'b0;
    @(posedge clk); #1;
    check(mod_out == 1'b0 && mod_valid == 1'b0, "reset");
    rst = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      enable   = ($urandom_range(0, 4) != 0);
      data_bit = 1'($urandom);
      pcs_chip = 1'($urandom);
      // product in the +1/-1 domain, mapped back to bits
      e_valid  = enable;
      e_out    = enable && (((data_bit ? -1 : 1) * (pcs_chip ? -1 : 1)) < 0);
      @(posedge clk); #1;
      check(mod_valid == e_valid, "mod_valid");
      check(mod_out == e_out, "mod_out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
