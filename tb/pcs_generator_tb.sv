// pcs_generator_tb: self-checking test of the PCS generator.
//
//  1. ready and pcs_out are 0 in reset; ready is 1 the clock after.
//  2. With the default seed and run held high, the first 64 chips equal the
//     values 32'h5832C0B4, 32'hF4DC58EE (first chip in the top bit),
//     computed offline from the recurrence.
//  3. Over 4096 chips the default sequence is balanced to within 48..53 %
//     ones (2072 expected).
//  4. All eight registers are programmed through load/sel_reg/reg_init,
//     then run is toggled at random, with occasional loads, for 3000
//     clocks; every chip is compared with the reference model pcs_ref_pkg,
//     which also checks that load takes priority over run.
//  5. Two different programmed seeds give sequences that differ.
module pcs_generator_tb;
  import pcs_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst, load, run, pcs_out, ready;
  logic [2:0] sel_reg;
  logic [7:0] reg_init;

  int checks = 0, failures = 0;
  regs_t       m;
  logic [31:0] seq;
  int          ones;
  logic [255:0] seq_a, seq_b;

  pcs_generator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic program_seed(input regs_t s);
    for (int i = 1; i <= 8; i++) begin
      load = 1'b1; sel_reg = 3'(i - 1); reg_init = s[i];
      @(posedge clk); #1;
    end
    load = 1'b0;
  endtask

  task automatic capture(output logic [255:0] bits);
    run = 1'b1;
    for (int i = 0; i < 256; i++) begin
      bits[i] = pcs_out;
      @(posedge clk); #1;
    end
    run = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0; run = 1'b1; sel_reg = '0; reg_init = '0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    check(ready == 1'b0, "ready low in reset");
    check(pcs_out == 1'b0, "pcs_out low in reset");
    rst = 1'b0;
    @(posedge clk); #1;
    check(ready == 1'b1, "ready after reset");
    // (run was high during reset: the first clock after it stepped once)
    rst = 1'b1; run = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    @(posedge clk); #1;

    // 2. default seed, first 64 chips
    run = 1'b1;
    for (int w = 0; w < 2; w++) begin
      seq = '0;
      for (int i = 0; i < 32; i++) begin
        seq = {seq[30:0], pcs_out};
        @(posedge clk); #1;
      end
      check(seq == ((w == 0) ? 32'h5832C0B4 : 32'hF4DC58EE), "default chips");
      if (w == 0) ones = $countones(seq); else ones += $countones(seq);
    end
    // 3. balance over 4096 chips
    for (int i = 64; i < 4096; i++) begin
      ones += int'(pcs_out);
      @(posedge clk); #1;
    end
    check(ones == 2072, "ones in 4096 chips");
    check(ones > 4096 * 48 / 100 && ones < 4096 * 53 / 100, "balance");
    run = 1'b0;

    // 4. programmed seed against the model, random run and loads
    for (int i = 1; i <= 8; i++) m[i] = 8'($urandom);
    m[2][0] = 1'b1;
    program_seed(m);
    check(ready == 1'b1, "ready after programming");
    for (int t = 0; t < 3000; t++) begin
      run      = ($urandom_range(0, 3) != 0);
      load     = ($urandom_range(0, 49) == 0);
      sel_reg  = 3'($urandom);
      reg_init = 8'($urandom);
      #1;
      check(pcs_out == chip_of(m), "chip vs model");
      @(posedge clk); #1;
      if (load)     m[int'(sel_reg) + 1] = reg_init;
      else if (run) m = step(m);
    end
    load = 1'b0; run = 1'b0;

    // 5. two seeds, two different sequences
    m = default_seed();
    program_seed(m);
    capture(seq_a);
    m[5] = m[5] ^ 8'h01;
    program_seed(m);
    capture(seq_b);
    check(seq_a != seq_b, "different seeds differ");
    check(seq_a[31:0] == {<<{32'h5832C0B4}}, "reprogrammed default seed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
