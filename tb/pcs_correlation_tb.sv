// pcs_correlation_tb: sequence-quality workload for the PCS generator.
//
// Two generators run side by side, one with the reset seed and one
// programmed through load/sel_reg/reg_init with a second seed
// (R1..R8 = A1 3F 77 08 5C E2 19 B4). 1088 chips are taken from each and
// mapped to +1 (chip 0) and -1 (chip 1). Over a window of N = 1024 chips the
// test measures
//   * balance: number of -1 chips of each sequence;
//   * autocorrelation R_aa(m) = sum_k a(k) a(k+m), m = 0..32;
//   * cross-correlation R_ab(m) = sum_k a(k) b(k+m), m = 0..32.
// It checks the in-phase peak R_aa(0) = N, that every off-peak and cross
// value stays below N/8, that both sequences hold 45..55 % ones, and the
// exact values computed offline from the recurrence (513 and 465 ones,
// largest |R_aa| 92, largest |R_ab| 76).
module pcs_correlation_tb;

  localparam int N    = 1024;
  localparam int LAGS = 32;

  logic       clk = 1'b0;
  logic       rst, run, load;
  logic [2:0] sel_reg;
  logic [7:0] reg_init;
  logic       chip_a, chip_b, ready_a, ready_b;

  int checks = 0, failures = 0;
  int a [N + LAGS + 32];
  int b [N + LAGS + 32];
  int ones_a, ones_b, max_auto, max_cross, r;
  logic [7:0] seed_b [1:8] = '{8'hA1, 8'h3F, 8'h77, 8'h08, 8'h5C, 8'hE2, 8'h19, 8'hB4};

  pcs_generator u_a (.clk, .rst, .load(1'b0), .sel_reg(3'd0), .reg_init(8'd0),
                     .run, .pcs_out(chip_a), .ready(ready_a));
  pcs_generator u_b (.clk, .rst, .load, .sel_reg, .reg_init,
                     .run, .pcs_out(chip_b), .ready(ready_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; run = 1'b0; load = 1'b0; sel_reg = '0; reg_init = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 1; i <= 8; i++) begin
      load = 1'b1; sel_reg = 3'(i - 1); reg_init = seed_b[i];
      @(posedge clk); #1;
    end
    load = 1'b0;
    check(ready_a && ready_b, "ready");
    run = 1'b1;
    for (int k = 0; k < N + LAGS + 32; k++) begin
      a[k] = chip_a ? -1 : 1;
      b[k] = chip_b ? -1 : 1;
      @(posedge clk); #1;
    end
    run = 1'b0;

    ones_a = 0; ones_b = 0;
    for (int k = 0; k < N; k++) begin
      if (a[k] < 0) ones_a++;
      if (b[k] < 0) ones_b++;
    end
    max_auto = 0; max_cross = 0;
    for (int m = 0; m <= LAGS; m++) begin
      int ra, rc;
      ra = 0; rc = 0;
      for (int k = 0; k < N; k++) begin
        ra += a[k] * a[k + m];
        rc += a[k] * b[k + m];
      end
      if (m == 0) check(ra == N, "autocorrelation peak");
      else if ((ra < 0 ? -ra : ra) > max_auto) max_auto = (ra < 0 ? -ra : ra);
      if ((rc < 0 ? -rc : rc) > max_cross) max_cross = (rc < 0 ? -rc : rc);
    end
    $display("ones: a=%0d b=%0d of %0d; max |R_aa(m>0)|=%0d, max |R_ab|=%0d",
             ones_a, ones_b, N, max_auto, max_cross);
    check(ones_a > N * 45 / 100 && ones_a < N * 55 / 100, "balance a");
    check(ones_b > N * 45 / 100 && ones_b < N * 55 / 100, "balance b");
    check(max_auto < N / 8, "low autocorrelation");
    check(max_cross < N / 8, "low cross-correlation");
    check(ones_a == 513 && ones_b == 465, "balance values");
    check(max_auto == 92, "autocorrelation value");
    check(max_cross == 76, "cross-correlation value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
