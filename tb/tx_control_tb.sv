// tx_control_tb: self-checking test of the transmit control circuit.
//
// For a series of random words, presented through a reload level that the
// test drops once busy is seen:
//   * nothing starts while ready is low, even with reload high;
//   * run, enable and busy are high for exactly 8 x 32 = 256 consecutive
//     clocks, starting the clock after the word is taken;
//   * data_bit holds each bit of the word for 32 clocks, most significant
//     bit first;
//   * done is high for exactly one clock right after, with busy low.
module tx_control_tb;

  localparam int DW = 8;
  localparam int CPB = 32;

  logic          clk = 1'b0;
  logic          rst, ready, reload, run, enable, data_bit, busy, done;
  logic [DW-1:0] data_in;

  int checks = 0, failures = 0;
  int run_len, wait_len;

  tx_control dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ready = 1'b0; reload = 1'b0; data_in = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    // not ready: must not start
    reload = 1'b1; data_in = 8'hA5;
    repeat (10) begin
      @(posedge clk); #1;
      check(!busy && !run && !done, "no start while not ready");
    end
    for (int w = 0; w < 20; w++) begin
      logic [DW-1:0] word;
      word = (w == 0) ? 8'hA5 : 8'($urandom);
      data_in = word; reload = 1'b1; ready = 1'b1;
      wait_len = 0;
      @(posedge clk); #1;
      while (!busy && wait_len < 5) begin
        wait_len++;
        @(posedge clk); #1;
      end
      check(wait_len == 0, "word taken on first clock of reload");
      reload = 1'b0;
      data_in = ~word;  // must not matter once taken
      run_len = 0;
      for (int b = DW - 1; b >= 0; b--) begin
        for (int c = 0; c < CPB; c++) begin
          check(run && enable && busy && !done, "spreading");
          check(data_bit == word[b], "data bit order");
          run_len++;
          @(posedge clk); #1;
        end
      end
      check(run_len == DW * CPB, "256 chips");
      check(done && !busy && !run && !enable, "done pulse");
      @(posedge clk); #1;
      check(!done && !busy, "done one clock");
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        check(!busy && !done, "idle without reload");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
