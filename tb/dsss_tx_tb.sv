// dsss_tx_tb: end-to-end test of the DS-SS transmitter at its default
// sizes (8-bit words, 32 chips per bit, four 2 x 8-bit PCS cells).
//
// A message-source driver writes words through data/cntrl; a receiver
// model despreads mod_out by correlating each 32-chip group with its own
// copy of the PCS (pcs_ref_pkg) in the +1/-1 domain and recovers the word.
// Checked for every word:
//   * every chip equals data bit XOR reference chip;
//   * the despread word equals the word sent (correlation +-32 per bit);
//   * run_txr and mod_valid are high for exactly 256 clocks, busy too;
//   * the first chip leaves 3 clocks after the cntrl pulse; done follows
//     the last run clock and lasts one clock.
// Mechanisms exercised and counted (each must happen at least once):
//   words transmitted, writes refused while the buffer is full,
//   PCS re-programming through load/sel_reg/reg_init, back-to-back words
//   (next word written on the clock done is seen), and a reset in the middle
//   of a word that returns the transmitter to its default seed.
module dsss_tx_tb;
  import pcs_ref_pkg::*;

  localparam int DW  = 8;
  localparam int CPB = 32;

  logic          clk = 1'b0;
  logic          rst;
  logic [DW-1:0] data;
  logic          cntrl, buf_full, busy, done;
  logic          load;
  logic [2:0]    sel_reg;
  logic [7:0]    reg_init;
  logic          ready_out, run_txr, mod_out, mod_valid;

  int checks = 0, failures = 0;
  int n_words = 0, n_refused = 0, n_reprog = 0, n_b2b = 0, n_abort = 0;
  regs_t m;

  dsss_tx dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst = 1'b1; cntrl = 1'b0; load = 1'b0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    check(!ready_out && !busy && !mod_valid && !buf_full, "outputs in reset");
    rst = 1'b0;
    @(posedge clk); #1;
    check(ready_out, "ready after reset");
    m = default_seed();
  endtask

  task automatic program_seed(input regs_t s);
    for (int i = 1; i <= 8; i++) begin
      load = 1'b1; sel_reg = 3'(i - 1); reg_init = s[i];
      @(posedge clk); #1;
    end
    load = 1'b0;
    m = s;
    n_reprog++;
  endtask

  // Send one word and check its chips. refuse: also try a second write
  // while the first is in flight. Returns with done just seen.
  task automatic send_word(input logic [DW-1:0] word, input bit refuse);
    int clk_cnt, first_chip, n_chips, n_run, n_busy, n_done, corr, bitpos;
    logic [DW-1:0] rx;
    check(!buf_full, "buffer free before write");
    data = word; cntrl = 1'b1;
    @(posedge clk); #1;
    cntrl = 1'b0; data = ~word;
    clk_cnt = 1; first_chip = -1; n_chips = 0; n_run = 0; n_busy = 0; n_done = 0;
    corr = 0; rx = '0;
    while (!done && clk_cnt < 400) begin
      if (refuse && clk_cnt == 100) begin
        check(buf_full, "buffer full while sending");
        cntrl = 1'b1; data = 8'h00;
      end else begin
        cntrl = 1'b0;
      end
      if (run_txr) n_run++;
      if (busy) n_busy++;
      if (mod_valid) begin
        logic c;
        int   b;
        c = chip_of(m);
        m = step(m);
        b = DW - 1 - n_chips / CPB;
        if (first_chip < 0) first_chip = clk_cnt;
        check(mod_out == (word[b] ^ c), "chip value");
        // receiver: +-1 correlation of chip with the local code
        corr += ((mod_out ? -1 : 1) * (c ? -1 : 1));
        n_chips++;
        if (n_chips % CPB == 0) begin
          bitpos = DW - n_chips / CPB;
          check(corr == CPB || corr == -CPB, "full correlation");
          rx[bitpos] = (corr < 0);
          corr = 0;
        end
      end
      @(posedge clk); #1;
      clk_cnt++;
      if (refuse && clk_cnt == 101) n_refused++;
    end
    cntrl = 1'b0;
    // the final chip is registered on the clock done appears
    if (mod_valid) begin
      logic c;
      c = chip_of(m);
      m = step(m);
      check(mod_out == (word[0] ^ c), "last chip value");
      corr += ((mod_out ? -1 : 1) * (c ? -1 : 1));
      n_chips++;
      rx[0] = (corr < 0);
      check(corr == CPB || corr == -CPB, "full correlation");
    end
    check(done && !busy, "done with busy low");
    check(first_chip == 3, "first chip 3 clocks after cntrl");
    check(n_chips == DW * CPB, "256 chips");
    check(n_run == DW * CPB, "run_txr 256 clocks");
    check(n_busy == DW * CPB, "busy 256 clocks");
    check(rx == word, "despread word");
    if (rx != word) $display("sent %h received %h", word, rx);
    n_words++;
  endtask

  initial begin
    regs_t s;
    data = '0; cntrl = 1'b0; load = 1'b0; sel_reg = '0; reg_init = '0;
    do_reset();

    // word with the default seed, plus a refused write
    send_word(8'hA5, 1'b1);
    @(posedge clk); #1;
    check(!done && !buf_full && !busy, "idle after done, refused word dropped");
    repeat (5) begin
      @(posedge clk); #1;
      check(!busy && !mod_valid, "no transfer of the refused word");
    end

    // re-programmed seed
    for (int i = 1; i <= 8; i++) s[i] = 8'($urandom);
    s[2][0] = 1'b1;
    program_seed(s);
    send_word(8'h3C, 1'b0);
    @(posedge clk); #1;

    // back-to-back words: write on the clock after done
    for (int w = 0; w < 6; w++) begin
      send_word(8'($urandom), 1'b0);
      @(posedge clk); #1;
      n_b2b++;
    end

    // reset in the middle of a word
    data = 8'hFF; cntrl = 1'b1;
    @(posedge clk); #1;
    cntrl = 1'b0;
    repeat (100) @(posedge clk);
    #1;
    check(busy && mod_valid, "transfer under way before reset");
    do_reset();
    n_abort++;
    repeat (3) begin
      @(posedge clk); #1;
      check(!busy && !mod_valid && !buf_full, "idle after reset");
    end
    send_word(8'h5A, 1'b0);

    $display("words=%0d refused=%0d reprogrammed=%0d back_to_back=%0d aborted=%0d",
             n_words, n_refused, n_reprog, n_b2b, n_abort);
    check(n_words > 0, "words transmitted");
    check(n_refused > 0, "write refused while full");
    check(n_reprog > 0, "PCS re-programmed");
    check(n_b2b > 0, "back-to-back words");
    check(n_abort > 0, "reset during a word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
