// pcs_cell_tb: self-checking test of one PCS basic cell.
//
// Drives random step, load, init, par_in and ser_in for 2000 clocks, with
// one reset in the middle, and compares sum, ser_out and sh_q every clock
// with a behavioural model of the two registers (internal register loaded
// in parallel, shift register moving towards the top bit).
module pcs_cell_tb;

  localparam logic [7:0] I_INT = 8'h3C;
  localparam logic [7:0] I_SH  = 8'hA7;

  logic       clk = 1'b0;
  logic       rst;
  logic       step, load_int, load_sh, ser_in, ser_out;
  logic [7:0] init, par_in, sum, sh_q;

  int checks = 0, failures = 0;
  logic [7:0] m_int, m_sh;

  pcs_cell #(.REG_W(8), .INIT_INT(I_INT), .INIT_SH(I_SH)) dut (.*);

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
    rst = 1'b1; step = 0; load_int = 0; load_sh = 0; ser_in = 0; init = 0; par_in = 0;
    @(posedge clk); #1;
    rst = 1'b0;
    m_int = I_INT; m_sh = I_SH;
    for (int t = 0; t < 2000; t++) begin
      check(sum == (m_int ^ m_sh), "sum");
      check(ser_out == m_sh[7], "ser_out");
      check(sh_q == m_sh, "sh_q");
      step     = ($urandom_range(0, 3) != 0);
      load_int = ($urandom_range(0, 9) == 0);
      load_sh  = ($urandom_range(0, 9) == 0);
      init     = 8'($urandom);
      par_in   = 8'($urandom);
      ser_in   = 1'($urandom);
      rst      = (t == 1000);
      @(posedge clk); #1;
      if (rst) begin
        m_int = I_INT; m_sh = I_SH;
      end else begin
        if (load_int) m_int = init; else if (step) m_int = par_in;
        if (load_sh)  m_sh  = init; else if (step) m_sh  = {m_sh[6:0], ser_in};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
