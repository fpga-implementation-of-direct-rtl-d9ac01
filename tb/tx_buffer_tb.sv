// tx_buffer_tb: self-checking test of the one-word input buffer.
//
// A behavioural control-circuit model answers reload with busy after a
// random delay and, a random time later, drops busy and pulses done. The
// source writes random words with cntrl at random times, also while the
// buffer is full. Each clock the test compares reload, buf_full and
// data_out with a model of the EMPTY/FULL/SENT handshake, and checks that
// every word the control model takes is the last word the buffer accepted
// and that a write while full is ignored.
module tx_buffer_tb;

  logic       clk = 1'b0;
  logic       rst, cntrl, busy, done, reload, buf_full;
  logic [7:0] data_in, data_out;

  int checks = 0, failures = 0;
  int taken = 0, rejected = 0;
  int m_state;          // 0 empty, 1 full, 2 sent
  logic [7:0] m_data;
  int ctl_state, ctl_wait;
  logic rl;
  logic [7:0] dq, last_acc;

  tx_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; cntrl = 0; busy = 0; done = 0; data_in = 0;
    @(posedge clk); #1;
    rst = 1'b0;
    m_state = 0; m_data = 0; last_acc = 0; ctl_state = 0; ctl_wait = 0;
    for (int t = 0; t < 4000; t++) begin
      check(reload   == (m_state == 1), "reload");
      check(buf_full == (m_state != 0), "buf_full");
      check(data_out == m_data, "data_out");
      // source
      cntrl   = ($urandom_range(0, 5) == 0);
      data_in = 8'($urandom);
      // control-circuit model: 0 idle, 1 busy, 2 done pulse
      busy = (ctl_state == 1);
      done = (ctl_state == 2);
      rl = reload;
      dq = data_out;
      @(posedge clk); #1;
      // control model reacts to what it saw at this edge
      unique case (ctl_state)
        0: if (rl && ctl_wait == 0) begin
             check(dq == last_acc, "word taken");
             taken++; ctl_state = 1; ctl_wait = $urandom_range(1, 20);
           end else if (ctl_wait > 0) ctl_wait--;
           else if (rl) ctl_wait = $urandom_range(0, 3);
        1: if (--ctl_wait == 0) ctl_state = 2;
        2: ctl_state = 0;
        default: ;
      endcase
      // buffer model, from the inputs seen at the edge
      unique case (m_state)
        0: if (cntrl) begin m_state = 1; m_data = data_in; last_acc = data_in; end
        1: begin if (cntrl) rejected++; if (busy) m_state = 2; end
        2: begin if (cntrl) rejected++; if (done) m_state = 0; end
        default: ;
      endcase
    end
    check(taken > 20, "words handed over");
    check(rejected > 20, "writes while full seen");
    $display("taken=%0d rejected=%0d", taken, rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
