// tx_buffer: one-word input buffer between the message source and the
// transmit control circuit.
//
// The message source presents a DATA_W-bit word on data_in and pulses cntrl
// for one clock; the buffer accepts it only while it is empty (buf_full
// low), stores it and raises reload, telling the control circuit a word is
// waiting. data_out shows the stored word. When the control circuit takes
// the word it raises busy; the buffer then drops reload but stays full
// until the control circuit signals done at the end of the transmission.
// A new word is therefore accepted from the clock after done, and exactly
// one word is in flight at a time.
//
//   EMPTY --cntrl--> FULL (reload=1) --busy--> SENT --done--> EMPTY
//
// A cntrl pulse while buf_full is high is ignored; the source must wait.
// Two assertions check that busy only rises while reload is offered and
// that done only arrives for a word that was taken.
// rst is synchronous and active high and empties the buffer.
//
// The parallel data input, the reload request and the busy and done
// signals returned by the control circuit follow the transmitter's block
// diagram. The cntrl strobe as the write request, the one-word depth and
// the handshake above are this design's choices.
module tx_buffer
  import dsss_pkg::*;
#(
  parameter int unsigned DATA_W = dsss_pkg::DEF_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] data_in,   // parallel word from the source
  input  logic              cntrl,     // write strobe from the source
  input  logic              busy,      // control circuit is transmitting
  input  logic              done,      // control circuit finished a word
  output logic [DATA_W-1:0] data_out,  // stored word, to the control circuit
  output logic              reload,    // a word waits for the control circuit
  output logic              buf_full   // buffer cannot accept a word
);

  buf_state_e state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= BUF_EMPTY;
      data_out <= '0;
    end else begin
      unique case (state)
        BUF_EMPTY: if (cntrl) begin
          data_out <= data_in;
          state    <= BUF_FULL;
        end
        BUF_FULL:  if (busy) state <= BUF_SENT;
        BUF_SENT:  if (done) state <= BUF_EMPTY;
        default:   state <= BUF_EMPTY;
      endcase
    end
  end

  assign reload   = (state == BUF_FULL);
  assign buf_full = (state != BUF_EMPTY);

  // Handshake rules the control circuit must keep: it only becomes busy
  // for a word the buffer offered, and only signals done for a word it took.
  a_busy_after_reload: assert property (@(posedge clk) disable iff (rst)
    $rose(busy) |-> $past(reload))
    else $error("busy rose without a buffered word");
  a_done_when_sent: assert property (@(posedge clk) disable iff (rst)
    done |-> (state == BUF_SENT))
    else $error("done while the buffer holds no word in flight");

endmodule
