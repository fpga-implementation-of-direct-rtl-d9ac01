// tx_control: control circuit of the DS-SS transmitter.
//
// In IDLE it waits until the PCS generator is ready and the buffer raises
// reload. It then copies the buffered word into its own register and enters
// SPREAD, where run (to the PCS generator), enable (to the multiplier) and
// busy (to the buffer) are high. Each clock in SPREAD is one chip: the
// current data bit is held on data_bit for CHIPS_PER_BIT clocks, then the
// next bit follows, most significant bit first. After DATA_W * CHIPS_PER_BIT
// clocks (8 x 32 = 256 by default) it spends one clock in DONE with done
// high and busy low, and returns to IDLE.
//
// Timing: all outputs are decoded from the state register (Moore outputs).
// A word is taken on the clock edge where state is IDLE and ready and reload
// are high; run is then high for exactly DATA_W*CHIPS_PER_BIT clocks,
// followed by one clock of done. rst is synchronous and active high.
//
// Assertions check the start condition and the busy/done ordering.
//
// The sequence ready -> reload -> run/enable/busy -> 32 chips per bit for 8
// bits -> done with busy low follows the transmitter's operating procedure.
// The bit order and the one-clock done are this design's choices.
module tx_control
  import dsss_pkg::*;
#(
  parameter int unsigned DATA_W        = dsss_pkg::DEF_DATA_W,
  parameter int unsigned CHIPS_PER_BIT = dsss_pkg::DEF_CHIPS_PER_BIT
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ready,     // PCS generator initialised
  input  logic              reload,    // buffer holds a word
  input  logic [DATA_W-1:0] data_in,   // the buffered word
  output logic              run,       // advance the PCS generator
  output logic              enable,    // enable the multiplier
  output logic              data_bit,  // data bit being spread (data bus)
  output logic              busy,      // transmission in progress
  output logic              done       // word fully transmitted
);

  localparam int unsigned CW = (CHIPS_PER_BIT > 1) ? $clog2(CHIPS_PER_BIT) : 1;
  localparam int unsigned BW = (DATA_W > 1) ? $clog2(DATA_W) : 1;

  ctrl_state_e       state;
  logic [DATA_W-1:0] word_q;
  logic [CW-1:0]     chip_cnt;
  logic [BW-1:0]     bit_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= CTRL_IDLE;
      word_q   <= '0;
      chip_cnt <= '0;
      bit_cnt  <= '0;
    end else begin
      unique case (state)
        CTRL_IDLE: if (ready && reload) begin
          word_q   <= data_in;
          chip_cnt <= '0;
          bit_cnt  <= '0;
          state    <= CTRL_SPREAD;
        end
        CTRL_SPREAD: begin
          if (32'(chip_cnt) == CHIPS_PER_BIT - 1) begin
            chip_cnt <= '0;
            if (32'(bit_cnt) == DATA_W - 1) state   <= CTRL_DONE;
            else                            bit_cnt <= bit_cnt + 1'b1;
          end else begin
            chip_cnt <= chip_cnt + 1'b1;
          end
        end
        CTRL_DONE: state <= CTRL_IDLE;
        default:   state <= CTRL_IDLE;
      endcase
    end
  end

  assign run      = (state == CTRL_SPREAD);
  assign enable   = (state == CTRL_SPREAD);
  assign busy     = (state == CTRL_SPREAD);
  assign done     = (state == CTRL_DONE);
  assign data_bit = word_q[DATA_W-1-32'(bit_cnt)];

  // A word starts only when the generator is ready and a word is offered,
  // and every word is followed by done with busy low.
  a_start_ready: assert property (@(posedge clk) disable iff (rst)
    $rose(busy) |-> $past(ready && reload))
    else $error("transmission started without ready and reload");
  a_done_follows_busy: assert property (@(posedge clk) disable iff (rst)
    $fell(busy) |-> done)
    else $error("busy fell without done");
  a_done_not_busy: assert property (@(posedge clk) disable iff (rst)
    !(done && busy))
    else $error("done and busy together");

endmodule
