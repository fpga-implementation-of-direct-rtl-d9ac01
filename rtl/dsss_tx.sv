// dsss_tx: direct-sequence spread-spectrum (DS-SS) transmitter whose
// spreading code is a pseudo-chaotic sequence (PCS) instead of an LFSR
// m-sequence.
//
// Data path: a DATA_W-bit word from the message source is written into
// tx_buffer (data + cntrl strobe). tx_control takes it, and for each bit,
// most significant first, runs pcs_generator for CHIPS_PER_BIT clocks while
// spread_multiplier XORs the bit with every chip. One word therefore leaves
// as DATA_W * CHIPS_PER_BIT chips on mod_out (256 by default), one chip per
// clock, framed by mod_valid.
//
// Operation:
//   1. Optionally program the generator: hold load high with sel_reg
//      selecting R1..R8 (0..7) and reg_init the value, one register per
//      clock. Reset already loads a default seed.
//   2. ready_out rises the clock after reset; the control circuit waits for
//      it.
//   3. When buf_full is low, present data and pulse cntrl for one clock.
//   4. The control circuit raises busy and run_txr for 256 clocks; mod_out
//      carries the chips one clock behind run_txr, marked by mod_valid.
//   5. done is high for one clock at the end, busy low; the buffer accepts
//      the next word from then on.
//
// Latency: the word is taken 2 clocks after the cntrl pulse (buffer, then
// control), the first chip appears on mod_out one clock later, and a word
// occupies DATA_W*CHIPS_PER_BIT + 2 clocks of the control circuit.
// rst is synchronous and active high.
//
// The four blocks and their connections (data, reload, busy, done, run,
// ready, enable, the data bus and the PCS output), and the ports data,
// cntrl, load, sel_reg, reg_init, mod_out, ready_out and run_txr follow the
// transmitter's block diagram. mod_valid, busy, done and buf_full are
// brought out as ports by this design so that a message source and a
// receiver model can follow the transfer.
module dsss_tx #(
  parameter int unsigned REG_W         = dsss_pkg::DEF_REG_W,
  parameter int unsigned NUM_CELLS     = dsss_pkg::DEF_NUM_CELLS,
  parameter int unsigned DATA_W        = dsss_pkg::DEF_DATA_W,
  parameter int unsigned CHIPS_PER_BIT = dsss_pkg::DEF_CHIPS_PER_BIT,
  parameter int unsigned SEL_W         = $clog2(2 * NUM_CELLS)
) (
  input  logic              clk,
  input  logic              rst,
  // message source
  input  logic [DATA_W-1:0] data,       // parallel data word
  input  logic              cntrl,      // write strobe for data
  output logic              buf_full,   // buffer holds a word, cntrl ignored
  output logic              busy,       // a word is being transmitted
  output logic              done,       // one-clock pulse after a word
  // PCS programming
  input  logic              load,       // write reg_init into register sel_reg
  input  logic [SEL_W-1:0]  sel_reg,    // 0 -> R1 ... 7 -> R8
  input  logic [REG_W-1:0]  reg_init,   // register value
  output logic              ready_out,  // PCS generator ready
  // spread output
  output logic              run_txr,    // PCS generator running
  output logic              mod_out,    // spread chip
  output logic              mod_valid   // mod_out holds a chip
);

  logic [DATA_W-1:0] buf_data;
  logic              reload;
  logic              run;
  logic              enable;
  logic              data_bit;
  logic              pcs_out;
  logic              ready;

  tx_buffer #(.DATA_W(DATA_W)) u_buffer (
    .clk     (clk),
    .rst     (rst),
    .data_in (data),
    .cntrl   (cntrl),
    .busy    (busy),
    .done    (done),
    .data_out(buf_data),
    .reload  (reload),
    .buf_full(buf_full)
  );

  tx_control #(.DATA_W(DATA_W), .CHIPS_PER_BIT(CHIPS_PER_BIT)) u_control (
    .clk     (clk),
    .rst     (rst),
    .ready   (ready),
    .reload  (reload),
    .data_in (buf_data),
    .run     (run),
    .enable  (enable),
    .data_bit(data_bit),
    .busy    (busy),
    .done    (done)
  );

  pcs_generator #(.REG_W(REG_W), .NUM_CELLS(NUM_CELLS), .SEL_W(SEL_W)) u_pcs (
    .clk     (clk),
    .rst     (rst),
    .load    (load),
    .sel_reg (sel_reg),
    .reg_init(reg_init),
    .run     (run),
    .pcs_out (pcs_out),
    .ready   (ready)
  );

  spread_multiplier u_mult (
    .clk      (clk),
    .rst      (rst),
    .enable   (enable),
    .data_bit (data_bit),
    .pcs_chip (pcs_out),
    .mod_out  (mod_out),
    .mod_valid(mod_valid)
  );

  assign ready_out = ready;
  assign run_txr   = run;

endmodule
