// pcs_generator: pseudo-chaotic sequence (PCS) generator, one chip per clock.
//
// NUM_CELLS basic cells (pcs_cell) are cascaded. Cell k (k = 0 nearest the
// output) holds register R(2k+1) as its internal register and R(2k+2) as its
// shift register, so the default four cells hold R1..R8:
//   * 8-bit path: the sum of cell k+1 loads the internal register of cell k;
//     the far cell's internal register (R7) is loaded from its own shift
//     register (R8), closing the loop.
//   * output: the REG_W bits of cell 0's sum (R1 XOR R2) are XORed together
//     into one bit, the PCS chip.
//   * 1-bit path: the chip is fed back into the shift register of cell 0
//     (R2), whose top bit moves on into R4, then R6, then R8, i.e. the four
//     shift registers form one 32-bit shift chain.
//
// Programming: while load is high, reg_init is written on each clock into
// the register selected by sel_reg (0 selects R1, 7 selects R8) and the
// sequence does not advance. While run is high and load is low the
// generator steps once per clock. pcs_out is the chip of the current state
// (combinational from the registers) and is the chip consumed by the next
// step, so with run held high a new chip appears every clock.
//
// ready is low during reset and from the first clock after it. Reset loads
// the INIT seed into R1..R8 (INIT[8*i +: 8] is R(i+1)), so the generator
// is usable without programming; pcs_out is forced to 0 while ready is low.
// rst is synchronous and active high.
//
// The cascade of four cells with two 8-bit registers each, the XOR of the
// last cell's bits into the chip, its feedback, the load/sel_reg/reg_init
// programming and the ready flag follow the generator's description. The
// order of the shift chain, the register numbering of sel_reg, the seed,
// and load taking priority over run are this design's choices.
module pcs_generator #(
  parameter int unsigned REG_W     = dsss_pkg::DEF_REG_W,
  parameter int unsigned NUM_CELLS = dsss_pkg::DEF_NUM_CELLS,
  parameter int unsigned SEL_W     = $clog2(2 * NUM_CELLS),
  parameter logic [2*NUM_CELLS*REG_W-1:0] INIT = 64'hE10F_69A5_3C96_C35A
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,      // program the register chosen by sel_reg
  input  logic [SEL_W-1:0] sel_reg,   // 0 -> R1 ... 2*NUM_CELLS-1 -> R(2*NUM_CELLS)
  input  logic [REG_W-1:0] reg_init,  // value to program
  input  logic             run,       // advance one chip per clock
  output logic             pcs_out,   // current PCS chip
  output logic             ready      // generator initialised and usable
);

  logic [REG_W-1:0] sum   [NUM_CELLS];
  logic [REG_W-1:0] sh    [NUM_CELLS];
  logic             sout  [NUM_CELLS];
  logic             chip;
  logic             step;

  assign step = run && !load;
  assign chip = ^sum[0];

  for (genvar k = 0; k < NUM_CELLS; k++) begin : g_cell
    logic [REG_W-1:0] par_in;
    logic             ser_in;

    if (k == NUM_CELLS - 1) begin : g_far
      assign par_in = sh[k];
    end else begin : g_mid
      assign par_in = sum[k+1];
    end

    if (k == 0) begin : g_first
      assign ser_in = chip;
    end else begin : g_next
      assign ser_in = sout[k-1];
    end

    pcs_cell #(
      .REG_W   (REG_W),
      .INIT_INT(INIT[(2*k)*REG_W   +: REG_W]),
      .INIT_SH (INIT[(2*k+1)*REG_W +: REG_W])
    ) u_cell (
      .clk     (clk),
      .rst     (rst),
      .step    (step),
      .load_int(load && (32'(sel_reg) == 2*k)),
      .load_sh (load && (32'(sel_reg) == 2*k + 1)),
      .init    (reg_init),
      .par_in  (par_in),
      .ser_in  (ser_in),
      .sum     (sum[k]),
      .ser_out (sout[k]),
      .sh_q    (sh[k])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) ready <= 1'b0;
    else     ready <= 1'b1;
  end

  assign pcs_out = ready && chip;

endmodule
