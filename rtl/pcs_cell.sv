// pcs_cell: one basic cell of the pseudo-chaotic sequence (PCS) generator.
//
// A cell holds two programmable REG_W-bit registers:
//   * the internal register, loaded in parallel from par_in on every step;
//   * the shift register, which moves one bit per step: ser_in enters at
//     bit 0 and bit REG_W-1 leaves on ser_out.
// The cell's REG_W-bit output, sum, is the modulo-2 (bitwise XOR) sum of the
// two registers. Cells are chained by the generator: sum feeds the next
// cell's par_in and ser_out feeds the previous cell's ser_in.
//
// Timing: sum, ser_out and sh_q are taken straight from the registers. Both
// registers change on the rising clock edge when step is high. A load
// (load_int or load_sh) writes init into that register and has priority
// over step for that register; the other register still steps. rst
// (synchronous, active high) restores INIT_INT and INIT_SH.
//
// The two registers, the modulo-2 adder and the one-bit and eight-bit paths
// follow the cell's block diagram. The shift direction inside the shift
// register, the parallel load into the internal register on every step and
// the reset values are this design's choices.
module pcs_cell #(
  parameter int unsigned       REG_W    = dsss_pkg::DEF_REG_W,
  parameter logic [REG_W-1:0]  INIT_INT = '0,
  parameter logic [REG_W-1:0]  INIT_SH  = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             step,      // advance the cell by one chip
  input  logic             load_int,  // write init into the internal register
  input  logic             load_sh,   // write init into the shift register
  input  logic [REG_W-1:0] init,      // programmed value
  input  logic [REG_W-1:0] par_in,    // next value of the internal register
  input  logic             ser_in,    // bit shifted into the shift register
  output logic [REG_W-1:0] sum,       // internal XOR shift register
  output logic             ser_out,   // bit leaving the shift register
  output logic [REG_W-1:0] sh_q       // shift register contents
);

  logic [REG_W-1:0] int_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      int_q <= INIT_INT;
      sh_q  <= INIT_SH;
    end else begin
      if (load_int)  int_q <= init;
      else if (step) int_q <= par_in;

      if (load_sh)   sh_q <= init;
      else if (step) sh_q <= {sh_q[REG_W-2:0], ser_in};
    end
  end

  assign sum     = int_q ^ sh_q;
  assign ser_out = sh_q[REG_W-1];

endmodule
