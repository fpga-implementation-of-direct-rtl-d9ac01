// spread_multiplier: spreads one data bit with one PCS chip.
//
// With the usual binary-to-antipodal mapping (0 -> +1, 1 -> -1) the product
// of the data bit and the chip is their exclusive OR, so each enabled clock
// registers mod_out = data_bit XOR pcs_chip and sets mod_valid. While
// enable is low mod_out and mod_valid are 0. With the data bit held for 32
// clocks this turns one bit into 32 spread chips.
//
// Timing: one register stage, so mod_out and mod_valid follow enable,
// data_bit and pcs_chip by one clock. rst is synchronous and active high.
//
// Multiplying the serial data bit by the PCS chips under an enable from the
// control circuit follows the transmitter's description; realising the
// product as XOR, the output register and mod_valid are this design's
// choices.
module spread_multiplier (
  input  logic clk,
  input  logic rst,
  input  logic enable,    // from the control circuit
  input  logic data_bit,  // data bit being spread
  input  logic pcs_chip,  // chip from the PCS generator
  output logic mod_out,   // spread chip
  output logic mod_valid  // mod_out holds a chip
);

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      mod_out   <= 1'b0;
      mod_valid <= 1'b0;
    end else begin
      mod_out   <= data_bit ^ pcs_chip;
      mod_valid <= 1'b1;
    end
  end

endmodule
