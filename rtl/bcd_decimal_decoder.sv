// bcd_decimal_decoder: one 8251 BCD-to-decimal decoder.
//
// The four inputs D (weight 8), C, B and A (weight 1) form a code; output
// y_n[k] goes low when the code equals k for k = 0..9. Codes 10 to 15 leave
// every output high. The interface uses input D as an active-low enable:
// with D low the three bits C, B, A select one of outputs 0 to 7, and with
// D high only outputs 8 and 9 can go low, and those are left unconnected.
// Purely combinational, no clock.
`timescale 1ns / 1ps

module bcd_decimal_decoder (
  input  logic [3:0] dcba,  // {D, C, B, A}, active high
  output logic [9:0] y_n    // decimal outputs, active low
);

  always_comb begin
    y_n = '1;
    if (dcba <= 4'd9) y_n[dcba] = 1'b0;
  end

endmodule
