// Isolation gates placed on the lines leaving a block that can be switched off.
// Each line goes through a 2-input AND whose second input (the isolation control
// input B) is iso_n: when the source block is off, iso_n is driven low and every
// output is forced low, so no floating line reaches a powered input. Purely
// combinational. The AND-cell isolation follows the document; the vector width
// is a parameter.
module iso_and #(
  parameter int unsigned W = 1
) (
  input  logic         iso_n,
  input  logic [W-1:0] a,
  output logic [W-1:0] z
);
  assign z = a & {W{iso_n}};
endmodule
