// ul_nand: N-input NAND gate, the only gate type of the NAND-NAND adder cell.
// Tying several inputs to one net makes it an inverter, as the cell
// schematics do. Combinational, no timing of its own.
module ul_nand #(
  parameter int N = 2
) (
  input  logic [N-1:0] a,
  output logic         y
);
  assign y = ~(&a);
endmodule
