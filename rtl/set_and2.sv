// set_and2: two-input single-electron AND.
//
// Structure as in the single-electron logic family: a NAND gate whose
// output drives an inverter. The two sub-gates are instantiated so the
// netlist keeps the same gate count as the device-level circuit.
//
// Interface: vo = vin1 & vin2. Combinational, no clock or reset.
module set_and2 (
  input  logic vin1,
  input  logic vin2,
  output logic vo
);
  logic nand_o;

  set_nand2 u_nand (.vin1(vin1), .vin2(vin2), .vo(nand_o));
  set_inv   u_inv  (.vin(nand_o), .vo(vo));
endmodule
