// set_or2: two-input single-electron OR.
//
// Structure as in the single-electron logic family: a NOR gate whose output
// drives an inverter.
//
// Interface: vo = vin1 | vin2. Combinational, no clock or reset.
module set_or2 (
  input  logic vin1,
  input  logic vin2,
  output logic vo
);
  logic nor_o;

  set_nor2 u_nor (.vin1(vin1), .vin2(vin2), .vo(nor_o));
  set_inv  u_inv (.vin(nor_o), .vo(vo));
endmodule
