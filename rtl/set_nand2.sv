// set_nand2: two-input single-electron NAND, logic model.
//
// Built like a CMOS NAND: two p-type SETs in parallel pull the output up to
// Vd, two n-type SETs in series pull it to ground. The output is low only
// when both inputs are high. Only the Boolean function is modelled.
//
// Interface: vo = ~(vin1 & vin2). Combinational, no clock or reset.
module set_nand2 (
  input  logic vin1,
  input  logic vin2,
  output logic vo
);
  always_comb vo = ~(vin1 & vin2);
endmodule
