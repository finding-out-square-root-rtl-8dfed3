// set_nor2: two-input single-electron NOR, logic model.
//
// Two p-type SETs in series pull the output up to Vd, two n-type SETs in
// parallel pull it to ground, so the output is high only when both inputs
// are low. Only the Boolean function is modelled.
//
// Interface: vo = ~(vin1 | vin2). Combinational, no clock or reset.
module set_nor2 (
  input  logic vin1,
  input  logic vin2,
  output logic vo
);
  always_comb vo = ~(vin1 | vin2);
endmodule
