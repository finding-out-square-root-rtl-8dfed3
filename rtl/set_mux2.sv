// set_mux2: single-electron 2:1 multiplexer.
//
// Two AND gates form vin1 & ~sel and vin2 & sel, and an OR gate combines
// them, so vo = vin1 when sel = 0 and vo = vin2 when sel = 1. Every gate is
// the single-electron NAND/NOR-plus-inverter structure. The complement of sel
// is made here by an inverter (the stand-alone multiplexer drawing takes it
// as an input; the square-root cell draws the inverter in front of it).
//
// Interface: vin1, vin2, sel -> vo. Combinational, no clock or reset.
module set_mux2 (
  input  logic vin1,
  input  logic vin2,
  input  logic sel,
  output logic vo
);
  logic sel_n;
  logic leg1;   // vin1 & ~sel
  logic leg2;   // vin2 & sel

  set_inv  u_inv  (.vin(sel), .vo(sel_n));
  set_and2 u_and1 (.vin1(vin1), .vin2(sel_n), .vo(leg1));
  set_and2 u_and2 (.vin1(vin2), .vin2(sel),   .vo(leg2));
  set_or2  u_or   (.vin1(leg1), .vin2(leg2),  .vo(vo));
endmodule
