// set_inv: single-electron inverter, logic model.
//
// Two single-electron transistors in series between the bias supply and
// ground share one input gate; a low input leaves the upper device
// conducting and the lower one in Coulomb blockade, so the output is high,
// and a high input swaps the two. Only the resulting Boolean function is
// modelled here: logic 1 stands for the 16 mV level (0.1 e/C with C = 1 aF),
// logic 0 for 0 V.
//
// Interface: vin -> vo = ~vin. Purely combinational, no clock or reset; the
// physical device switches in about 8 ns (two tunnelling events), which is
// not modelled.
module set_inv (
  input  logic vin,
  output logic vo
);
  always_comb vo = ~vin;
endmodule
