// set_xor2: two-input exclusive OR from one single-electron transistor.
//
// A SET with two equal gate capacitors has a conductance that oscillates with
// the total gate charge: with both gates at 0 V or both at 16 mV it sits in
// Coulomb blockade and the load capacitor stays low; with exactly one gate
// high it conducts and the output goes high. That single device therefore
// replaces the usual multi-transistor XOR. Only the Boolean function is
// modelled.
//
// Interface: vo = vg1 ^ vg2. Combinational, no clock or reset.
module set_xor2 (
  input  logic vg1,
  input  logic vg2,
  output logic vo
);
  always_comb vo = vg1 ^ vg2;
endmodule
