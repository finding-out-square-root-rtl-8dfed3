// set_sub: one-bit full subtractor from single-electron gates.
//
// Computes x - y - bin:
//   diff = x ^ y ^ bin
//   bout = (~x & y) | (~(x ^ y) & bin)
// The gate structure is the one of the single-electron subtractor: two
// one-SET XOR gates in a chain give the difference; inverters make ~x and
// ~(x ^ y); two AND gates and an OR gate give the borrow.
//
// Interface: x, y, bin -> diff, bout. Combinational, no clock or reset.
module set_sub (
  input  logic x,
  input  logic y,
  input  logic bin,
  output logic diff,
  output logic bout
);
  logic x_n;       // ~x
  logic xy;        // x ^ y
  logic xy_n;      // ~(x ^ y)
  logic b_gen;     // ~x & y : borrow generated here
  logic b_pass;    // ~(x ^ y) & bin : incoming borrow passed on

  set_xor2 u_xor1 (.vg1(x),  .vg2(y),   .vo(xy));
  set_xor2 u_xor2 (.vg1(xy), .vg2(bin), .vo(diff));
  set_inv  u_invx (.vin(x),  .vo(x_n));
  set_inv  u_invd (.vin(xy), .vo(xy_n));
  set_and2 u_and1 (.vin1(x_n),  .vin2(y),   .vo(b_gen));
  set_and2 u_and2 (.vin1(xy_n), .vin2(bin), .vo(b_pass));
  set_or2  u_or   (.vin1(b_gen), .vin2(b_pass), .vo(bout));
endmodule
