// sm_cell_nb: subtract-multiplex cell with an inverted borrow output.
//
// The same cell as sm_cell with one inverter added on the borrow, so it
// delivers bo_n = ~borrow. It sits in the leftmost (most significant)
// column of the square-root array: there bo_n is 1 when the row's trial
// subtraction did not go negative, which is exactly the row's root bit and
// the select of every cell of that row.
//
// Interface: x, y, bin, sel -> bo_n, v0. Combinational, no clock or reset.
module sm_cell_nb (
  input  logic x,
  input  logic y,
  input  logic bin,
  input  logic sel,
  output logic bo_n,
  output logic v0
);
  logic bo;

  sm_cell u_cell (.x(x), .y(y), .bin(bin), .sel(sel), .bo(bo), .v0(v0));
  set_inv u_inv  (.vin(bo), .vo(bo_n));
endmodule
