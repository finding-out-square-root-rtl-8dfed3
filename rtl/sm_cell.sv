// sm_cell: subtract-multiplex (SM) cell of the restoring square-root array.
//
// A full subtractor forms x - y - bin and its borrow bo; a 2:1 multiplexer
// then gives v0 = diff when sel = 1 (the trial subtraction of the row is
// kept) and v0 = x when sel = 0 (the row restores its minuend). The borrow
// bo always comes from the subtractor, whatever sel is, so the borrow chain
// of a row settles before its select is known.
//
// The select polarity (1 = keep the difference) is the one that makes the
// row's own inverted borrow, i.e. its root bit, usable as the select.
//
// Interface: x, y, bin, sel -> bo, v0. Combinational, no clock or reset.
module sm_cell (
  input  logic x,
  input  logic y,
  input  logic bin,
  input  logic sel,
  output logic bo,
  output logic v0
);
  logic diff;

  set_sub  u_sub (.x(x), .y(y), .bin(bin), .diff(diff), .bout(bo));
  set_mux2 u_mux (.vin1(x), .vin2(diff), .sel(sel), .vo(v0));
endmodule
