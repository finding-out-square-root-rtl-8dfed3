// set_sqrt: restoring square-root array of subtract-multiplex cells.
//
// Takes a 2N-bit radicand and returns the N-bit root floor(sqrt(radicand))
// in one combinational pass, with no clock. The array has N rows, one per
// root bit, most significant first. Row k works like one step of pencil and
// paper restoring square root:
//   * the partial remainder of row k-1 gets the next two radicand bits
//     appended on the right;
//   * the row subtracts (Q, 0, 1), where Q is the root found so far;
//   * the inverted borrow out of its leftmost cell is root bit k: 1 when the
//     trial difference is not negative;
//   * that bit drives the select of every cell of the row, so each cell
//     passes on its difference (bit 1) or restores its minuend (bit 0).
// The remainder after row k is at most 2*Q, so it fits in k+1 bits; the
// most significant output of each row (from row 2 on) is therefore always 0
// and is not wired on. This gives 2 cells in row 1 and k+2 cells in row
// k >= 2: 51 cells for N = 8 (8 with inverted borrow, 43 without).
//
// Fractional results need no extra logic: reading the radicand with the
// binary point in its middle puts the point in the middle of the root, e.g.
// N = 16 gives an 8.8 root of a 16.16 radicand.
//
// Bit order: radicand[2N-1] is the most significant bit and enters row 1;
// root[N-1] comes out of row 1. The default N = 8 (16-bit radicand, 8-bit
// root) is the size of the reference circuit; its longest path runs through
// the borrow chains of all rows.
//
// The cell counts, the constants fed to each row and the leftmost-column
// cells with inverted borrow are those of the reference SET circuit. Own
// choices here: no registers between rows (its "stages" are rows of one
// combinational array), and only the root is brought out, not the final
// remainder, so the last row's outputs and the top output of each row stay
// unused by design.
//
// Interface: radicand (2N bits) -> root (N bits). Combinational, no clock or
// reset.
module set_sqrt #(
  parameter int unsigned N = 8    // root width; radicand is 2N bits
) (
  input  logic [2*N-1:0] radicand,
  output logic [N-1:0]   root
);

  for (genvar k = 1; k <= N; k++) begin : row
    // cells in this row, numbered from the right (LSB, j = 0) to the left
    localparam int unsigned W = (k == 1) ? 2 : k + 2;
    logic q;   // root bit of this row: inverted borrow of the leftmost cell

    for (genvar j = 0; j < W; j++) begin : c
      logic x, y, bin, bo, v0;

      // minuend: two new radicand bits on the right, the remainder of the
      // previous row above them
      if (j == 0) begin : g_x_lo
        assign x = radicand[2*N-2*k];
      end else if (j == 1) begin : g_x_hi
        assign x = radicand[2*N-2*k+1];
      end else begin : g_x_rem
        assign x = row[k-1].c[j-2].v0;
      end

      // subtrahend (Q, 0, 1): Q[i] is root bit root[N-k+1+i]
      if (j == 0) begin : g_y_one
        assign y = 1'b1;
      end else if (j == 1 || j == W - 1) begin : g_y_zero
        assign y = 1'b0;
      end else begin : g_y_root
        assign y = root[N-k-1+j];
      end

      if (j == 0) begin : g_bin_zero
        assign bin = 1'b0;
      end else begin : g_bin_chain
        assign bin = c[j-1].bo;
      end

      if (j == W - 1) begin : g_left
        // leftmost cell: complemented borrow is the root bit
        logic bo_n;
        sm_cell_nb u_cell (.x(x), .y(y), .bin(bin), .sel(q), .bo_n(bo_n), .v0(v0));
        assign bo = ~bo_n;
        assign q  = bo_n;
      end else begin : g_mid
        sm_cell u_cell (.x(x), .y(y), .bin(bin), .sel(q), .bo(bo), .v0(v0));
      end
    end

    assign root[N-k] = q;
  end

endmodule
