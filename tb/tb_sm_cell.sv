// tb_sm_cell: exhaustive self-checking testbench for sm_cell.
//
// Applies all sixteen combinations of x, y, bin and sel. The reference is
// worked out arithmetically: d = x - y - bin as an integer; the borrow is
// (d < 0), the difference bit is d mod 2; v0 must be that difference bit
// when sel = 1 and x when sel = 0. It checks the borrow output bo and v0
// separately. A watchdog ends a hung run with a failure.
module tb_sm_cell;
  logic x, y, bin, sel, bo, v0;
  logic exp_borrow, exp_v0;
  int d;
  int checks = 0, failures = 0;

  sm_cell dut (.x(x), .y(y), .bin(bin), .sel(sel), .bo(bo), .v0(v0));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {sel, x, y, bin} = 4'(i);
      #1;
      d          = int'(x) - int'(y) - int'(bin);
      exp_borrow = (d < 0);
      exp_v0     = sel ? 1'((d + 2) % 2) : x;
      checks++;
      if (bo !== (exp_borrow ^ 1'b0)) begin
        failures++;
        $display("FAIL borrow x=%b y=%b bin=%b sel=%b bo=%b", x, y, bin, sel, bo);
      end
      checks++;
      if (v0 !== exp_v0) begin
        failures++;
        $display("FAIL v0 x=%b y=%b bin=%b sel=%b v0=%b expected %b", x, y, bin, sel, v0, exp_v0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
