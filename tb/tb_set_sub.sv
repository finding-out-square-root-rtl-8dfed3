// tb_set_sub: exhaustive self-checking testbench for set_sub.
//
// Checks all eight input combinations in two independent ways: against the
// full-subtractor truth table (difference and borrow columns written out as
// constants indexed by {x, y, bin}), and arithmetically, x - y - bin as a
// signed 3-bit number equals diff - 2*bout. A watchdog ends a hung run.
module tb_set_sub;
  // index {x,y,bin}: 000 001 010 011 100 101 110 111 (bit 0 = row 000)
  localparam logic [7:0] DIFF_COL = 8'b1001_0110;
  localparam logic [7:0] BOUT_COL = 8'b1000_1110;

  logic x, y, bin, diff, bout;
  int checks = 0, failures = 0;

  set_sub dut (.x(x), .y(y), .bin(bin), .diff(diff), .bout(bout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, bin} = 3'(i);
      #1;
      checks++;
      if (diff !== DIFF_COL[i] || bout !== BOUT_COL[i]) begin
        failures++;
        $display("FAIL table x=%b y=%b bin=%b diff=%b bout=%b", x, y, bin, diff, bout);
      end
      checks++;
      if (int'(x) - int'(y) - int'(bin) != int'(diff) - 2 * int'(bout)) begin
        failures++;
        $display("FAIL arith x=%b y=%b bin=%b diff=%b bout=%b", x, y, bin, diff, bout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
