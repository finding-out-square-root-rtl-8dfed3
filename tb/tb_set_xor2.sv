// tb_set_xor2: exhaustive self-checking testbench for set_xor2.
//
// Applies all four gate-voltage pairs and compares the output with the XOR
// truth table, written as a constant indexed by {vg1, vg2}: low for equal
// inputs, high for one input high. A watchdog ends a hung run with a failure.
module tb_set_xor2;
  localparam logic [3:0] TRUTH = 4'b0110;

  logic vg1, vg2, vo;
  int checks = 0, failures = 0;

  set_xor2 dut (.vg1(vg1), .vg2(vg2), .vo(vo));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {vg1, vg2} = 2'(i);
      #1;
      checks++;
      if (vo !== TRUTH[i]) begin
        failures++;
        $display("FAIL vg1=%b vg2=%b vo=%b expected %b", vg1, vg2, vo, TRUTH[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
