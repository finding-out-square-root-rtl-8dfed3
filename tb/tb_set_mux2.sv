// tb_set_mux2: exhaustive self-checking testbench for set_mux2.
//
// Applies all eight combinations of vin1, vin2 and sel. The expected output
// is picked by an if/else on sel (vin1 for sel = 0, vin2 for sel = 1), not
// by the AND/OR equation the multiplexer is built from. A watchdog ends a
// hung run with a failure.
module tb_set_mux2;
  logic vin1, vin2, sel, vo, expected;
  int checks = 0, failures = 0;

  set_mux2 dut (.vin1(vin1), .vin2(vin2), .sel(sel), .vo(vo));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, vin2, vin1} = 3'(i);
      #1;
      if (sel) expected = vin2;
      else     expected = vin1;
      checks++;
      if (vo !== expected) begin
        failures++;
        $display("FAIL sel=%b vin1=%b vin2=%b vo=%b", sel, vin1, vin2, vo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
