// tb_set_or2: exhaustive self-checking testbench for set_or2 (two-input OR).
//
// Applies all four input pairs and compares the output with the gate's
// truth table, written here as a constant indexed by {vin1, vin2}. A
// watchdog ends the run with a failure if it does not finish in time.
module tb_set_or2;
  localparam logic [3:0] TRUTH = 4'b1110;  // bit {vin1,vin2}: expected vo

  logic vin1, vin2, vo;
  int checks = 0, failures = 0;

  set_or2 dut (.vin1(vin1), .vin2(vin2), .vo(vo));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {vin1, vin2} = 2'(i);
      #1;
      checks++;
      if (vo !== TRUTH[i]) begin
        failures++;
        $display("FAIL vin1=%b vin2=%b vo=%b expected %b", vin1, vin2, vo, TRUTH[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
