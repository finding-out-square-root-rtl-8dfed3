// tb_set_inv: self-checking testbench for set_inv.
//
// Drives both input levels and checks that the output is the opposite one.
// A watchdog ends a hung run with a failure.
module tb_set_inv;
  logic vin, vo;
  int checks = 0, failures = 0;

  set_inv dut (.vin(vin), .vo(vo));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      vin = 1'(i);
      #1;
      checks++;
      if (vo !== (i == 0 ? 1'b1 : 1'b0)) begin
        failures++;
        $display("FAIL vin=%b vo=%b", vin, vo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
