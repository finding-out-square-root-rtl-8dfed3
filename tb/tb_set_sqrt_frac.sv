// tb_set_sqrt_frac: the 16-row array used with the binary point in the
// middle (16.16 radicand in, 8.8 root out).
//
// Widening the array to 16 rows takes a 32-bit radicand. Read as a fixed
// point number with 16 fraction bits, its root comes out with 8 fraction
// bits and no other change. This testbench applies published reference
// cases:
//   * integers 43711, 30950, 245, 62259 -> 209.0703125, 175.92578125,
//     15.65234375, 249.515625 (root * 256 = 53522, 45037, 4007, 63876);
//   * 16.16 radicands 0xAF8E399B, 0x4777CCCC, 0x000A0005, 0x0000C000
//     -> 8.8 roots 0xD3FE, 0x8743, 0x0329, 0x00DD;
//   * 1014 -> 11111.11010111 (0x1FD7).
// It then checks 20000 random radicands plus corner values against a
// bit-by-bit reference: the root is built from the top bit down, a bit kept
// when the square of the trial root does not exceed the radicand.
// A watchdog ends a hung run with a failure.
module tb_set_sqrt_frac;
  localparam int N = 16;

  logic [2*N-1:0] radicand;
  logic [N-1:0]   root;
  int checks = 0, failures = 0;

  set_sqrt #(.N(N)) dut (.radicand(radicand), .root(root));

  function automatic logic [N-1:0] ref_sqrt(logic [2*N-1:0] v);
    logic [N-1:0] q = '0;
    for (int b = N - 1; b >= 0; b--) begin
      logic [N-1:0] t = q | (N'(1) << b);
      if (64'(t) * 64'(t) <= 64'(v)) q = t;
    end
    return q;
  endfunction

  task automatic check(logic [2*N-1:0] v, logic [N-1:0] expected);
    radicand = v;
    #1;
    checks++;
    if (root !== expected) begin
      failures++;
      $display("FAIL radicand=%h root=%h expected %h", v, root, expected);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'd43711 << 16, 16'd53522);
    check(32'd30950 << 16, 16'd45037);
    check(32'd245   << 16, 16'd4007);
    check(32'd62259 << 16, 16'd63876);
    check(32'b1010111110001110_0011100110011011, 16'b11010011_11111110);
    check(32'b0100011101110111_1100110011001100, 16'b10000111_01000011);
    check(32'b0000000000001010_0000000000000101, 16'b00000011_00101001);
    check(32'b0000000000000000_1100000000000000, 16'b00000000_11011101);
    check(32'd1014 << 16, 16'b11111_11010111);

    check(32'd0, 16'd0);
    check(32'hFFFF_FFFF, 16'hFFFF);
    check(32'hFFFE_0001, 16'hFFFF);
    check(32'hFFFE_0000, 16'hFFFE);
    for (int i = 0; i < 20000; i++) begin
      logic [2*N-1:0] v = $urandom();
      check(v, ref_sqrt(v));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
