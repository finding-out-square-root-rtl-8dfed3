// tb_set_sqrt: end-to-end, full-size testbench of the square-root array.
//
// Runs set_sqrt at its default size (16-bit radicand, 8-bit root) over all
// 65536 radicands. The expected root is tracked independently of the array:
// the radicands are applied in increasing order and the reference root r is
// advanced while (r+1)^2 <= radicand, so it is always floor(sqrt(radicand)).
//
// It also watches the two things every row of the array can do, and counts
// a failure if either never happened in some row:
//   keep    - the row's trial subtraction was not negative (root bit 1) and
//             the row passed its difference on;
//   restore - the trial subtraction went negative (root bit 0) and the row
//             passed its minuend on unchanged.
// The hand-worked example 1014 (root 31, 11111 in binary) is checked first.
// The array is combinational, so each result is sampled one time unit after
// the radicand changes. A watchdog ends a hung run with a failure.
module tb_set_sqrt;
  localparam int N = 8;

  logic [2*N-1:0] radicand;
  logic [N-1:0]   root;
  int checks = 0, failures = 0;
  int keep_cnt    [N];   // per row, indexed by root bit position
  int restore_cnt [N];
  int r;

  set_sqrt dut (.radicand(radicand), .root(root));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (keep_cnt[i]) begin
      keep_cnt[i]    = 0;
      restore_cnt[i] = 0;
    end

    radicand = 16'd1014;
    #1;
    checks++;
    if (root !== 8'b0001_1111) begin
      failures++;
      $display("FAIL sqrt(1014) = %0d, expected 31", root);
    end

    r = 0;
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      radicand = (2*N)'(v);
      #1;
      while ((r + 1) * (r + 1) <= v) r++;
      checks++;
      if (root !== N'(r)) begin
        failures++;
        if (failures < 10)
          $display("FAIL sqrt(%0d) = %0d, expected %0d", v, root, r);
      end
      for (int b = 0; b < N; b++) begin
        if (root[b]) keep_cnt[b]++;
        else         restore_cnt[b]++;
      end
    end

    for (int b = 0; b < N; b++) begin
      $display("row %0d (root bit %0d): keep %0d, restore %0d",
               N - b, b, keep_cnt[b], restore_cnt[b]);
      checks++;
      if (keep_cnt[b] == 0 || restore_cnt[b] == 0) begin
        failures++;
        $display("FAIL row %0d never kept or never restored", N - b);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
