// tb_dim1_csa_tree: the modular carry-save tree for several operand counts.
// For random operands |sum0 + sum1| must equal |sum of operands + K - 2|
// modulo 2^n+1 (one complemented end-around carry per stage). The number of
// levels of each instance, and of the level function for every K from 3 to
// 94, is compared with the Dadda depths: 4 -> 2, 5..6 -> 3, 7..9 -> 4,
// 10..13 -> 5, 14..19 -> 6, 20..28 -> 7, 29..42 -> 8, 43..63 -> 9,
// 64..94 -> 10 (and 3 -> 1).
module tb_dim1_csa_tree;
  import tb_ref_pkg::*;

  localparam int NUM = 5;
  localparam int NS [NUM] = '{7, 8, 16, 5, 12};
  localparam int KS [NUM] = '{6, 6, 10, 3, 28};

  int checks = 0;
  int failures = 0;
  int done = 0;

  function automatic int unsigned dadda_depth(input int unsigned k);
    if (k <= 3)  return 1;
    if (k <= 4)  return 2;
    if (k <= 6)  return 3;
    if (k <= 9)  return 4;
    if (k <= 13) return 5;
    if (k <= 19) return 6;
    if (k <= 28) return 7;
    if (k <= 42) return 8;
    if (k <= 63) return 9;
    return 10;
  endfunction

  for (genvar k = 0; k < NUM; k++) begin : g_n
    localparam int unsigned N = NS[k];
    localparam int unsigned K = KS[k];
    logic [N-1:0] ops [K];
    logic [N-1:0] sum0, sum1;

    dim1_csa_tree #(.N(N), .K(K)) dut (.ops(ops), .sum0(sum0), .sum1(sum1));

    initial begin
      big_t m, tot;
      #(k * 10 + 1);
      m = modulus(N);
      checks++;
      if (dut.LEVELS != dadda_depth(K)) begin
        failures++;
        $display("FAIL K=%0d levels=%0d", K, dut.LEVELS);
      end
      for (int t = 0; t < 5000; t++) begin
        tot = K - 2;
        for (int r = 0; r < K; r++) begin
          ops[r] = N'($urandom);
          tot += big_t'(ops[r]);
        end
        #1;
        checks++;
        if ((big_t'(sum0) + big_t'(sum1)) % m != tot % m) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d K=%0d", N, K);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NUM);
    for (int unsigned k = 3; k <= 94; k++) begin
      checks++;
      if (dim1_sq_pkg::tree_levels(k) != dadda_depth(k)) begin
        failures++;
        $display("FAIL depth of %0d operands", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
