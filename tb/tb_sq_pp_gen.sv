// tb_sq_pp_gen: checks the partial-product matrix for n = 4, 7 and 8
// over every operand. For each operand the value of all K rows plus the
// K-2 end-around carries the tree will add and the final +1 must equal
// A_-1^2 + 2*A_-1 modulo 2^n+1. For n = 7 the diagonal row, the 2*A row
// and the zero row are also compared bit by bit with the worked example:
//   diagonal row = a3 ~a6 a2 ~a5 a1 ~a4 a0, 2*A row = a5..a0 ~a6.
module tb_sq_pp_gen;
  import tb_ref_pkg::*;

  localparam int NUM = 3;
  localparam int NS [NUM] = '{4, 7, 8};

  int checks = 0;
  int failures = 0;
  int done = 0;

  for (genvar k = 0; k < NUM; k++) begin : g_n
    localparam int unsigned N = NS[k];
    localparam int unsigned K = dim1_sq_pkg::sq_rows(N);
    logic [N-1:0] a;
    logic [N-1:0] ops [K];

    sq_pp_gen #(.N(N)) dut (.a(a), .ops(ops));

    initial begin
      big_t m, x, sum, exp;
      #(k * 10 + 1);
      m = modulus(N);
      for (int v = 0; v < (1 << N); v++) begin
        a = N'(v);
        #1;
        x = big_t'(v);
        sum = K - 2 + 1;
        for (int r = 0; r < K; r++) sum += big_t'(ops[r]);
        exp = (x * x + 2 * x) % m;
        checks++;
        if (sum % m != exp) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d a=%h sum=%0d exp=%0d", N, a, sum % m, exp);
        end
        if (N == 7) begin
          checks++;
          if (ops[3] !== {a[3], ~a[6], a[2], ~a[5], a[1], ~a[4], a[0]} ||
              ops[4] !== {a[5:0], ~a[6]} || ops[5] !== '0) begin
            failures++;
            if (failures < 10) $display("FAIL n=7 row layout a=%h", a);
          end
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NUM);
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
