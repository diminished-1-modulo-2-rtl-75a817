// tb_dim1_squarer: end-to-end test of the diminished-1 squarer over the
// word lengths 2 to 32, including every n of the delay comparison
// (4, 8, 12, ..., 32). Operands are exhaustive up to n = 16 and 4000
// random ones above (plus the extreme values). Every result is compared
// with |A^2|_(2^n+1) computed in wide integer arithmetic.
// Mechanisms counted, each required at least once:
//   - zero operand (bit n set) overriding the arithmetic,
//   - zero square of a nonzero operand (n = 3, 9, 10),
//   - final adder carry-out 0 and 1 (the inverted end-around carry),
//   - odd and even n (the even-n full-adder column stage).
module tb_dim1_squarer;
  import tb_ref_pkg::*;

  localparam int NUM = 17;
  localparam int NS [NUM] = '{2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 16,
                              20, 24, 28, 32};

  int checks = 0;
  int failures = 0;
  int done = 0;
  int n_zero_in = 0, n_zero_out = 0, n_cout0 = 0, n_cout1 = 0;
  int n_odd = 0, n_even = 0;

  for (genvar k = 0; k < NUM; k++) begin : g_n
    localparam int unsigned N = NS[k];
    logic [N:0] a, q;

    logic cout;

    dim1_squarer #(.N(N)) dut (.a(a), .q(q));
    assign cout = dut.u_add.cout;

    task automatic check_one(input logic [N:0] v);
      big_t exp;
      a = v;
      #1;
      exp = dim1_square(N, big_t'(v));
      checks++;
      if (big_t'(q) !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d a=%h q=%h expected %h", N, v, q, exp);
      end
      if (v[N]) n_zero_in++;
      else begin
        if (q[N]) n_zero_out++;
        if (cout) n_cout1++; else n_cout0++;
      end
    endtask

    initial begin
      #(k * 10 + 1);
      check_one({1'b1, {N{1'b0}}});
      if (N <= 16) begin
        for (longint v = 0; v < (longint'(1) << N); v++)
          check_one({1'b0, N'(v)});
      end else begin
        check_one({1'b0, {N{1'b0}}});
        check_one({1'b0, {N{1'b1}}});
        for (int t = 0; t < 4000; t++)
          check_one({1'b0, N'({$urandom, $urandom})});
      end
      if (N % 2 == 1) n_odd++; else n_even++;
      done++;
    end
  end

  initial begin
    wait (done == NUM);
    $display("coverage: zero_in=%0d zero_out=%0d cout0=%0d cout1=%0d odd_n=%0d even_n=%0d",
             n_zero_in, n_zero_out, n_cout0, n_cout1, n_odd, n_even);
    checks++; if (n_zero_in  == 0) failures++;
    checks++; if (n_zero_out == 0) failures++;
    checks++; if (n_cout0    == 0) failures++;
    checks++; if (n_cout1    == 0) failures++;
    checks++; if (n_odd      == 0) failures++;
    checks++; if (n_even     == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
