// tb_dim1_adder: the diminished-1 adder, exhaustive for n = 5 and n = 7 and
// random for n = 16 and n = 32, against {zero, q} = diminished-1 form of
// |x + y + 1|_(2^n+1). It also requires at least one zero result and both
// values of the end-around carry.
module tb_dim1_adder;
  import tb_ref_pkg::*;

  localparam int NUM = 4;
  localparam int NS [NUM] = '{5, 7, 16, 32};

  int checks = 0;
  int failures = 0;
  int done = 0;
  int n_zero = 0, n_c0 = 0, n_c1 = 0;

  for (genvar k = 0; k < NUM; k++) begin : g_n
    localparam int unsigned N = NS[k];
    logic [N-1:0] x, y, q;
    logic zero;

    dim1_adder #(.N(N)) dut (.x(x), .y(y), .q(q), .zero(zero));

    task automatic check_one(input logic [N-1:0] vx, input logic [N-1:0] vy);
      big_t exp;
      x = vx; y = vy;
      #1;
      exp = dim1_add(N, big_t'(vx), big_t'(vy));
      checks++;
      if (big_t'({zero, q}) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d x=%h y=%h got %h exp %h", N, vx, vy, {zero, q}, exp);
      end
      if (zero) n_zero++;
      if (big_t'(vx) + big_t'(vy) >= (big_t'(1) << N)) n_c1++; else n_c0++;
    endtask

    initial begin
      #(k * 10 + 1);
      if (N <= 7) begin
        for (int i = 0; i < (1 << N); i++)
          for (int j = 0; j < (1 << N); j++)
            check_one(N'(i), N'(j));
      end else begin
        check_one('1, '0);
        check_one('1, '1);
        for (int t = 0; t < 20000; t++)
          check_one(N'({$urandom, $urandom}), N'({$urandom, $urandom}));
      end
      done++;
    end
  end

  initial begin
    wait (done == NUM);
    checks++; if (n_zero == 0) failures++;
    checks++; if (n_c0 == 0 || n_c1 == 0) failures++;
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
