// tb_dim1_csa: one modular carry-save stage for n = 7 and n = 16 with
// random operands. The sum and carry vectors are compared with a bit-by-bit
// full-adder model (carry of the top column complemented into bit 0), and
// |s + c| must equal |x + y + z + 1| modulo 2^n+1.
module tb_dim1_csa;
  import tb_ref_pkg::*;

  localparam int NUM = 2;
  localparam int NS [NUM] = '{7, 16};

  int checks = 0;
  int failures = 0;
  int done = 0;

  for (genvar k = 0; k < NUM; k++) begin : g_n
    localparam int unsigned N = NS[k];
    logic [N-1:0] x, y, z, s, c;

    dim1_csa #(.N(N)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

    initial begin
      logic [N-1:0] es, ec;
      int cnt;
      big_t m;
      #(k * 10 + 1);
      m = modulus(N);
      for (int t = 0; t < 20000; t++) begin
        x = N'($urandom); y = N'($urandom); z = N'($urandom);
        #1;
        for (int i = 0; i < N; i++) begin
          cnt = int'(x[i]) + int'(y[i]) + int'(z[i]);
          es[i] = cnt[0];
          if (i == N - 1) ec[0] = ~cnt[1];
          else            ec[i+1] = cnt[1];
        end
        checks++;
        if (s !== es || c !== ec) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d x=%h y=%h z=%h s=%h c=%h", N, x, y, z, s, c);
        end
        checks++;
        if ((big_t'(s) + big_t'(c)) % m !== (big_t'(x) + big_t'(y) + big_t'(z) + 1) % m)
          failures++;
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
