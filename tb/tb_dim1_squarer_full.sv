// tb_dim1_squarer_full: the squarer at its default word length (n = 7,
// modulus 129) for every operand, the zero operand included, against
// |A^2|_129 in diminished-1 form.
module tb_dim1_squarer_full;
  import tb_ref_pkg::*;

  localparam int unsigned N = 7;

  int checks = 0;
  int failures = 0;
  logic [N:0] a, q;

  dim1_squarer dut (.a(a), .q(q));

  initial begin
    big_t exp;
    #1;
    for (int v = 0; v < (1 << (N + 1)); v++) begin
      // values with bit N set all stand for zero
      a = (N+1)'(v);
      #1;
      exp = dim1_square(N, big_t'(a));
      checks++;
      if (big_t'(q) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h q=%h exp=%h", a, q, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
