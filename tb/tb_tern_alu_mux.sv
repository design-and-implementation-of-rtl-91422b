// tb_tern_alu_mux: checks that selmux '1' gives the constant 000Z and that
// '0' and 'Z' pass the accumulator, for random accumulator values.
module tb_tern_alu_mux;
  import tern_pkg::*;
  import tern_tb_pkg::*;

  trit_t  sm;
  tword_t acc, w;
  int     checks = 0, failures = 0;

  tern_alu_mux dut (.selmux_i(sm), .acc_i(acc), .w_o(w));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, s;
    for (int n = 0; n < 100; n++) begin
      a = $urandom_range(80); s = $urandom_range(2);
      acc = i2w(a); sm = i2t(s);
      #1;
      checks++;
      if (w2i(w) != ((s == 2) ? 1 : a)) begin
        failures++;
        $display("FAIL selmux=%0d acc=%0d w=%0d", s, a, w2i(w));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
