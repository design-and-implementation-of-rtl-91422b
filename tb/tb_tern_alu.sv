// tb_tern_alu: self-checking test of the ternary ALU. Every select code
// is applied to random operand pairs and both carry values, and the result
// and flag are compared with an integer reference model (min/max logic,
// arithmetic modulo 81, trit rotation). Also checks the PC increment
// example 1Z00 + 000Z = 1Z0Z.
module tb_tern_alu;
  import tern_pkg::*;
  import tern_tb_pkg::*;

  tword_t x, w, res;
  topc_t  sel;
  trit_t  carry, flag;
  logic   flag_valid;
  int     checks = 0, failures = 0;

  tern_alu dut (.x_i(x), .w_i(w), .sel_i(sel), .carry_i(carry),
                .res_o(res), .flag_o(flag), .flag_valid_o(flag_valid));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s sel=%0d x=%s w=%s c=%0d: got %0d expected %0d",
               what, w2i({T0, sel}), w2s(x), w2s(w), t2i(carry), got, exp);
    end
  endtask

  initial begin
    int xi, wi, ci, s, er, ef, efv;
    tword_t ew;
    x = i2w(63); w = i2w(1); sel = ALU_ADD; carry = T0;
    #1 check("pc+1", w2i(res), 64);
    check("pc+1 text", int'(w2s(res) == "1Z0Z"), 1);
    for (int n = 0; n < 400; n++) begin
      xi = $urandom_range(80); wi = $urandom_range(80); ci = $urandom_range(1);
      s  = $urandom_range(26);
      x = i2w(xi); w = i2w(wi); carry = i2t(ci);
      ew = i2w(s); sel = ew[2:0];
      #1;
      efv = 0; ef = 0;
      case (s)
        1, 2, 3: begin
          for (int i = 0; i < 4; i++) begin
            int a, b, na, nb, m1, m2;
            a = t2i(x[i]); b = t2i(w[i]); na = 2 - a; nb = 2 - b;
            m1 = (a < nb) ? a : nb; m2 = (na < b) ? na : b;
            ew[i] = i2t(s == 1 ? ((a < b) ? a : b) :
                        s == 2 ? ((a > b) ? a : b) : ((m1 > m2) ? m1 : m2));
          end
          er = w2i(ew);
        end
        4: begin er = (xi + wi + ci) % 81; ef = (xi + wi + ci) / 81; efv = 1; end
        5: begin er = (xi + wi) % 81;      ef = (xi + wi) / 81;      efv = 1; end
        6: begin er = (wi - xi + 81) % 81; ef = (wi < xi);           efv = 1; end
        7: begin er = (wi - xi - ci + 162) % 81; ef = (wi < xi + ci); efv = 1; end
        8: begin er = (xi - wi + 81) % 81; ef = (xi < wi);           efv = 1; end
        9:  er = (xi * 3) % 81 + xi / 27;
        10: er = xi / 3 + (xi % 3) * 27;
        11: er = 80 - xi;
        default: er = xi;
      endcase
      check("result", w2i(res), er);
      check("flag_valid", int'(flag_valid), efv);
      if (efv) check("flag", t2i(flag), ef);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
