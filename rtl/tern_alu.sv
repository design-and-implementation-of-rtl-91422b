// tern_alu: combinational ternary ALU of the 4-trit processor.
//
// Operand X is the value entering the Y register (the bus word in the step
// that loads Y), operand W comes from the ALU input multiplexer (accumulator or
// the constant 000Z). The three select trits sel(2:0) choose the function;
// the result is loaded into the Z register by the datapath.
//
//   000 pass X      00Z T-AND     001 T-OR      0Z0 T-XOR
//   0ZZ X+W+carry   0Z1 X+W       010 W-X       01Z W-X-borrow
//   011 X-W         Z00 rotate X left one trit  Z0Z rotate X right
//   Z01 T-NOT of X  others: pass X
//
// Addition is a ripple of four ternary full adders (unbalanced ternary,
// digits 0/1/2). Subtraction adds the trit-wise T-NOT of the subtrahend plus
// one; the final carry then means "no borrow". flag_o is the carry of an
// addition or the borrow of a subtraction, as a trit ('0' or 'Z');
// flag_valid_o tells whether the function produces a flag at all.
// That the fetch increment uses code 0Z1 follows the processor description;
// the other codes, the flag and the rotate kind are this design's choices.
module tern_alu
  import tern_pkg::*;
(
  input  tword_t x_i,
  input  tword_t w_i,
  input  topc_t  sel_i,
  input  trit_t  carry_i,
  output tword_t res_o,
  output trit_t  flag_o,
  output logic   flag_valid_o
);

  // Ripple adder a + b + cin, cin in {0, Z}.
  function automatic tword_t add_word(tword_t a, tword_t b, trit_t cin, output trit_t cout);
    tword_t s;
    trit_t  c = cin;
    trit_t [1:0] fa;
    for (int i = 0; i < WORD_TRITS; i++) begin
      fa   = t_full_add(a[i], b[i], c);
      s[i] = fa[0];
      c    = fa[1];
    end
    cout = c;
    return s;
  endfunction

  function automatic tword_t not_word(tword_t a);
    tword_t r;
    for (int i = 0; i < WORD_TRITS; i++) r[i] = t_not(a[i]);
    return r;
  endfunction

  always_comb begin
    trit_t c;
    res_o        = x_i;
    flag_o       = T0;
    flag_valid_o = 1'b0;
    c            = T0;
    case (sel_i)
      ALU_AND: for (int i = 0; i < WORD_TRITS; i++) res_o[i] = t_and(x_i[i], w_i[i]);
      ALU_OR:  for (int i = 0; i < WORD_TRITS; i++) res_o[i] = t_or(x_i[i], w_i[i]);
      ALU_XOR: for (int i = 0; i < WORD_TRITS; i++) res_o[i] = t_xor(x_i[i], w_i[i]);
      ALU_ADD: begin
        res_o        = add_word(x_i, w_i, T0, c);
        flag_o       = c;
        flag_valid_o = 1'b1;
      end
      ALU_ADC: begin
        res_o        = add_word(x_i, w_i, (carry_i == T0) ? T0 : TZ, c);
        flag_o       = c;
        flag_valid_o = 1'b1;
      end
      ALU_SUB: begin
        res_o        = add_word(w_i, not_word(x_i), TZ, c);
        flag_o       = (c == T0) ? TZ : T0;
        flag_valid_o = 1'b1;
      end
      ALU_SBB: begin
        res_o        = add_word(w_i, not_word(x_i), (carry_i == T0) ? TZ : T0, c);
        flag_o       = (c == T0) ? TZ : T0;
        flag_valid_o = 1'b1;
      end
      ALU_DEC: begin
        res_o        = add_word(x_i, not_word(w_i), TZ, c);
        flag_o       = (c == T0) ? TZ : T0;
        flag_valid_o = 1'b1;
      end
      ALU_RAL: res_o = {x_i[WORD_TRITS-2:0], x_i[WORD_TRITS-1]};
      ALU_RAR: res_o = {x_i[0], x_i[WORD_TRITS-1:1]};
      ALU_CMA: res_o = not_word(x_i);
      default: res_o = x_i;
    endcase
  end

endmodule
