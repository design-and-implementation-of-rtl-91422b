// tern_tb_pkg: reference helpers shared by the testbenches. They convert
// between integers and ternary words with their own arithmetic, so that the
// expected values do not depend on the functions of the design under test.
package tern_tb_pkg;
  import tern_pkg::*;

  function automatic trit_t i2t(int v);
    return (v == 0) ? T0 : (v == 1) ? TZ : T1;
  endfunction

  function automatic int t2i(trit_t t);
    return (t == T0) ? 0 : (t == TZ) ? 1 : 2;
  endfunction

  // integer (taken modulo 81) to 4-trit word
  function automatic tword_t i2w(int v);
    tword_t w;
    int r = ((v % 81) + 81) % 81;
    for (int i = 0; i < 4; i++) begin
      w[i] = i2t(r % 3);
      r = r / 3;
    end
    return w;
  endfunction

  function automatic int w2i(tword_t w);
    int v = 0;
    for (int i = 3; i >= 0; i--) v = v * 3 + t2i(w[i]);
    return v;
  endfunction

  // opcode word: the three opcode trits with a leading '0'
  function automatic tword_t opw(topc_t op);
    return {T0, op};
  endfunction

  // word as text, most significant trit first, e.g. "0Z1Z"
  function automatic string w2s(tword_t w);
    string s = "";
    for (int i = 3; i >= 0; i--) s = {s, (w[i] == T0) ? "0" : (w[i] == TZ) ? "Z" : "1"};
    return s;
  endfunction
endpackage
