// tern_step_counter: the two-trit step counter of the control unit.
//
// It holds the number of the current step of an instruction, 00 for T1 up
// to 11 for T9 (nine steps). Each enabled clock edge adds one in unbalanced
// ternary (a trit increment with carry into the second trit); an END step
// (end_i = '1') clears it to 00 instead, so the next instruction starts with
// its fetch step T1. Reset clears it too. The two trits and the END clear
// follow the processor description; wrapping from 11 to 00 is this design's.
module tern_step_counter
  import tern_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en_i,
  input  trit_t       end_i,
  output trit_t [1:0] step_o
);
  // One trit plus carry-in: returns {carry, sum}.
  function automatic trit_t [1:0] inc_trit(trit_t t, logic cin);
    if (!cin)        return {T0, t};
    case (t)
      T0:      return {T0, TZ};
      TZ:      return {T0, T1};
      default: return {TZ, T0};
    endcase
  endfunction

  trit_t [1:0] lo, hi;
  assign lo = inc_trit(step_o[0], 1'b1);
  assign hi = inc_trit(step_o[1], lo[1] == TZ);   // carry out of the top trit is dropped: the count wraps

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              step_o <= {T0, T0};
    else if (en_i) begin
      if (end_i == T1)       step_o <= {T0, T0};
      else                   step_o <= {hi[0], lo[0]};
    end
  end
endmodule
