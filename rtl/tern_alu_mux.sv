// tern_alu_mux: second-operand multiplexer of the ternary ALU (selmux).
//
// When selmux is '1' the ALU receives the constant CONST (000Z, the PC
// increment step); for '0' (and 'Z') it receives the accumulator. Purely
// combinational. The two inputs and the constant 000Z follow the processor
// description; treating 'Z' like '0' is this design's choice.
module tern_alu_mux
  import tern_pkg::*;
#(
  parameter tword_t CONST = {T0, T0, T0, TZ}
) (
  input  trit_t  selmux_i,
  input  tword_t acc_i,
  output tword_t w_o
);
  always_comb w_o = (selmux_i == T1) ? CONST : acc_i;
endmodule
