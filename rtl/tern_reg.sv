// tern_reg: one register of the ternary processor's shared-bus datapath
// (PC, A, B, C, MAR, IR, Y and Z are all built from it).
//
// A single control trit ctl_i governs it, as in the processor description:
// 'Z' loads d_i at the rising clock edge ("in"), '1' asks to place the
// register on the bus ("out", drive_o is then high) and '0' leaves it idle.
// Loading is further gated by en_i (the processor's run input). WIDTH trits
// are stored; the register resets to RESET. The bus itself is a multiplexer
// (tern_bus) that uses drive_o as its select; the reset value and the enable
// are this design's choices.
module tern_reg
  import tern_pkg::*;
#(
  parameter int unsigned WIDTH = WORD_TRITS,
  parameter trit_t [WIDTH-1:0] RESET = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i,
  input  trit_t             ctl_i,
  input  trit_t [WIDTH-1:0] d_i,
  output trit_t [WIDTH-1:0] q_o,
  output logic              drive_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   q_o <= RESET;
    else if (en_i && ctl_i == TZ) q_o <= d_i;
  end

  assign drive_o = en_i && (ctl_i == T1);
endmodule
