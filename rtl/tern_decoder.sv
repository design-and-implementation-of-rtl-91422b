// tern_decoder: 3:27 ternary instruction decoder.
//
// The three opcode trits in the instruction register select one of 27 output
// lines; line k is high for the opcode whose unbalanced-ternary value is k
// (opcode t2 t1 t0 has value 9*t2 + 3*t1 + t0). It is built as the processor
// description names it, a 3:27 decoder, from three 1:3 trit decoders whose
// outputs are ANDed. Combinational.
module tern_decoder
  import tern_pkg::*;
(
  input  topc_t       opc_i,
  output logic [26:0] line_o
);
  logic [2:0] d2, d1, d0;

  // 1:3 decoder of one trit: bit v is high when the trit has value v.
  function automatic logic [2:0] dec3(trit_t t);
    case (t)
      T0:      return 3'b001;
      TZ:      return 3'b010;
      default: return 3'b100;
    endcase
  endfunction

  assign d2 = dec3(opc_i[2]);
  assign d1 = dec3(opc_i[1]);
  assign d0 = dec3(opc_i[0]);

  for (genvar k = 0; k < 27; k++) begin : g_line
    assign line_o[k] = d2[k / 9] & d1[(k / 3) % 3] & d0[k % 3];
  end
endmodule
