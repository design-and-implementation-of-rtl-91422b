// tern_control: hardwired control unit of the ternary processor.
//
// A two-trit step counter numbers the steps T1..T9 of the current
// instruction and a 3:27 decoder turns the opcode held in IR into one line
// per instruction. From the step and the decoded line this block produces the
// control word of the step (ctrl_o): one trit per register (PC, A, B, C, MAR,
// MDR, IR, and Y_Z for the Y/Z pair around the ALU), the memory read/write
// trit, END, selmux and the three ALU select trits.
//
// Every instruction starts with the fetch T1-T3:
//   T1  PC out, MAR in, memory read into MDR, Y in, ALU adds 000Z -> Z
//   T2  Z out, PC in                       (PC + 1)
//   T3  MDR out, IR in
// Immediate and direct instructions repeat T1/T2 as T4/T5 to fetch their
// operand word. Then, per instruction:
//   ALU with B (ANA ORA XRA ADD ADC SUB SBB): T4 B out, Y in, ALU(B, A) -> Z;
//       T5 Z out, A in; T6 END
//   ICR, DCR: T4 A out, Y in, A +/- 000Z -> Z; T5 Z out, A in; T6 END
//   RAL, RAR, CMA: T4 A out, Y in, ALU(A) -> Z; T5 Z out, A in; T6 END
//   ADDI, SUI: T6 MDR out, Y in, ALU(data, A) -> Z; T7 Z out, A in; T8 END
//   MVI A / MVI B: T6 MDR out, A or B in; T7 END
//   LDA: T6 MDR out, MAR in, memory read into MDR; T7 MDR out, A in; T8 END
//   MOV: T4 source out, destination in; T5 END
//   unused opcodes: T4 END
// The fetch and MVI A sequences (seven steps) follow the processor
// description step for step; the sequences of the other instructions are
// this design's, built from the same moves. run_i = 0 freezes the counter and
// forces an idle control word. Outputs are combinational from the step
// counter and IR, so they are valid for the whole step.
module tern_control
  import tern_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run_i,
  input  topc_t       ir_i,
  output ctrl_t       ctrl_o,
  output trit_t [1:0] step_o,
  output logic [26:0] line_o
);
  ctrl_t       c;
  logic [3:0]  t;              // step number 1..9

  tern_decoder u_dec (
    .opc_i  (ir_i),
    .line_o (line_o)
  );

  tern_step_counter u_step (
    .clk    (clk),
    .rst_n  (rst_n),
    .en_i   (run_i),
    .end_i  (ctrl_o.end_i),
    .step_o (step_o)
  );

  // decoder line of an opcode (its unbalanced-ternary value)
  function automatic int unsigned idx(topc_t op);
    return 9 * int'(trit_val(op[2])) + 3 * int'(trit_val(op[1])) + int'(trit_val(op[0]));
  endfunction

  always_comb begin
    logic alu_b, unary, imm, mvi, mov;
    t = 4'(3 * 4'(trit_val(step_o[1]))) + 4'(trit_val(step_o[0])) + 4'd1;
    c = CTRL_IDLE;

    alu_b = line_o[idx(OP_ANA)] | line_o[idx(OP_ORA)] | line_o[idx(OP_XRA)] |
            line_o[idx(OP_ADD)] | line_o[idx(OP_ADC)] | line_o[idx(OP_SUB)] |
            line_o[idx(OP_SBB)];
    unary = line_o[idx(OP_ICR)] | line_o[idx(OP_DCR)] | line_o[idx(OP_RAL)] |
            line_o[idx(OP_RAR)] | line_o[idx(OP_CMA)];
    imm   = line_o[idx(OP_ADDI)] | line_o[idx(OP_SUI)];
    mvi   = line_o[idx(OP_MVIA)] | line_o[idx(OP_MVIB)];
    mov   = line_o[idx(OP_MOVAB)] | line_o[idx(OP_MOVBA)] |
            line_o[idx(OP_MOVAC)] | line_o[idx(OP_MOVCA)];

    if (t == 1 || ((imm || mvi || line_o[idx(OP_LDA)]) && t == 4)) begin
      // fetch a word at PC, increment PC in the ALU
      c.pc = T1; c.mar = TZ; c.y_z = TZ; c.selmux = T1; c.sel = ALU_ADD; c.r_w = T1;
    end else if (t == 2 || ((imm || mvi || line_o[idx(OP_LDA)]) && t == 5)) begin
      c.y_z = T1; c.pc = TZ;
    end else if (t == 3) begin
      c.mdr = T1; c.ir = TZ;
    end else if (alu_b) begin
      case (t)
        4: begin
          c.b = T1; c.y_z = TZ; c.selmux = T0;
            if (line_o[idx(OP_ANA)]) c.sel = ALU_AND;
            else if (line_o[idx(OP_ORA)]) c.sel = ALU_OR;
            else if (line_o[idx(OP_XRA)]) c.sel = ALU_XOR;
            else if (line_o[idx(OP_ADD)]) c.sel = ALU_ADD;
            else if (line_o[idx(OP_ADC)]) c.sel = ALU_ADC;
            else if (line_o[idx(OP_SUB)]) c.sel = ALU_SUB;
            else c.sel = ALU_SBB;
        end
        5: begin c.y_z = T1; c.a = TZ; end
        default: c.end_i = T1;
      endcase
    end else if (unary) begin
      case (t)
        4: begin
          c.a = T1; c.y_z = TZ;
            if (line_o[idx(OP_ICR)]) begin c.selmux = T1; c.sel = ALU_ADD; end
            else if (line_o[idx(OP_DCR)]) begin c.selmux = T1; c.sel = ALU_DEC; end
            else if (line_o[idx(OP_RAL)]) c.sel = ALU_RAL;
            else if (line_o[idx(OP_RAR)]) c.sel = ALU_RAR;
            else c.sel = ALU_CMA;
        end
        5: begin c.y_z = T1; c.a = TZ; end
        default: c.end_i = T1;
      endcase
    end else if (imm) begin
      case (t)
        6: begin
          c.mdr = T1; c.y_z = TZ; c.selmux = T0;
          c.sel = line_o[idx(OP_ADDI)] ? ALU_ADD : ALU_SUB;
        end
        7: begin c.y_z = T1; c.a = TZ; end
        default: c.end_i = T1;
      endcase
    end else if (mvi) begin
      case (t)
        6: begin
          c.mdr = T1;
          if (line_o[idx(OP_MVIA)]) c.a = TZ;
          else                      c.b = TZ;
        end
        default: c.end_i = T1;
      endcase
    end else if (line_o[idx(OP_LDA)]) begin
      case (t)
        6: begin c.mdr = T1; c.mar = TZ; c.r_w = T1; end
        7: begin c.mdr = T1; c.a = TZ; end
        default: c.end_i = T1;
      endcase
    end else if (mov && t == 4) begin
        if (line_o[idx(OP_MOVAB)]) begin c.b = T1; c.a = TZ; end
        else if (line_o[idx(OP_MOVBA)]) begin c.a = T1; c.b = TZ; end
        else if (line_o[idx(OP_MOVAC)]) begin c.c = T1; c.a = TZ; end
        else begin c.a = T1; c.c = TZ; end
    end else begin
      c.end_i = T1;
    end

    ctrl_o = run_i ? c : CTRL_IDLE;
  end
endmodule
