// tern_cpu: a 4-trit ternary processor with a 21-instruction set.
//
// Every data and address word is four trits (0..80 in unbalanced ternary,
// '0' = 0, 'Z' = 1, '1' = 2) and each opcode three trits. The registers PC,
// A (accumulator), B, C, MAR, MDR and IR share one internal bus. The ALU sits
// between two registers: Y takes one operand from the bus and Z holds the
// result until it is put back on the bus; the second operand is the
// accumulator or the constant 000Z (selmux). The 81-word memory is addressed
// by MAR and exchanges data with MDR. A hardwired control unit (step counter
// plus 3:27 opcode decoder) drives every register with one control trit:
// '1' out to the bus, 'Z' in from the bus, '0' idle.
//
// Timing: one step per clock cycle. A read step latches MAR and MDR at the
// same edge, the memory address taken from the bus when MAR is loading. The
// ALU's first operand is likewise the bus word when Y is loading, so Y and Z
// are written at the same edge. An instruction takes 5 to 8 steps (MVI A: 7).
// A carry/borrow flag, updated by ADD, ADC, SUB and SBB (the steps whose
// second ALU operand is the accumulator) feeds ADC and SBB.
//
// Interface: run = 1 lets the processor step; with run = 0 it holds, and the
// memory can be filled through ld_* (program and data). dbg_* reads a memory
// word. The register contents, the bus, the control word and the step are
// brought out for observation; end_o pulses in the END step of every
// instruction. The register set, bus, control trits and fetch sequence
// follow the processor description; the flag, the reset PC (RESET_PC), the
// load/debug ports and the run input are this design's.
module tern_cpu
  import tern_pkg::*;
#(
  parameter tword_t RESET_PC = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        ld_en,
  input  tword_t      ld_addr,
  input  tword_t      ld_data,
  input  tword_t      dbg_addr,
  output tword_t      dbg_data,
  output tword_t      pc_o,
  output tword_t      a_o,
  output tword_t      b_o,
  output tword_t      c_o,
  output tword_t      mar_o,
  output tword_t      mdr_o,
  output topc_t       ir_o,
  output tword_t      y_o,
  output tword_t      z_o,
  output tword_t      bus_o,
  output trit_t       carry_o,
  output ctrl_t       ctrl_o,
  output trit_t [1:0] step_o,
  output logic        end_o,
  output logic        bus_conflict_o
);
  ctrl_t       ctrl;
  tword_t      bus, alu_x, alu_w, alu_res, mem_addr, mem_rdata;
  trit_t       alu_flag;
  logic        alu_flag_valid;

  // bus sources
  localparam int unsigned N_SRC = 8;
  localparam int unsigned S_PC = 0, S_A = 1, S_B = 2, S_C = 3, S_MAR = 4,
                          S_MDR = 5, S_IR = 6, S_Z = 7;
  logic   [N_SRC-1:0] drive;
  tword_t [N_SRC-1:0] src;

  // ------------------------------------------------------------- control
  tern_control u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .run_i  (run),
    .ir_i   (ir_o),
    .ctrl_o (ctrl),
    .step_o (step_o),
    .line_o ()
  );

  // ------------------------------------------------------------ registers
  tern_reg #(.RESET(RESET_PC)) u_pc (
    .clk(clk), .rst_n(rst_n), .en_i(run), .ctl_i(ctrl.pc), .d_i(bus),
    .q_o(pc_o), .drive_o(drive[S_PC]));
  tern_reg u_a (
    .clk(clk), .rst_n(rst_n), .en_i(run), .ctl_i(ctrl.a), .d_i(bus),
    .q_o(a_o), .drive_o(drive[S_A]));
  tern_reg u_b (
    .clk(clk), .rst_n(rst_n), .en_i(run), .ctl_i(ctrl.b), .d_i(bus),
    .q_o(b_o), .drive_o(drive[S_B]));
  tern_reg u_c (
    .clk(clk), .rst_n(rst_n), .en_i(run), .ctl_i(ctrl.c), .d_i(bus),
    .q_o(c_o), .drive_o(drive[S_C]));
  tern_reg u_mar (
    .clk(clk), .rst_n(rst_n), .en_i(run), .ctl_i(ctrl.mar), .d_i(bus),
    .q_o(mar_o), .drive_o(drive[S_MAR]));
  tern_reg #(.WIDTH(OP_TRITS)) u_ir (
    .clk(clk), .rst_n(rst_n), .en_i(run), .ctl_i(ctrl.ir), .d_i(bus[OP_TRITS-1:0]),
    .q_o(ir_o), .drive_o(drive[S_IR]));
  // Y only loads; Z loads the ALU result when Y loads and drives when Y_Z = '1'
  tern_reg u_y (
    .clk(clk), .rst_n(rst_n), .en_i(run), .ctl_i((ctrl.y_z == TZ) ? TZ : T0),
    .d_i(bus), .q_o(y_o), .drive_o());
  tern_reg u_z (
    .clk(clk), .rst_n(rst_n), .en_i(run), .ctl_i(ctrl.y_z), .d_i(alu_res),
    .q_o(z_o), .drive_o(drive[S_Z]));

  tern_mdr u_mdr (
    .clk(clk), .rst_n(rst_n), .en_i(run), .mdr_i(ctrl.mdr), .r_w_i(ctrl.r_w),
    .bus_i(bus), .mem_rdata_i(mem_rdata), .q_o(mdr_o), .drive_o(drive[S_MDR]));

  // ------------------------------------------------------------------ bus
  assign src[S_PC]  = pc_o;
  assign src[S_A]   = a_o;
  assign src[S_B]   = b_o;
  assign src[S_C]   = c_o;
  assign src[S_MAR] = mar_o;
  assign src[S_MDR] = mdr_o;
  assign src[S_IR]  = {T0, ir_o};
  assign src[S_Z]   = z_o;

  tern_bus #(.N(N_SRC)) u_bus (
    .drive_i(drive), .data_i(src), .bus_o(bus), .conflict_o(bus_conflict_o));

  // ------------------------------------------------------------------ ALU
  assign alu_x = (ctrl.y_z == TZ) ? bus : y_o;

  tern_alu_mux u_mux (
    .selmux_i(ctrl.selmux), .acc_i(a_o), .w_o(alu_w));

  tern_alu u_alu (
    .x_i(alu_x), .w_i(alu_w), .sel_i(ctrl.sel), .carry_i(carry_o),
    .res_o(alu_res), .flag_o(alu_flag), .flag_valid_o(alu_flag_valid));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) carry_o <= T0;
    else if (run && ctrl.y_z == TZ && ctrl.selmux != T1 && alu_flag_valid)
      carry_o <= alu_flag;
  end

  // --------------------------------------------------------------- memory
  assign mem_addr = (ctrl.mar == TZ) ? bus : mar_o;

  tern_mem u_mem (
    .clk(clk), .addr_i(mem_addr), .r_w_i(run ? ctrl.r_w : T0), .wdata_i(mdr_o),
    .rdata_o(mem_rdata), .ld_en_i(ld_en && !run), .ld_addr_i(ld_addr),
    .ld_data_i(ld_data), .dbg_addr_i(dbg_addr), .dbg_data_o(dbg_data));

  assign bus_o  = bus;
  assign ctrl_o = ctrl;
  assign end_o  = (ctrl.end_i == T1);

  a_one_bus_driver: assert property (@(posedge clk) disable iff (!rst_n) !bus_conflict_o)
    else $error("tern_cpu: more than one register drives the bus");
endmodule
