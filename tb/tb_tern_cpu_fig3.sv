// tb_tern_cpu_fig3: replays the published simulation trace of the processor.
// The program T_MVI A,0011 / T_MOV B,A / T_ADD B / T_MOV A,B is placed at
// address 1Z00 (63), the PC starts there (RESET_PC = 1Z00), and the processor
// runs until the first step of the fourth instruction. The sequence of
// values every register takes is then compared with the trace: PC 1Z00,
// 1Z0Z, 1Z01, 1ZZ0, 1ZZZ; MDR 0Z10, 0011, 010Z, 00ZZ, 0100; Z ending in
// 0Z1Z (the sum 0011 + 0011) and 1ZZ1; A 0011 then 0Z1Z; IR Z10, 10Z, 0ZZ.
// T_MVI A must take seven steps.
module tb_tern_cpu_fig3;
  import tern_pkg::*;
  import tern_tb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 0, rst_n = 0, run = 0, ld_en = 0, end_o, conflict;
  tword_t      ld_addr = '0, ld_data = '0, dbg_addr = '0, dbg_data;
  tword_t      pc, a, b, c, mar, mdr, y, z, bus;
  topc_t       ir;
  trit_t       carry;
  ctrl_t       ctrl;
  trit_t [1:0] step;
  int          checks = 0, failures = 0;
  string       h_pc[$], h_mar[$], h_mdr[$], h_y[$], h_z[$], h_a[$], h_b[$], h_ir[$];

  tern_cpu #(.RESET_PC({T1, TZ, T0, T0})) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data),
    .dbg_addr(dbg_addr), .dbg_data(dbg_data), .pc_o(pc), .a_o(a), .b_o(b), .c_o(c),
    .mar_o(mar), .mdr_o(mdr), .ir_o(ir), .y_o(y), .z_o(z), .bus_o(bus), .carry_o(carry),
    .ctrl_o(ctrl), .step_o(step), .end_o(end_o), .bus_conflict_o(conflict));

  always #20 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // append a value to a history when it differs from the last one
  function automatic void rec(ref string h[$], input string v);
    if (h.size() == 0 || h[h.size() - 1] != v) h.push_back(v);
  endfunction

  function automatic string join_h(string h[$]);
    string s = "";
    foreach (h[i]) s = {s, (i == 0) ? "" : " ", h[i]};
    return s;
  endfunction

  task automatic expect_h(string name, string h[$], string exp);
    checks++;
    if (join_h(h) != exp) begin
      failures++;
      $display("FAIL %s: got '%s' expected '%s'", name, join_h(h), exp);
    end
  endtask

  initial begin
    int nend, nsteps, mvi_steps;
    string prog [5] = '{"0Z10", "0011", "010Z", "00ZZ", "0100"};
    int    vals [5];
    vals = '{w2i(opw(OP_MVIA)), 8, w2i(opw(OP_MOVBA)), w2i(opw(OP_ADD)), w2i(opw(OP_MOVAB))};
    for (int i = 0; i < 81; i++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = i2w(i);
      ld_data = (i >= 63 && i < 68) ? i2w(vals[i - 63]) : '0;
    end
    @(negedge clk) ld_en = 0;
    for (int i = 0; i < 5; i++) begin
      dbg_addr = i2w(63 + i); #1;
      checks++;
      if (w2s(dbg_data) != prog[i]) begin failures++; $display("FAIL program word %0d", i); end
    end
    rst_n = 1;
    run = 1;
    nend = 0; nsteps = 0; mvi_steps = 0;
    rec(h_pc, w2s(pc)); rec(h_mar, w2s(mar)); rec(h_mdr, w2s(mdr)); rec(h_y, w2s(y));
    rec(h_z, w2s(z)); rec(h_a, w2s(a)); rec(h_b, w2s(b)); rec(h_ir, w2s({T0, ir}));
    while (nend < 3) begin
      @(posedge clk); #1;
      nsteps++;
      rec(h_pc, w2s(pc)); rec(h_mar, w2s(mar)); rec(h_mdr, w2s(mdr)); rec(h_y, w2s(y));
      rec(h_z, w2s(z)); rec(h_a, w2s(a)); rec(h_b, w2s(b)); rec(h_ir, w2s({T0, ir}));
      if (end_o) begin
        if (nend == 0) mvi_steps = nsteps + 1;
        nend++;
      end
    end
    // execute the END step, then the first step of the fourth instruction
    @(posedge clk);
    @(posedge clk); #1;
    rec(h_pc, w2s(pc)); rec(h_mar, w2s(mar)); rec(h_mdr, w2s(mdr)); rec(h_y, w2s(y));
    rec(h_z, w2s(z)); rec(h_a, w2s(a)); rec(h_b, w2s(b)); rec(h_ir, w2s({T0, ir}));
    // registers that reset to 0000 start their history at 0000
    expect_h("PC",  h_pc,  "1Z00 1Z0Z 1Z01 1ZZ0 1ZZZ");
    expect_h("MAR", h_mar, "0000 1Z00 1Z0Z 1Z01 1ZZ0 1ZZZ");
    expect_h("MDR", h_mdr, "0000 0Z10 0011 010Z 00ZZ 0100");
    expect_h("Y",   h_y,   "0000 1Z00 1Z0Z 1Z01 1ZZ0 0011 1ZZZ");
    expect_h("Z",   h_z,   "0000 1Z0Z 1Z01 1ZZ0 1ZZZ 0Z1Z 1ZZ1");
    expect_h("A",   h_a,   "0000 0011 0Z1Z");
    expect_h("B",   h_b,   "0000 0011");
    expect_h("IR",  h_ir,  "0000 0Z10 010Z 00ZZ");
    checks++;
    if (mvi_steps != 7) begin failures++; $display("FAIL MVI A took %0d steps", mvi_steps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
