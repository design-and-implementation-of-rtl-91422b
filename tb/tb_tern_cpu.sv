// tb_tern_cpu: end-to-end test of the ternary processor at its default
// parameters. It loads programs into memory through the load port while the
// processor is stopped, runs them, and at every END step compares A, B, C,
// the carry flag, the PC and the number of steps the instruction took with
// an instruction-level reference model written independently here.
//
// Program 0 is the worked example: MVI A,0011; MOV B,A; ADD B, which must
// leave 0Z1Z in A, with MVI A taking seven steps. The following programs are
// random mixes of all 21 instructions and of the unused opcodes, with LDA
// addresses pointing into a data area. The run input is dropped at random
// to pause the processor. Every instruction, the carry and borrow cases of
// the flag, the unused-opcode path and the pause are counted and must each
// occur at least once; a bus conflict is counted as a failure.
module tb_tern_cpu;
  import tern_pkg::*;
  import tern_tb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NPROG = 12;

  logic        clk = 0, rst_n = 0, run = 0, ld_en = 0, end_o, conflict;
  tword_t      ld_addr = '0, ld_data = '0, dbg_addr = '0, dbg_data;
  tword_t      pc, a, b, c, mar, mdr, y, z, bus;
  topc_t       ir;
  trit_t       carry;
  ctrl_t       ctrl;
  trit_t [1:0] step;

  int checks = 0, failures = 0;
  int prog [81];
  int seen_op [27];
  int n_carry = 0, n_borrow = 0, n_pause = 0, n_adc_c = 0, n_sbb_b = 0;

  tern_cpu dut (
    .clk(clk), .rst_n(rst_n), .run(run), .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data),
    .dbg_addr(dbg_addr), .dbg_data(dbg_data), .pc_o(pc), .a_o(a), .b_o(b), .c_o(c),
    .mar_o(mar), .mdr_o(mdr), .ir_o(ir), .y_o(y), .z_o(z), .bus_o(bus), .carry_o(carry),
    .ctrl_o(ctrl), .step_o(step), .end_o(end_o), .bus_conflict_o(conflict));

  always #20 clk = ~clk;                       // 40 ns clock

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && conflict) begin
    failures++;
    $display("FAIL bus conflict");
  end

  function automatic int tmin(int p, int q); return (p < q) ? p : q; endfunction
  function automatic int tmax(int p, int q); return (p > q) ? p : q; endfunction

  // trit-wise logic on integer words: 0 = min, 1 = max, 2 = xor
  function automatic int tlogic(int kind, int p, int q);
    int r = 0, wgt = 1, x, w;
    for (int i = 0; i < 4; i++) begin
      x = (p / wgt) % 3; w = (q / wgt) % 3;
      r += wgt * ((kind == 0) ? tmin(x, w) : (kind == 1) ? tmax(x, w)
                  : tmax(tmin(x, 2 - w), tmin(2 - x, w)));
      wgt *= 3;
    end
    return r;
  endfunction

  function automatic bit has_operand(int op);
    return op >= 13 && op <= 17;
  endfunction

  // steps from T1 up to and including END
  function automatic int steps_of(int op);
    if (op >= 1 && op <= 12)         return 6;
    if (op == 13 || op == 14 || op == 17) return 8;
    if (op == 15 || op == 16)        return 7;
    if (op >= 18 && op <= 21)        return 5;
    return 4;
  endfunction

  task automatic load_and_run(int plen, int np);
    int ma, mb, mc, mcy, mpc, op, d, s, nsteps, ninstr;
    run = 0;
    for (int i = 0; i < 81; i++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = i2w(i); ld_data = i2w(prog[i]);
    end
    @(negedge clk);
    ld_en = 0;
    // the load port writes: check one word through the debug port
    dbg_addr = i2w(plen - 1); #1;
    checks++;
    if (w2i(dbg_data) != prog[plen - 1]) begin failures++; $display("FAIL load"); end
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    ma = 0; mb = 0; mc = 0; mcy = 0; mpc = 0; ninstr = 0;
    run = 1;
    while (mpc < plen) begin
      op = prog[mpc]; d = prog[(mpc + 1) % 81];
      seen_op[op]++;
      // reference model
      case (op)
        1: ma = tlogic(0, ma, mb);
        2: ma = tlogic(1, ma, mb);
        3: ma = tlogic(2, ma, mb);
        4:  begin s = ma + mb;       mcy = s / 81; if (mcy) n_carry++; ma = s % 81; end
        5:  begin if (mcy) n_adc_c++; s = ma + mb + mcy; mcy = s / 81; ma = s % 81; end
        6:  begin mcy = (ma < mb); if (mcy) n_borrow++; ma = (ma - mb + 81) % 81; end
        7:  begin if (mcy) n_sbb_b++; s = ma - mb - mcy; mcy = (s < 0); ma = (s + 162) % 81; end
        8:  ma = (ma + 1) % 81;
        9:  ma = (ma + 80) % 81;
        10: ma = (ma * 3) % 81 + ma / 27;
        11: ma = ma / 3 + (ma % 3) * 27;
        12: ma = 80 - ma;
        13: begin s = ma + d; mcy = s / 81; if (mcy) n_carry++; ma = s % 81; end
        14: begin mcy = (ma < d); if (mcy) n_borrow++; ma = (ma - d + 81) % 81; end
        15: ma = d;
        16: mb = d;
        17: ma = prog[d];
        18: ma = mb;
        19: mb = ma;
        20: ma = mc;
        21: mc = ma;
        default: ;
      endcase
      mpc += has_operand(op) ? 2 : 1;
      // run the processor to the END step of this instruction; the step
      // after an END is T1 of the next instruction
      if (ninstr > 0) @(negedge clk);
      nsteps = 1;
      while (!end_o && nsteps < 20) begin
        if (np > 0 && $urandom_range(15) == 0) begin
          run = 0; n_pause++;
          repeat ($urandom_range(3) + 1) @(negedge clk);
          run = 1;
        end
        @(negedge clk);
        nsteps++;
      end
      checks += 6;
      if (nsteps != steps_of(op)) begin
        failures++; $display("FAIL prog %0d op %0d: %0d steps, expected %0d", np, op, nsteps, steps_of(op));
      end
      if (w2i(a) != ma) begin failures++; $display("FAIL prog %0d op %0d: A %0d expected %0d", np, op, w2i(a), ma); end
      if (w2i(b) != mb) begin failures++; $display("FAIL prog %0d op %0d: B %0d expected %0d", np, op, w2i(b), mb); end
      if (w2i(c) != mc) begin failures++; $display("FAIL prog %0d op %0d: C %0d expected %0d", np, op, w2i(c), mc); end
      if (t2i(carry) != mcy) begin failures++; $display("FAIL prog %0d op %0d: carry %0d expected %0d", np, op, t2i(carry), mcy); end
      if (w2i(pc) != mpc) begin failures++; $display("FAIL prog %0d op %0d: PC %0d expected %0d", np, op, w2i(pc), mpc); end
      if (np == 0 && ninstr == 2) begin
        checks++;
        if (w2s(a) != "0Z1Z") begin failures++; $display("FAIL example: A = %s", w2s(a)); end
      end
      ninstr++;
    end
    @(negedge clk);
    run = 0;
  endtask

  initial begin
    int plen, op, p;
    foreach (seen_op[i]) seen_op[i] = 0;
    // program 0: MVI A,0011 ; MOV B,A ; ADD B
    foreach (prog[i]) prog[i] = 0;
    prog[0] = 15; prog[1] = 8; prog[2] = 19; prog[3] = 4;
    load_and_run(4, 0);
    for (int np = 1; np < NPROG; np++) begin
      // data area 60..80, program below it
      for (int i = 60; i < 81; i++) prog[i] = $urandom_range(80);
      p = 0;
      while (p < 58) begin
        op = (np == 1) ? (p % 27) : $urandom_range(26);   // program 1 walks all opcodes
        if (has_operand(op) && p > 56) op = 18;
        prog[p] = op;
        if (has_operand(op)) begin
          prog[p + 1] = (op == 17) ? $urandom_range(60, 80) : $urandom_range(80);
          p += 2;
        end else p += 1;
      end
      plen = p;
      load_and_run(plen, np);
    end
    for (int i = 1; i <= 21; i++) begin
      checks++;
      if (seen_op[i] == 0) begin failures++; $display("FAIL instruction %0d never ran", i); end
    end
    checks += 6;
    if (seen_op[0] + seen_op[22] + seen_op[23] + seen_op[24] + seen_op[25] + seen_op[26] == 0) begin
      failures++; $display("FAIL no unused opcode ran");
    end
    if (n_carry == 0)  begin failures++; $display("FAIL no carry"); end
    if (n_borrow == 0) begin failures++; $display("FAIL no borrow"); end
    if (n_adc_c == 0)  begin failures++; $display("FAIL no ADC with carry set"); end
    if (n_sbb_b == 0)  begin failures++; $display("FAIL no SBB with borrow set"); end
    if (n_pause == 0)  begin failures++; $display("FAIL never paused"); end
    $display("events: carry %0d borrow %0d adc-with-carry %0d sbb-with-borrow %0d pauses %0d",
             n_carry, n_borrow, n_adc_c, n_sbb_b, n_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
