// tb_tern_control: for every one of the 27 opcodes, runs the control unit
// from T1 until END and compares each step's control word with the
// expected sequence (the fetch and the seven-step MVI A sequence as the
// processor description lists them, the rest per instruction class). Also
// checks that END clears the step counter and that run = 0 gives an idle
// control word and freezes the step.
module tb_tern_control;
  import tern_pkg::*;
  import tern_tb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 0, rst_n = 0, run = 0;
  topc_t       ir = '0;
  ctrl_t       ctrl;
  trit_t [1:0] step;
  logic [26:0] line;
  int          checks = 0, failures = 0;

  tern_control dut (.clk(clk), .rst_n(rst_n), .run_i(run), .ir_i(ir),
                    .ctrl_o(ctrl), .step_o(step), .line_o(line));

  always #20 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string tc(trit_t t);
    return (t == T0) ? "0" : (t == TZ) ? "Z" : "1";
  endfunction

  // control word as text: the non-idle signals in a fixed order
  function automatic string cw(ctrl_t c);
    string s = "";
    if (c.pc != T0)     s = {s, " pc=", tc(c.pc)};
    if (c.mar != T0)    s = {s, " mar=", tc(c.mar)};
    if (c.mdr != T0)    s = {s, " mdr=", tc(c.mdr)};
    if (c.ir != T0)     s = {s, " ir=", tc(c.ir)};
    if (c.a != T0)      s = {s, " a=", tc(c.a)};
    if (c.b != T0)      s = {s, " b=", tc(c.b)};
    if (c.c != T0)      s = {s, " c=", tc(c.c)};
    if (c.y_z != T0)    s = {s, " y_z=", tc(c.y_z)};
    if (c.r_w != T0)    s = {s, " r_w=", tc(c.r_w)};
    if (c.selmux != T0) s = {s, " selmux=", tc(c.selmux)};
    if (c.sel != '0)    s = {s, " sel=", tc(c.sel[2]), tc(c.sel[1]), tc(c.sel[0])};
    if (c.end_i != T0)  s = {s, " end=", tc(c.end_i)};
    return s;
  endfunction

  localparam string FETCH1 = " pc=1 mar=Z y_z=Z r_w=1 selmux=1 sel=0Z1";
  localparam string FETCH2 = " pc=Z y_z=1";
  localparam string FETCH3 = " mdr=1 ir=Z";
  localparam string ENDW   = " end=1";
  localparam string ZTOA   = " a=Z y_z=1";

  initial begin
    string exp [$];
    string alu_sel [7] = '{"00Z", "001", "0Z0", "0Z1", "0ZZ", "010", "01Z"};
    int    k;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // run = 0: idle and frozen
    #1;
    checks++;
    if (ctrl != CTRL_IDLE) begin failures++; $display("FAIL not idle with run = 0"); end
    @(negedge clk) run = 1;
    for (int op = 0; op < 27; op++) begin
      ir = {i2t(op / 9), i2t((op / 3) % 3), i2t(op % 3)};
      exp = '{FETCH1, FETCH2, FETCH3};
      if (op >= 1 && op <= 7) begin
        exp.push_back({" b=1 y_z=Z sel=", alu_sel[op - 1]});
        exp.push_back(ZTOA);
      end else if (op == 8) begin
        exp.push_back(" a=1 y_z=Z selmux=1 sel=0Z1"); exp.push_back(ZTOA);
      end else if (op == 9) begin
        exp.push_back(" a=1 y_z=Z selmux=1 sel=011"); exp.push_back(ZTOA);
      end else if (op >= 10 && op <= 12) begin
        exp.push_back({" a=1 y_z=Z sel=", (op == 10) ? "Z00" : (op == 11) ? "Z0Z" : "Z01"});
        exp.push_back(ZTOA);
      end else if (op == 13 || op == 14) begin
        exp.push_back(FETCH1); exp.push_back(FETCH2);
        exp.push_back({" mdr=1 y_z=Z sel=", (op == 13) ? "0Z1" : "010"});
        exp.push_back(ZTOA);
      end else if (op == 15) begin           // MVI A, as listed step by step
        exp.push_back(FETCH1); exp.push_back(FETCH2); exp.push_back(" mdr=1 a=Z");
      end else if (op == 16) begin
        exp.push_back(FETCH1); exp.push_back(FETCH2); exp.push_back(" mdr=1 b=Z");
      end else if (op == 17) begin
        exp.push_back(FETCH1); exp.push_back(FETCH2);
        exp.push_back(" mar=Z mdr=1 r_w=1"); exp.push_back(" mdr=1 a=Z");
      end else if (op == 18) exp.push_back(" a=Z b=1");
      else if (op == 19)     exp.push_back(" a=1 b=Z");
      else if (op == 20)     exp.push_back(" a=Z c=1");
      else if (op == 21)     exp.push_back(" a=1 c=Z");
      exp.push_back(ENDW);
      if (op == 15) begin
        checks++;
        if (exp.size() != 7) failures++;
      end
      k = 0;
      foreach (exp[i]) begin
        #1;
        checks += 2;
        if (cw(ctrl) != exp[i]) begin
          failures++;
          $display("FAIL opcode %0d step %0d: got '%s' expected '%s'", op, i + 1, cw(ctrl), exp[i]);
        end
        if (3 * t2i(step[1]) + t2i(step[0]) != i) begin
          failures++;
          $display("FAIL opcode %0d: step counter %0d expected %0d", op, 3 * t2i(step[1]) + t2i(step[0]), i);
        end
        if (i == 1 && op == 15) begin        // pause: run = 0 holds the step
          run = 0; #1;
          checks++;
          if (ctrl != CTRL_IDLE) failures++;
          @(posedge clk); @(negedge clk);
          checks++;
          if (3 * t2i(step[1]) + t2i(step[0]) != 1) begin failures++; $display("FAIL run=0 moved the step"); end
          run = 1;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
