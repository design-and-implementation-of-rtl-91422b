// tb_tern_step_counter: runs the two-trit step counter through random END
// and enable patterns on a 40 ns clock and compares it each cycle with an
// integer count (0..8, wrapping, cleared by END, held when disabled).
module tb_tern_step_counter;
  import tern_pkg::*;
  import tern_tb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 0, rst_n = 0, en = 0;
  trit_t       end_t = T0;
  trit_t [1:0] step;
  int          checks = 0, failures = 0, model = 0;

  tern_step_counter dut (.clk(clk), .rst_n(rst_n), .en_i(en), .end_i(end_t), .step_o(step));

  always #20 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      checks++;
      if (3 * t2i(step[1]) + t2i(step[0]) != model) begin
        failures++;
        $display("FAIL cycle %0d: step %0d expected %0d", n, 3 * t2i(step[1]) + t2i(step[0]), model);
      end
      en    = (n < 30) || ($urandom_range(9) != 0);
      end_t = (n < 30) ? T0 : (($urandom_range(11) == 0) ? T1 : i2t($urandom_range(1)));
      @(posedge clk);
      if (en) model = (end_t == T1) ? 0 : (model + 1) % 9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
