// tb_tern_reg: drives random control trits, enables and data into a bus
// register and checks load on 'Z', hold on '0' and '1', the out request on
// '1', and the reset value, against a reference copy.
module tb_tern_reg;
  import tern_pkg::*;
  import tern_tb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic   clk = 0, rst_n = 0, en = 0, drive;
  trit_t  ctl = T0;
  tword_t d = '0, q;
  int     checks = 0, failures = 0, model;

  tern_reg #(.RESET({T1, TZ, T0, T0})) dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .ctl_i(ctl), .d_i(d), .q_o(q), .drive_o(drive));

  always #20 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++;
    if (w2i(q) != 63) begin failures++; $display("FAIL reset value %0d", w2i(q)); end
    model = 63;
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en  = ($urandom_range(7) != 0);
      ctl = i2t($urandom_range(2));
      d   = i2w($urandom_range(80));
      #1;
      checks++;
      if (drive != (en && ctl == T1)) begin failures++; $display("FAIL drive"); end
      @(posedge clk);
      if (en && ctl == TZ) model = w2i(d);
      #1;
      checks++;
      if (w2i(q) != model) begin
        failures++;
        $display("FAIL cycle %0d: q %0d expected %0d", n, w2i(q), model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
