// tb_tern_mdr: checks that the memory data register loads memory data on a
// read ('1'), the bus on MDR 'Z' when no read, holds otherwise, and asks to
// drive the bus on MDR '1'; compared with a reference copy each cycle.
module tb_tern_mdr;
  import tern_pkg::*;
  import tern_tb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic   clk = 0, rst_n = 0, en = 0, drive;
  trit_t  mdr = T0, rw = T0;
  tword_t bus = '0, rd = '0, q;
  int     checks = 0, failures = 0, model = 0, nread = 0, nbus = 0;

  tern_mdr dut (.clk(clk), .rst_n(rst_n), .en_i(en), .mdr_i(mdr), .r_w_i(rw),
                .bus_i(bus), .mem_rdata_i(rd), .q_o(q), .drive_o(drive));

  always #20 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en  = ($urandom_range(7) != 0);
      mdr = i2t($urandom_range(2));
      rw  = i2t($urandom_range(2));
      bus = i2w($urandom_range(80));
      rd  = i2w($urandom_range(80));
      #1;
      checks++;
      if (drive != (en && mdr == T1)) begin failures++; $display("FAIL drive"); end
      @(posedge clk);
      if (en && rw == T1)       begin model = w2i(rd);  nread++; end
      else if (en && mdr == TZ) begin model = w2i(bus); nbus++;  end
      #1;
      checks++;
      if (w2i(q) != model) begin
        failures++;
        $display("FAIL cycle %0d: q %0d expected %0d", n, w2i(q), model);
      end
    end
    checks++;
    if (nread == 0 || nbus == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
