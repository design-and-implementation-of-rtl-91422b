// tb_tern_mem: fills all 81 words through the load port, reads them back
// through both read ports, then mixes random writes (R_W 'Z'), reads and
// idle/read trits that must not write, against a reference array.
module tb_tern_mem;
  import tern_pkg::*;
  import tern_tb_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic   clk = 0, ld_en = 0;
  trit_t  rw = T0;
  tword_t addr = '0, wdata = '0, rdata, ld_addr = '0, ld_data = '0, dbg_addr = '0, dbg_data;
  int     checks = 0, failures = 0;
  int     ref_mem [81];

  tern_mem dut (.clk(clk), .addr_i(addr), .r_w_i(rw), .wdata_i(wdata), .rdata_o(rdata),
                .ld_en_i(ld_en), .ld_addr_i(ld_addr), .ld_data_i(ld_data),
                .dbg_addr_i(dbg_addr), .dbg_data_o(dbg_data));

  always #20 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, v;
    for (int i = 0; i < 81; i++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = i2w(i); ref_mem[i] = (i * 7 + 3) % 81; ld_data = i2w(ref_mem[i]);
    end
    @(negedge clk) ld_en = 0;
    for (int i = 0; i < 81; i++) begin
      addr = i2w(i); dbg_addr = i2w(80 - i);
      #1;
      checks += 2;
      if (w2i(rdata) != ref_mem[i])         begin failures++; $display("FAIL read %0d", i); end
      if (w2i(dbg_data) != ref_mem[80 - i]) begin failures++; $display("FAIL dbg %0d", i); end
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a = $urandom_range(80); v = $urandom_range(80);
      addr = i2w(a); wdata = i2w(v); rw = i2t($urandom_range(2));
      #1;
      checks++;
      if (w2i(rdata) != ref_mem[a]) begin failures++; $display("FAIL read %0d", a); end
      @(posedge clk);
      if (rw == TZ) ref_mem[a] = v;
    end
    @(negedge clk) rw = T0;
    for (int i = 0; i < 81; i++) begin
      dbg_addr = i2w(i);
      #1;
      checks++;
      if (w2i(dbg_data) != ref_mem[i]) begin failures++; $display("FAIL final %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
