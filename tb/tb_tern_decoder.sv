// tb_tern_decoder: applies all 27 opcodes to the 3:27 decoder and checks
// that exactly the line numbered by the opcode's value is high.
module tb_tern_decoder;
  import tern_pkg::*;
  import tern_tb_pkg::*;

  topc_t       opc;
  logic [26:0] line;
  int          checks = 0, failures = 0;

  tern_decoder dut (.opc_i(opc), .line_o(line));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 27; k++) begin
      opc = {i2t(k / 9), i2t((k / 3) % 3), i2t(k % 3)};
      #1;
      checks++;
      if (line !== (27'd1 << k)) begin
        failures++;
        $display("FAIL opcode %0d lines %b", k, line);
      end
    end
    // T_MVI A is Z10 = 9 + 6 = 15
    opc = OP_MVIA; #1;
    checks++;
    if (!line[15]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
