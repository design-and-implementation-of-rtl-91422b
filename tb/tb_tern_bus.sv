// tb_tern_bus: checks that the bus carries the word of the single driving
// source, 0000 when none drives, and flags a conflict when several drive.
module tb_tern_bus;
  import tern_pkg::*;
  import tern_tb_pkg::*;

  logic   [7:0] drive;
  tword_t [7:0] data;
  tword_t       bus;
  logic         conflict;
  int           checks = 0, failures = 0;

  tern_bus #(.N(8)) dut (.drive_i(drive), .data_i(data), .bus_o(bus), .conflict_o(conflict));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 8; i++) data[i] = i2w($urandom_range(80));
      s = $urandom_range(8);
      drive = (s == 8) ? 8'h00 : (8'h01 << s);
      #1;
      checks += 2;
      if (w2i(bus) != ((s == 8) ? 0 : w2i(data[s]))) begin
        failures++; $display("FAIL source %0d bus %s", s, w2s(bus));
      end
      if (conflict) begin failures++; $display("FAIL false conflict"); end
    end
    drive = 8'b0001_0010; #1;
    checks++;
    if (!conflict) begin failures++; $display("FAIL conflict not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
