// tern_bus: the processor's single internal data bus.
//
// The processor description connects every register to one bus with
// tri-state outputs and enables one driver at a time. Here the bus is a
// multiplexer: each of the N sources has a drive request and a word, and the
// bus carries the word of the requesting source, or 0000 when none requests.
// More than one request is an error: conflict_o goes high (the words are then
// merged trit-wise with T-OR); the processor top asserts that it never
// happens. Combinational.
module tern_bus
  import tern_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic   [N-1:0] drive_i,
  input  tword_t [N-1:0] data_i,
  output tword_t         bus_o,
  output logic           conflict_o
);
  always_comb begin
    int unsigned cnt;
    cnt   = 0;
    bus_o = '0;
    for (int s = 0; s < N; s++) begin
      if (drive_i[s]) begin
        cnt = cnt + 1;
        for (int i = 0; i < WORD_TRITS; i++) bus_o[i] = t_or(bus_o[i], data_i[s][i]);
      end
    end
    conflict_o = (cnt > 1);
  end

endmodule
