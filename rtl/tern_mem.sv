// tern_mem: main memory of the ternary processor, DEPTH words of WORD_TRITS
// trits (81 words: every 4-trit address).
//
// The read port is asynchronous: rdata_o always shows the word at addr_i, and
// the memory data register captures it at the clock edge of a read step, so a
// read completes in the same step that sets the address. r_w_i = 'Z' writes
// wdata_i at the rising edge; '1' (read) and '0' change nothing here. A
// second write port (ld_*) fills the memory from outside, for instance with
// a program while the processor is stopped, and a second read port (dbg_*)
// lets the outside read any word. The read/write trit follows the processor
// description; the port timing and the load/debug ports are this design's.
module tern_mem
  import tern_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_WORDS
) (
  input  logic   clk,
  input  tword_t addr_i,
  input  trit_t  r_w_i,
  input  tword_t wdata_i,
  output tword_t rdata_o,
  input  logic   ld_en_i,
  input  tword_t ld_addr_i,
  input  tword_t ld_data_i,
  input  tword_t dbg_addr_i,
  output tword_t dbg_data_o
);
  tword_t mem [DEPTH];

  function automatic wval_t index(tword_t a);
    wval_t v = word_val(a);
    return (v < 7'(DEPTH)) ? v : 7'(DEPTH - 1);
  endfunction

  always_ff @(posedge clk) begin
    if (ld_en_i)           mem[index(ld_addr_i)] <= ld_data_i;
    else if (r_w_i == TZ)  mem[index(addr_i)]    <= wdata_i;
  end

  assign rdata_o    = mem[index(addr_i)];
  assign dbg_data_o = mem[index(dbg_addr_i)];
endmodule
