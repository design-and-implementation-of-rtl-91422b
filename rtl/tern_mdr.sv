// tern_mdr: memory data register of the ternary processor.
//
// Controlled by two trits. r_w_i = '1' (memory read) loads the word the
// memory presents on mem_rdata_i; otherwise mdr_i = 'Z' loads the bus. For
// mdr_i = '1' the register asks to drive the bus (drive_o). Its content is
// always offered to the memory as write data. Both loads happen at the rising
// clock edge and are gated by en_i. Read data taking precedence over a bus
// load is this design's choice; the two control trits follow the processor
// description.
module tern_mdr
  import tern_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en_i,
  input  trit_t  mdr_i,
  input  trit_t  r_w_i,
  input  tword_t bus_i,
  input  tword_t mem_rdata_i,
  output tword_t q_o,
  output logic   drive_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    q_o <= '0;
    else if (en_i && r_w_i == T1)  q_o <= mem_rdata_i;
    else if (en_i && mdr_i == TZ)  q_o <= bus_i;
  end

  assign drive_o = en_i && (mdr_i == T1);
endmodule
