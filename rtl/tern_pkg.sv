// tern_pkg: shared types, constants and ternary logic/arithmetic functions of
// the 4-trit ternary processor.
//
// A trit takes one of three levels, written '0', 'Z' and '1' (low, middle and
// high). Each trit is carried on two binary wires: 0 -> 2'b00, Z -> 2'b01,
// 1 -> 2'b10 (2'b11 is never produced and is read as '1'). Numbers are
// unbalanced ternary: '0' weighs 0, 'Z' weighs 1 and '1' weighs 2, so a 4-trit
// word holds 0..80 and "000Z" is one. The three levels and the 4-trit word
// follow the processor's description; the two-wire encoding is this design's.
//
// The logic functions are the usual multi-valued ones: T-NOT is the standard
// ternary inverter (2 - x), T-AND is the minimum, T-OR the maximum, T-NAND and
// T-NOR their inversions, and T-XOR is max(min(a, not b), min(not a, b)).
// Addition is a trit-serial ripple of ternary full adders; subtraction adds
// the trit-wise inverse plus one (radix complement).
package tern_pkg;

  typedef enum logic [1:0] {
    T0 = 2'b00,   // logic '0', value 0
    TZ = 2'b01,   // logic 'Z', value 1
    T1 = 2'b10    // logic '1', value 2
  } trit_t;

  localparam int unsigned WORD_TRITS = 4;     // data and address width
  localparam int unsigned OP_TRITS   = 3;     // opcode width
  localparam int unsigned MEM_WORDS  = 81;    // 3**WORD_TRITS

  typedef trit_t [WORD_TRITS-1:0] tword_t;
  typedef trit_t [OP_TRITS-1:0]   topc_t;

  // ALU function select, sel(2) is the most significant trit.
  // "0Z1" (add) is the code used by the fetch steps to increment the PC;
  // the other codes are this design's choice.
  localparam topc_t ALU_PASS = {T0, T0, T0};  // X
  localparam topc_t ALU_AND  = {T0, T0, TZ};  // T-AND(X, W)
  localparam topc_t ALU_OR   = {T0, T0, T1};  // T-OR(X, W)
  localparam topc_t ALU_XOR  = {T0, TZ, T0};  // T-XOR(X, W)
  localparam topc_t ALU_ADC  = {T0, TZ, TZ};  // X + W + carry
  localparam topc_t ALU_ADD  = {T0, TZ, T1};  // X + W
  localparam topc_t ALU_SUB  = {T0, T1, T0};  // W - X
  localparam topc_t ALU_SBB  = {T0, T1, TZ};  // W - X - borrow
  localparam topc_t ALU_DEC  = {T0, T1, T1};  // X - W
  localparam topc_t ALU_RAL  = {TZ, T0, T0};  // rotate X left one trit
  localparam topc_t ALU_RAR  = {TZ, T0, TZ};  // rotate X right one trit
  localparam topc_t ALU_CMA  = {TZ, T0, T1};  // T-NOT of every trit of X

  // Opcodes of the 21 instructions (Table of the instruction set).
  localparam topc_t OP_ANA  = {T0, T0, TZ};
  localparam topc_t OP_ORA  = {T0, T0, T1};
  localparam topc_t OP_XRA  = {T0, TZ, T0};
  localparam topc_t OP_ADD  = {T0, TZ, TZ};
  localparam topc_t OP_ADC  = {T0, TZ, T1};
  localparam topc_t OP_SUB  = {T0, T1, T0};
  localparam topc_t OP_SBB  = {T0, T1, TZ};
  localparam topc_t OP_ICR  = {T0, T1, T1};
  localparam topc_t OP_DCR  = {TZ, T0, T0};
  localparam topc_t OP_RAL  = {TZ, T0, TZ};
  localparam topc_t OP_RAR  = {TZ, T0, T1};
  localparam topc_t OP_CMA  = {TZ, TZ, T0};
  localparam topc_t OP_ADDI = {TZ, TZ, TZ};
  localparam topc_t OP_SUI  = {TZ, TZ, T1};
  localparam topc_t OP_MVIA = {TZ, T1, T0};
  localparam topc_t OP_MVIB = {TZ, T1, TZ};
  localparam topc_t OP_LDA  = {TZ, T1, T1};
  localparam topc_t OP_MOVAB = {T1, T0, T0};
  localparam topc_t OP_MOVBA = {T1, T0, TZ};
  localparam topc_t OP_MOVAC = {T1, T0, T1};
  localparam topc_t OP_MOVCA = {T1, TZ, T0};

  // The control word of one step. Register controls: '1' = drive the bus
  // (out), 'Z' = load (in), '0' = idle. r_w: '1' read, 'Z' write, '0' idle.
  // y_z: 'Z' loads Y (and Z with the ALU result), '1' puts Z on the bus.
  // selmux: '1' selects the constant 000Z, otherwise the accumulator.
  typedef struct packed {
    trit_t pc;
    trit_t y_z;
    trit_t r_w;
    trit_t a;
    trit_t b;
    trit_t c;
    trit_t mar;
    trit_t mdr;
    trit_t ir;
    trit_t end_i;
    trit_t selmux;
    topc_t sel;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '0;

  // ---------------------------------------------------------------- values
  typedef logic [1:0] tval_t;                    // value of one trit, 0..2
  typedef logic [6:0] wval_t;                    // value of one word, 0..80

  function automatic tval_t trit_val(trit_t t);
    case (t)
      T0:      return 2'd0;
      TZ:      return 2'd1;
      default: return 2'd2;
    endcase
  endfunction

  // v must be 0..2; larger values give '1'
  function automatic trit_t val_trit(tval_t v);
    case (v)
      2'd0:    return T0;
      2'd1:    return TZ;
      default: return T1;
    endcase
  endfunction

  function automatic wval_t word_val(tword_t w);
    wval_t v = '0;
    for (int i = WORD_TRITS - 1; i >= 0; i--) v = 7'(v * 7'd3) + 7'(trit_val(w[i]));
    return v;
  endfunction

  function automatic tword_t val_word(wval_t v);
    tword_t w;
    wval_t  r = v;
    for (int i = 0; i < WORD_TRITS; i++) begin
      w[i] = val_trit(2'(r % 7'd3));
      r    = r / 7'd3;
    end
    return w;
  endfunction

  // ----------------------------------------------------------------- gates
  function automatic trit_t t_not(trit_t a);
    case (a)
      T0:      return T1;
      TZ:      return TZ;
      default: return T0;
    endcase
  endfunction

  function automatic trit_t t_and(trit_t a, trit_t b);
    return (trit_val(a) < trit_val(b)) ? val_trit(trit_val(a)) : val_trit(trit_val(b));
  endfunction

  function automatic trit_t t_or(trit_t a, trit_t b);
    return (trit_val(a) > trit_val(b)) ? val_trit(trit_val(a)) : val_trit(trit_val(b));
  endfunction

  function automatic trit_t t_nand(trit_t a, trit_t b);
    return t_not(t_and(a, b));
  endfunction

  function automatic trit_t t_nor(trit_t a, trit_t b);
    return t_not(t_or(a, b));
  endfunction

  function automatic trit_t t_xor(trit_t a, trit_t b);
    return t_or(t_and(a, t_not(b)), t_and(t_not(a), b));
  endfunction

  // Ternary full adder: a + b + cin (cin is '0' or 'Z'); returns {cout, sum}.
  function automatic trit_t [1:0] t_full_add(trit_t a, trit_t b, trit_t cin);
    logic [2:0] s;
    s = 3'(trit_val(a)) + 3'(trit_val(b)) + 3'(trit_val(cin));
    if (s >= 3'd3) return {TZ, val_trit(2'(s - 3'd3))};
    else           return {T0, val_trit(2'(s))};
  endfunction

endpackage
