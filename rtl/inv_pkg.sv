// inv_pkg: types and constants shared by the unified GF(p)/GF(2^n) inverter.
//
// The inverter works on multi-word operands. W is the word length handled by
// the word dual-field adder/subtractor per clock cycle; EMAX is the largest
// number of words an operand may occupy. W = 32 is the word length the design
// is evaluated with; EMAX = 9 covers the largest evaluated precision
// (256 bits; 256 + 2 bits fit in 9 words of 32 bits) and is this design's choice.
package inv_pkg;

  localparam int unsigned W_DEF    = 32;
  localparam int unsigned EMAX_DEF = 9;

  // Field selection, shared by every arithmetic block.
  typedef enum logic {
    FIELD_GFP  = 1'b0,   // prime field: two's complement words, carries propagate
    FIELD_GF2N = 1'b1    // binary extension field: polynomial words, no carries
  } field_t;

  // The four branches of the main loop (Algorithm B steps 4-7).
  typedef enum logic [1:0] {
    IT_UHALF = 2'd0,     // u := u/2,        s := 2s
    IT_VHALF = 2'd1,     // v := v/2,        r := 2r
    IT_USUB  = 2'd2,     // u := (u-v)/2,    r := r+s, s := 2s
    IT_VSUB  = 2'd3      // v := (v-u)/2,    s := s+r, r := 2r (then sign fix)
  } iter_op_t;

  // Operation of the r/s datapath for one pass over the words.
  typedef enum logic [2:0] {
    RS_NONE     = 3'd0,  // no write
    RS_SHL_S    = 3'd1,  // s := 2s
    RS_SHL_R    = 3'd2,  // r := 2r
    RS_ADDR_SHS = 3'd3,  // r := r+s, s := 2s  (sign handled by correct-sign bits)
    RS_ADDS_SHR = 3'd4,  // s := s+r, r := 2r
    RS_FINAL    = 3'd5   // dest := A -/+ B, operands chosen by rs_final_t
  } rs_op_t;

  // Operand choices of the final correction passes.
  typedef enum logic [1:0] {
    SRC_ZERO = 2'd0,
    SRC_R    = 2'd1,
    SRC_S    = 2'd2,
    SRC_P    = 2'd3
  } rs_src_t;

  typedef struct packed {
    rs_src_t a_sel;      // minuend / first addend
    rs_src_t b_sel;      // subtrahend / second addend
    logic    sub;        // 1: A - B, 0: A + B (GF(2^n): always A xor B)
    logic    dest_s;     // 1: write s, 0: write r
  } rs_final_t;

endpackage
