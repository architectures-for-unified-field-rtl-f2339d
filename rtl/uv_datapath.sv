// uv_datapath: word-serial (u - v)/2 unit.
//
// Computes X := (A -/+ B) / 2 over e words, least significant word first, where
// A and B are u and v in either order (block C, the operand steering). Word j
// of both operands enters in cycle j; the word dual-field adder/subtractor
// (wdfas) produces raw word j, whose carry is registered for word j+1. The
// division by two is a one-bit right shift across word boundaries: the least
// significant bit of raw word j is split off (block A) and the upper W-1 bits
// wait one cycle in a latch. In cycle j+1 they are joined (block B) with the
// split-off bit of raw word j+1, which becomes the top bit of result word j.
// After the last operand word one flush cycle emits the last result word, its
// top bit being the sign of the raw result (arithmetic shift) in GF(p) mode
// and 0 in GF(2^n) mode. A pass over e words therefore takes e+1 cycles.
// Halving alone (u/2 or v/2) is the same pass with B forced to zero.
//
// Interface: in_valid with in_first on word 0; flush for the cycle after the
// last word. out_valid/out_word are combinational: in cycle j (1 <= j <= e) they
// carry result word j-1. raw_sign is the sign bit of the latest raw word, so
// during the flush cycle it is the sign of the complete raw result.
//
// Blocks A, B and C and the e+1-cycle timing follow the document; the signed
// (arithmetic) shift for a negative v is this design's choice, since v is kept
// in two's complement rather than negated.
module uv_datapath
  import inv_pkg::*;
#(
  parameter int unsigned W = W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  field_t       field,
  input  logic [W-1:0] u_word,
  input  logic [W-1:0] v_word,
  input  logic         swap,      // 0: A = u, B = v   1: A = v, B = u
  input  logic         b_zero,    // halve A only
  input  logic         sub,       // GF(p): A - B, else A + B
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         flush,
  output logic         out_valid,
  output logic [W-1:0] out_word,
  output logic         raw_sign
);

  logic [W-1:0] a_op, b_op, raw;
  logic         cin, cout;
  logic         carry_q;
  logic [W-2:0] latch_q;     // raw[W-1:1] of the previous word
  logic         sign_q;      // raw[W-1]   of the previous word

  // block C: operand steering
  assign a_op = swap ? v_word : u_word;
  assign b_op = b_zero ? '0 : (swap ? u_word : v_word);
  assign cin  = in_first ? sub : carry_q;

  wdfas #(.W(W)) u_wdfas (
    .a(a_op), .b(b_op), .sub(sub), .field(field), .cin(cin),
    .sum(raw), .cout(cout)
  );

  // block A: split the lsb off; the rest waits one cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q <= 1'b0;
      latch_q <= '0;
      sign_q  <= 1'b0;
    end else if (in_valid) begin
      carry_q <= cout;
      latch_q <= raw[W-1:1];
      sign_q  <= raw[W-1];
    end
  end

  // block B: recombine into the shifted result word
  assign out_valid = (in_valid && !in_first) || flush;
  assign out_word  = flush ? {(field == FIELD_GFP) && sign_q, latch_q}
                           : {raw[0], latch_q};
  assign raw_sign  = sign_q;

endmodule
