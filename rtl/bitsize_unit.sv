// bitsize_unit: word-serial bit-size (degree) detector.
//
// Watches a multi-word value as its words are written, least significant word
// first, and reports, once the last word has been seen, the number of bits
// needed to represent its magnitude. In GF(2^n) mode the words form a
// polynomial and the bit size is deg + 1, so comparing bit sizes is the same
// as comparing degrees: this is what lets one control unit serve both fields.
// In GF(p) mode the value is two's complement and may be negative (v is kept
// negative instead of being negated, see rs_datapath / inv_controller); the
// unit then reports the bit size of -X. To do that without a second pass it
// runs an incrementer on the inverted words (-X = ~X + 1) beside the stream
// and tracks the most significant one bit of both the value and its
// negation; the sign, known at the last word, picks one.
//
// Interface: in_valid qualifies in_word / in_idx; in_first marks word 0 and
// in_last the final word. Outputs are registered and change one clock edge
// after the in_last word: bsize, is_zero, is_neg; lsb is bit 0 of word 0,
// registered when word 0 arrives.
//
// The document asks for a bit-size comparison and says nothing about how the
// bit size is found; this streaming detector is this design's choice.
module bitsize_unit
  import inv_pkg::*;
#(
  parameter int unsigned W    = W_DEF,
  parameter int unsigned EMAX = EMAX_DEF,
  localparam int unsigned BW  = $clog2(W*EMAX + 1),
  localparam int unsigned IW  = (EMAX > 1) ? $clog2(EMAX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  field_t        field,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [IW-1:0] in_idx,
  input  logic [W-1:0]  in_word,
  output logic [BW-1:0] bsize,
  output logic          is_zero,
  output logic          is_neg,
  output logic          lsb
);

  // number of bits of a word: index of its top one bit plus one, 0 for zero
  function automatic logic [BW-1:0] word_bits(input logic [W-1:0] x);
    logic [BW-1:0] r;
    r = '0;
    for (int i = 0; i < W; i++)
      if (x[i]) r = BW'(i + 1);
    return r;
  endfunction

  logic [BW-1:0] pos_q, neg_q;         // running bit sizes of X and -X
  logic          ncarry_q;             // carry of the ~X + 1 incrementer
  logic          nz_q;                 // any nonzero word so far

  logic [BW-1:0] pos_base, neg_base, pos_n, neg_n, offs;
  logic          carry_base, nz_base, carry_n;
  logic [W-1:0]  nword;

  always_comb begin
    pos_base   = in_first ? '0   : pos_q;
    neg_base   = in_first ? '0   : neg_q;
    carry_base = in_first ? 1'b1 : ncarry_q;
    nz_base    = in_first ? 1'b0 : nz_q;
    offs       = BW'(in_idx) * BW'(W);
    nword      = ~in_word + W'(carry_base);
    carry_n    = carry_base & (in_word == '0);
    pos_n      = (in_word != '0) ? offs + word_bits(in_word) : pos_base;
    neg_n      = (nword   != '0) ? offs + word_bits(nword)   : neg_base;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q    <= '0;
      neg_q    <= '0;
      ncarry_q <= 1'b1;
      nz_q     <= 1'b0;
      bsize    <= '0;
      is_zero  <= 1'b1;
      is_neg   <= 1'b0;
      lsb      <= 1'b0;
    end else if (in_valid) begin
      pos_q    <= pos_n;
      neg_q    <= neg_n;
      ncarry_q <= carry_n;
      nz_q     <= nz_base | (in_word != '0);
      if (in_first) lsb <= in_word[0];
      if (in_last) begin
        is_neg  <= (field == FIELD_GFP) && in_word[W-1];
        bsize   <= ((field == FIELD_GFP) && in_word[W-1]) ? neg_n : pos_n;
        is_zero <= !(nz_base | (in_word != '0));
      end
    end
  end

endmodule
