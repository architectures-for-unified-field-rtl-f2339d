// rs_datapath: word-serial r + s and 2r / 2s unit with correct-sign bits.
//
// In each main-loop iteration this unit performs two operations on the words
// of r and s in the same pass: one variable becomes the sum r + s and the
// other is doubled (Algorithm B steps 4-7). Word j of r and s enters in cycle j
// and both results for word j are written back in the same cycle, so a pass
// takes e cycles and finishes inside the e+1 cycles of the (u-v)/2 pass.
//  - operand steering (block D) picks the adder inputs and the word to be
//    doubled;
//  - the doubling is a one-bit left shift across word boundaries: the top bit
//    of word j is held in a flip-flop and enters word j+1 as its lsb
//    (blocks A and B);
//  - result steering (block C) sends the sum and the doubled word to the r
//    and s registers.
//
// Correct-sign bit. In GF(p) mode the algorithm negates s whenever the new v
// would be negative (step 7.a). Negating a multi-word value would cost a pass,
// so instead s carries one extra bit, cs_s: the stored two's complement word
// string X stands for the value X when the bit is 0 and for -X when it is 1.
// A negation of s is then just a toggle of cs_s (cs_flip_s). A sum is formed
// as dest + other when the signs agree and as dest - other when they differ,
// and the result keeps the destination's bit (the case analysis of
// Algorithm C). Because a result keeps its destination's bit and only s is
// ever negated, the bit r would carry is always 0, so r has none. In GF(2^n)
// mode the bit stays 0 and the adder performs xor.
//
// Final passes (op = RS_FINAL) use the same adder for the correction steps:
// dest := A -/+ B with A, B from {0, r, s, p}. res_sign and res_zero describe
// the result words of the latest pass and are valid after its last word.
//
// The two-operations-per-pass structure and the extra sign bit follow the
// document; the encoding of the correct-sign bit (a negation flag rather than
// the document's pair "actual sign / correct sign"), keeping it for s only,
// and the reuse of the unit for the final correction are this design's
// choices.
module rs_datapath
  import inv_pkg::*;
#(
  parameter int unsigned W = W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  field_t       field,
  input  rs_op_t       op,
  input  rs_final_t    fin,
  input  logic [W-1:0] r_word,
  input  logic [W-1:0] s_word,
  input  logic [W-1:0] p_word,
  input  logic         in_valid,
  input  logic         in_first,
  // correct-sign bit control
  input  logic         cs_clear,    // cs_s := 0 (start of an inversion)
  input  logic         cs_flip_s,   // s := -s (Algorithm B step 7.a)
  output logic         cs_s,
  // write-back
  output logic         r_we,
  output logic [W-1:0] r_wdata,
  output logic         s_we,
  output logic [W-1:0] s_wdata,
  output logic [W-1:0] sum_word,
  output logic         res_sign,
  output logic         res_zero
);

  logic [W-1:0] a_op, b_op, shl_src, shl_word;
  logic         sub, cin, cout, carry_q, msb_q, nz_q;

  function automatic logic [W-1:0] pick(input rs_src_t sel, input logic [W-1:0] r,
                                        input logic [W-1:0] s, input logic [W-1:0] p);
    case (sel)
      SRC_R:   return r;
      SRC_S:   return s;
      SRC_P:   return p;
      default: return '0;
    endcase
  endfunction

  // block D and the correct-sign decision of Algorithm C
  always_comb begin
    a_op    = r_word;
    b_op    = s_word;
    sub     = 1'b0;
    shl_src = s_word;
    unique case (op)
      RS_ADDR_SHS: begin a_op = r_word; b_op = s_word; sub = cs_s; shl_src = s_word; end
      RS_ADDS_SHR: begin a_op = s_word; b_op = r_word; sub = cs_s; shl_src = r_word; end
      RS_SHL_R:    shl_src = r_word;
      RS_FINAL: begin
        a_op = pick(fin.a_sel, r_word, s_word, p_word);
        b_op = pick(fin.b_sel, r_word, s_word, p_word);
        sub  = fin.sub;
      end
      default: ;
    endcase
  end

  assign cin = in_first ? sub : carry_q;

  wdfas #(.W(W)) u_wdfas (
    .a(a_op), .b(b_op), .sub(sub), .field(field), .cin(cin),
    .sum(sum_word), .cout(cout)
  );

  // blocks A and B: left shift by one across words
  assign shl_word = {shl_src[W-2:0], in_first ? 1'b0 : msb_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q  <= 1'b0;
      msb_q    <= 1'b0;
      nz_q     <= 1'b0;
      res_sign <= 1'b0;
      res_zero <= 1'b1;
    end else if (in_valid) begin
      carry_q  <= cout;
      msb_q    <= shl_src[W-1];
      nz_q     <= (in_first ? 1'b0 : nz_q) | (sum_word != '0);
      res_sign <= (field == FIELD_GFP) && sum_word[W-1];
      res_zero <= !((in_first ? 1'b0 : nz_q) | (sum_word != '0));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  cs_s <= 1'b0;
    else if (cs_clear)                           cs_s <= 1'b0;
    else if (cs_flip_s && field == FIELD_GFP)    cs_s <= ~cs_s;
  end

  // block C: result steering
  always_comb begin
    r_we    = 1'b0;
    s_we    = 1'b0;
    r_wdata = shl_word;
    s_wdata = shl_word;
    unique case (op)
      RS_SHL_S:    s_we = in_valid;
      RS_SHL_R:    r_we = in_valid;
      RS_ADDR_SHS: begin r_we = in_valid; r_wdata = sum_word; s_we = in_valid; end
      RS_ADDS_SHR: begin s_we = in_valid; s_wdata = sum_word; r_we = in_valid; end
      RS_FINAL: begin
        r_we    = in_valid && !fin.dest_s;
        s_we    = in_valid &&  fin.dest_s;
        r_wdata = sum_word;
        s_wdata = sum_word;
      end
      default: ;
    endcase
  end

endmodule
