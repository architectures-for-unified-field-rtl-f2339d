// tb_rs_datapath: exercises the r+s / 2r unit with random multi-word r, s and
// p in both fields. The testbench holds r, s and p as whole numbers and plays
// the registers: it feeds word j in cycle j and applies the unit's write
// enables. Loop operations are checked on the algorithm's values: r must hold
// r, and s must hold s or -s as the correct-sign bit says, after r := r+s /
// s := 2s, s := s+r / r := 2r and the doublings, with s negated at random via
// cs_flip_s beforehand. Final operations dest := A -/+ B are checked with the
// result sign and zero flags. Each pass must take e cycles.
module tb_rs_datapath;
  import inv_pkg::*;
  localparam int unsigned W    = W_DEF;
  localparam int unsigned EMAX = EMAX_DEF;
  localparam int NB = W*EMAX + W;
  typedef logic signed [NB-1:0] big_t;

  logic         clk = 1'b0, rst_n = 1'b0;
  field_t       field = FIELD_GFP;
  rs_op_t       op = RS_NONE;
  rs_final_t    fin = '{a_sel: SRC_ZERO, b_sel: SRC_R, sub: 1'b0, dest_s: 1'b0};
  logic [W-1:0] r_word = '0, s_word = '0, p_word = '0;
  logic         in_valid = 1'b0, in_first = 1'b0, cs_clear = 1'b0, cs_flip_s = 1'b0;
  logic         cs_s, r_we, s_we, res_sign, res_zero;
  logic [W-1:0] r_wdata, s_wdata, sum_word;
  int checks = 0, failures = 0;

  rs_datapath #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic big_t rnd(int nbits);
    big_t x = '0;
    for (int i = 0; i < nbits; i += 32) x[i +: 32] = $urandom;
    return x & ((big_t'(1) <<< nbits) - 1);
  endfunction

  function automatic big_t sext(big_t x, int e);   // sign-extend from e words
    big_t m = (big_t'(1) <<< (e*W)) - 1;
    x = x & m;
    if (x[e*W-1]) x = x | ~m;
    return x;
  endfunction

  function automatic big_t src(rs_src_t sel, big_t r, big_t s, big_t p);
    case (sel)
      SRC_R:   return r;
      SRC_S:   return s;
      SRC_P:   return p;
      default: return '0;
    endcase
  endfunction

  big_t R, S, P;

  // one pass of e words; the testbench updates R and S from the write ports
  task automatic pass(int e);
    big_t nr = R, ns = S;
    for (int c = 0; c < e; c++) begin
      @(negedge clk);
      in_valid = 1'b1; in_first = (c == 0);
      r_word = R[c*W +: W]; s_word = S[c*W +: W]; p_word = P[c*W +: W];
      #1;
      if (r_we) nr[c*W +: W] = r_wdata;
      if (s_we) ns[c*W +: W] = s_wdata;
    end
    @(negedge clk);
    in_valid = 1'b0;
    R = sext(nr, e);
    S = sext(ns, e);
  endtask

  initial begin
    big_t ra, sa, x, expd;
    int e;
    bit bin, ok;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      e   = 1 + int'($urandom % EMAX);
      bin = t[0];
      field = bin ? FIELD_GF2N : FIELD_GFP;
      @(negedge clk); cs_clear = 1'b1; @(negedge clk); cs_clear = 1'b0;
      ra = rnd(e*W - 3) >> ($urandom % 16);
      sa = rnd(e*W - 3) >> ($urandom % 16);
      P  = rnd(e*W - 3);
      if (!bin && t[1]) ra = -ra;
      if (!bin && t[2]) sa = -sa;
      R = ra; S = sa;
      // negate s through the correct-sign bit
      if (!bin && t[3]) begin
        @(negedge clk); cs_flip_s = 1'b1; @(negedge clk); cs_flip_s = 1'b0;
        sa = -sa;
      end
      if (t % 5 != 4) begin
        op = rs_op_t'(1 + (t / 2) % 4);
        case (op)
          RS_SHL_S:    sa = sa <<< 1;
          RS_SHL_R:    ra = ra <<< 1;
          RS_ADDR_SHS: begin ra = bin ? (ra ^ sa) : (ra + sa); sa = sa <<< 1; end
          default:     begin sa = bin ? (sa ^ ra) : (sa + ra); ra = ra <<< 1; end
        endcase
        pass(e);
        x = (cs_s && !bin) ? -S : S;
        checks++;
        if (bin) ok = (R == sext(ra, e)) && (S == sext(sa, e)) && !cs_s;
        else     ok = (R == ra) && (x == sa);
        if (!ok) begin
          failures++;
          $display("FAIL loop op=%0d e=%0d bin=%0d cs=%0d: R=%h exp %h, S=%h exp %h", op, e, bin, cs_s, R, ra, x, sa);
        end
      end else begin
        op = RS_FINAL;
        fin.a_sel  = rs_src_t'($urandom % 4);
        fin.b_sel  = rs_src_t'(1 + $urandom % 3);
        fin.sub    = $urandom;
        fin.dest_s = $urandom;
        if (t % 3 == 0) begin fin.a_sel = SRC_R; fin.b_sel = SRC_R; fin.sub = 1'b1; end
        x = src(fin.a_sel, R, S, P);
        expd = src(fin.b_sel, R, S, P);
        expd = bin ? sext(x ^ expd, e) : sext(fin.sub ? x - expd : x + expd, e);
        if (bin) expd = expd & ((big_t'(1) <<< (e*W)) - 1);
        pass(e);
        x = fin.dest_s ? S : R;
        if (bin) x = x & ((big_t'(1) <<< (e*W)) - 1);
        checks++;
        if (x != expd || res_zero != (expd == 0) || (!bin && res_sign != (expd < 0))) begin
          failures++;
          $display("FAIL final e=%0d bin=%0d %0d %0d sub=%0d: got %h exp %h z=%0d s=%0d",
                   e, bin, fin.a_sel, fin.b_sel, fin.sub, x, expd, res_zero, res_sign);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
