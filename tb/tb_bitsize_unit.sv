// tb_bitsize_unit: streams random multi-word values (positive and negative
// two's complement in GF(p) mode, polynomials in GF(2^n) mode) through the
// bit-size detector and checks bit size of the magnitude, zero, sign and lsb
// against values computed directly on the whole number. Includes the corner
// cases 0, -1 and negative powers of two.
module tb_bitsize_unit;
  import inv_pkg::*;
  localparam int unsigned W    = W_DEF;
  localparam int unsigned EMAX = EMAX_DEF;
  localparam int unsigned BW   = $clog2(W*EMAX + 1);
  localparam int unsigned IW   = (EMAX > 1) ? $clog2(EMAX) : 1;
  localparam int NB = W*EMAX;

  logic          clk = 1'b0, rst_n = 1'b0;
  field_t        field = FIELD_GFP;
  logic          in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  logic [IW-1:0] in_idx = '0;
  logic [W-1:0]  in_word = '0;
  logic [BW-1:0] bsize;
  logic          is_zero, is_neg, lsb;
  int checks = 0, failures = 0;

  bitsize_unit #(.W(W), .EMAX(EMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic signed [NB-1:0] x, input int e, input bit bin);
    logic signed [NB-1:0] m;
    int exp_bs;
    field = bin ? FIELD_GF2N : FIELD_GFP;
    for (int i = 0; i < e; i++) begin
      @(negedge clk);
      in_valid = 1'b1; in_first = (i == 0); in_last = (i == e - 1);
      in_idx = IW'(i); in_word = x[i*W +: W];
    end
    @(negedge clk);
    in_valid = 1'b0;
    m = (!bin && x[e*W-1]) ? -(x | ~((NB'(1) << (e*W)) - 1)) : x;   // sign-extend from e words
    if (bin || !x[e*W-1]) m = x & ((NB'(1) << (e*W)) - 1);
    exp_bs = 0;
    for (int i = 0; i < NB; i++) if (m[i]) exp_bs = i + 1;
    checks++;
    if (bsize != BW'(exp_bs) || is_zero != (m == 0) || is_neg != (!bin && x[e*W-1]) || lsb != x[0]) begin
      failures++;
      $display("FAIL e=%0d bin=%0d x=%h: bs=%0d (exp %0d) zero=%0d neg=%0d lsb=%0d",
               e, bin, x, bsize, exp_bs, is_zero, is_neg, lsb);
    end
  endtask

  initial begin
    logic signed [NB-1:0] x;
    int e;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int e2 = 1; e2 <= EMAX; e2++) begin
      run('0, e2, 0);
      run('1, e2, 0);                                       // -1
      run(-(NB'(1) << ($urandom % (e2*W - 1))), e2, 0);      // -2^j
      run(NB'(1) << ($urandom % (e2*W)), e2, 1);
    end
    for (int t = 0; t < 600; t++) begin
      e = 1 + int'($urandom % EMAX);
      x = '0;
      for (int i = 0; i < e; i++) x[i*W +: W] = $urandom;
      // thin out the top so that many sizes occur
      x = x >> ($urandom % (e*W));
      if (t[1]) x = -x;
      run(x, e, t[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
