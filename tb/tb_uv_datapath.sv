// tb_uv_datapath: drives the (u-v)/2 unit with random multi-word operands in
// both fields and every steering (u-v, u+v, v-u, v+u, u/2, v/2), collects the
// shifted result words and compares them with (A -/+ B) / 2 worked out on the
// whole numbers. Also checks the timing: result word j-1 in cycle j, e words
// over e+1 cycles, and the raw-result sign during the flush cycle.
module tb_uv_datapath;
  import inv_pkg::*;
  localparam int unsigned W    = W_DEF;
  localparam int unsigned EMAX = EMAX_DEF;
  localparam int NB = W*EMAX + W;
  typedef logic signed [NB-1:0] big_t;

  logic         clk = 1'b0, rst_n = 1'b0;
  field_t       field = FIELD_GFP;
  logic [W-1:0] u_word = '0, v_word = '0, out_word;
  logic         swap = 1'b0, b_zero = 1'b0, sub = 1'b0;
  logic         in_valid = 1'b0, in_first = 1'b0, flush = 1'b0;
  logic         out_valid, raw_sign;
  int checks = 0, failures = 0;

  uv_datapath #(.W(W)) dut (.*);

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

  initial begin
    big_t u, v, a, b, raw, expv, got, mask;
    int e, nout;
    bit bin, timing_ok;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 800; t++) begin
      e    = 1 + int'($urandom % EMAX);
      bin  = t[0];
      mask = (big_t'(1) <<< (e*W)) - 1;
      u    = rnd(e*W - 2) >> ($urandom % 8);
      v    = rnd(e*W - 2) >> ($urandom % 8);
      if (!bin && t[1]) v = -v;
      swap   = t[2];
      b_zero = t[3];
      sub    = !bin && t[4];
      field  = bin ? FIELD_GF2N : FIELD_GFP;
      a = swap ? v : u;
      b = b_zero ? big_t'(0) : (swap ? u : v);
      raw  = bin ? ((a ^ b) & mask) : (sub ? a - b : a + b);
      expv = bin ? (raw >> 1) : ((raw >>> 1) & mask);
      got = '0; nout = 0; timing_ok = 1;
      for (int c = 0; c <= e; c++) begin
        @(negedge clk);
        in_valid = (c < e); in_first = (c == 0); flush = (c == e);
        u_word = (c < e) ? u[c*W +: W] : '0;
        v_word = (c < e) ? v[c*W +: W] : '0;
        #1;
        if (out_valid) begin
          if (c == 0) timing_ok = 0;
          got[(c-1)*W +: W] = out_word;
          nout++;
        end
        if (c == e && !bin && raw_sign != raw[e*W-1]) timing_ok = 0;
      end
      @(negedge clk);
      in_valid = 1'b0; flush = 1'b0;
      checks++;
      if (got != expv || nout != e || !timing_ok) begin
        failures++;
        $display("FAIL e=%0d bin=%0d swap=%0d bz=%0d sub=%0d: got %h exp %h nout=%0d",
                 e, bin, swap, b_zero, sub, got, expv, nout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
