// tb_table1_workloads: the evaluated workload - GF(p) inversions at 160, 192,
// 224 and 256 bits with a 32-bit word - run on the inverter at its default
// parameters, plus binary-field inversions at GF(2^163) and GF(2^233).
//
// For every inversion it checks r * a = 2^k (mod p) (r(x) a(x) = x^k mod p(x)),
// the range of k (n <= k <= 2n for GF(p); deg a <= k <= deg p + deg a + 1 for
// GF(2^n)), and that the main loop took exactly k(e+1) cycles. Per precision it
// compares the mean k with the iteration counts behind the published estimates
// of 1368, 1911, 2544 and 3276 cycles (k = 228, 273, 318, 364), allowing 3 %,
// and prints the mean main-loop cycle count at this design's word count
// e = ceil((n+2)/32).
module tb_table1_workloads;
  import inv_pkg::*;

  localparam int unsigned W    = W_DEF;
  localparam int unsigned EMAX = EMAX_DEF;
  localparam int unsigned IW   = (EMAX > 1) ? $clog2(EMAX) : 1;
  localparam int unsigned NW   = $clog2(EMAX + 1);
  localparam int unsigned KW   = $clog2(2*W*EMAX + 2) + 1;
  localparam int NB  = 640;
  localparam int RUNS = 40;
  typedef logic signed [NB-1:0] big_t;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          ld_we = 1'b0, ld_sel = 1'b0, start = 1'b0;
  logic [IW-1:0] ld_addr = '0, res_addr = '0;
  logic [W-1:0]  ld_data = '0, res_data;
  field_t        field = FIELD_GFP;
  logic [NW-1:0] nwords = NW'(1);
  logic          busy, done, iter_start;
  logic [KW-1:0] k;
  iter_op_t      iter_op;

  unified_inverter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int loop_cycles = 0;
  always @(posedge clk) if (dut.uv_valid || dut.uv_flush) loop_cycles <= loop_cycles + 1;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bits_of(big_t x);
    for (int i = NB-1; i >= 0; i--) if (x[i]) return i + 1;
    return 0;
  endfunction

  function automatic big_t pmod(big_t a, big_t p);
    int dp = bits_of(p);
    for (int i = NB-1; i >= dp - 1; i--)
      if (a[i]) a = a ^ (p << (i - (dp - 1)));
    return a;
  endfunction

  function automatic big_t pmulmod(big_t a, big_t b, big_t p);
    big_t acc = '0;
    for (int i = NB/2 - 1; i >= 0; i--) begin
      acc = pmod(acc << 1, p);
      if (b[i]) acc = acc ^ a;
    end
    return pmod(acc, p);
  endfunction

  function automatic big_t rand_big(int nbits);
    big_t x = '0;
    for (int i = 0; i < nbits; i += 32) x[i +: 32] = $urandom;
    return x & ((big_t'(1) <<< nbits) - 1);
  endfunction

  task automatic invert(input bit bin, input big_t p, input big_t a, input int e, input int n,
                        output int k_got, output int cyc);
    big_t r, lhs, rhs;
    int kmin, kmax;
    @(negedge clk);
    for (int i = 0; i < e; i++) begin
      ld_we = 1'b1; ld_addr = IW'(i);
      ld_sel = 1'b0; ld_data = a[i*W +: W]; @(negedge clk);
      ld_sel = 1'b1; ld_data = p[i*W +: W]; @(negedge clk);
    end
    ld_we = 1'b0;
    field = bin ? FIELD_GF2N : FIELD_GFP;
    nwords = NW'(e);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    loop_cycles = 0;
    while (!done) @(negedge clk);
    r = '0;
    for (int i = 0; i < e; i++) begin
      res_addr = IW'(i); #1;
      r[i*W +: W] = res_data;
    end
    k_got = int'(k);
    cyc = loop_cycles;
    if (bin) begin
      lhs = pmulmod(r, a, p);
      rhs = pmod(big_t'(1) << k_got, p);
      kmin = bits_of(a) - 1; kmax = n + bits_of(a);
    end else begin
      lhs = (r * a) % p;
      rhs = 1;
      for (int i = 0; i < k_got; i++) rhs = (rhs << 1) % p;
      kmin = n; kmax = 2 * n;
    end
    checks++;
    if (lhs != rhs) begin
      failures++; $display("FAIL inverse bin=%0d n=%0d a=%h r=%h k=%0d", bin, n, a, r, k_got);
    end
    checks++;
    if (k_got < kmin || k_got > kmax) begin
      failures++; $display("FAIL k=%0d outside [%0d, %0d]", k_got, kmin, kmax);
    end
    checks++;
    if (cyc != k_got * (e + 1)) begin
      failures++; $display("FAIL main loop %0d cycles, k(e+1) = %0d", cyc, k_got * (e + 1));
    end
  endtask

  big_t primes[4];
  int   pbits[4]  = '{160, 192, 224, 256};
  int   table_k[4] = '{228, 273, 318, 364};   // 1368/6, 1911/7, 2544/8, 3276/9

  initial begin
    big_t a;
    int kg, cg, e, n;
    real ksum, csum, kmean;
    primes[0] = (big_t'(1) <<< 160) - (big_t'(1) <<< 31) - 1;
    primes[1] = (big_t'(1) <<< 192) - (big_t'(1) <<< 64) - 1;
    primes[2] = (big_t'(1) <<< 224) - (big_t'(1) <<< 96) + 1;
    primes[3] = (big_t'(1) <<< 256) - (big_t'(1) <<< 224) + (big_t'(1) <<< 192)
              + (big_t'(1) <<< 96) - 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int j = 0; j < 4; j++) begin
      e = (pbits[j] + 2 + W - 1) / W;
      ksum = 0; csum = 0;
      for (int t = 0; t < RUNS; t++) begin
        do a = rand_big(pbits[j]) % primes[j]; while (a == 0);
        invert(0, primes[j], a, e, pbits[j], kg, cg);
        ksum += kg; csum += cg;
      end
      kmean = ksum / RUNS;
      $display("GF(p) %0d bits, e=%0d: mean k %0.1f (published estimate %0d), mean main loop %0.1f cycles",
               pbits[j], e, kmean, table_k[j], csum / RUNS);
      checks++;
      if (kmean < 0.97 * table_k[j] || kmean > 1.03 * table_k[j]) begin
        failures++; $display("FAIL mean k off the published estimate");
      end
    end

    for (int j = 0; j < 2; j++) begin
      big_t f;
      n = (j == 0) ? 163 : 233;
      f = (j == 0) ? ((big_t'(1) << 163) | 'hC9) : ((big_t'(1) << 233) | (big_t'(1) << 74) | 1);
      e = (n + 1 + W - 1) / W;
      ksum = 0; csum = 0;
      for (int t = 0; t < RUNS; t++) begin
        do a = rand_big(n); while (a == 0);
        invert(1, f, a, e, n, kg, cg);
        ksum += kg; csum += cg;
      end
      $display("GF(2^%0d), e=%0d: mean k %0.1f, mean main loop %0.1f cycles", n, e, ksum / RUNS, csum / RUNS);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
