// tb_unified_inverter: end-to-end test of the unified inverter at its default
// parameters (W = 32, EMAX = 9).
//
// Runs inversions in both fields over every precision e = 1 .. EMAX:
//  - random odd moduli / random polynomials with constant term 1, of random
//    size, with a random operand coprime to the modulus;
//  - the GF(p) precisions of the cycle-count table: 160, 192, 224 and 256-bit
//    primes (secp160r1, P-192, P-224, P-256) with random operands;
//  - binary fields with the irreducible trinomials / pentanomials of
//    GF(2^163) and GF(2^233).
// Each result is checked three ways: r and k against a behavioural model of
// the algorithm, r * a = 2^k (mod p) (or r(x) a(x) = x^k mod p(x)) by direct
// wide arithmetic, and the busy time against e + k(e+1) + 1 + 2e. It also
// counts how often each mechanism of the design occurs (the four loop
// branches, a negative v, a correct-sign flip, both outcomes of each final
// comparison, the smallest and largest precision) and fails if one never
// does. Prints the average k and cycle count per table precision.
module tb_unified_inverter;
  import inv_pkg::*;

  localparam int unsigned W    = W_DEF;
  localparam int unsigned EMAX = EMAX_DEF;
  localparam int unsigned IW   = (EMAX > 1) ? $clog2(EMAX) : 1;
  localparam int unsigned NW   = $clog2(EMAX + 1);
  localparam int unsigned KW   = $clog2(2*W*EMAX + 2) + 1;
  localparam int NB = 640;
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
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_op[4];
  int n_vneg_use = 0, n_flip = 0;
  int n_pcond[2][2];   // [r negative][comparison taken]
  int n_gcond[2];
  int n_e1 = 0, n_emax = 0;
  int busy_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (iter_start) n_op[iter_op]++;
    if (dut.uv_valid && dut.uv_first && !dut.uv_bzero && dut.u_ctrl.vneg) n_vneg_use++;
    if (dut.cs_flip_s) n_flip++;
    if (dut.u_ctrl.state == 3'd4 && dut.u_ctrl.cnt == 0) begin  // first cycle of the output pass
      if (dut.fld == FIELD_GFP) n_pcond[dut.u_ctrl.rneg_q][dut.u_ctrl.cond]++;
      else n_gcond[dut.u_ctrl.cond]++;
    end
  end

  // ---------------------------------------------------------------- reference arithmetic
  function automatic int bits_of(big_t x);
    big_t m = (x < 0) ? -x : x;
    for (int i = NB-1; i >= 0; i--) if (m[i]) return i + 1;
    return 0;
  endfunction

  function automatic big_t igcd(big_t a, big_t b);
    big_t t;
    while (b != 0) begin t = a % b; a = b; b = t; end
    return a;
  endfunction

  function automatic big_t pmod(big_t a, big_t p);   // polynomial remainder
    int dp = bits_of(p);
    for (int i = NB-1; i >= dp - 1; i--)
      if (a[i]) a = a ^ (p << (i - (dp - 1)));
    return a;
  endfunction

  function automatic big_t pgcd(big_t a, big_t b);
    big_t t;
    while (b != 0) begin t = pmod(a, b); a = b; b = t; end
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

  // Algorithm B (GF(p)) and Algorithm A (GF(2^n)), written directly on wide integers
  task automatic ref_inverse(input bit bin, input big_t p, input big_t a,
                             output big_t r_out, output int k_out);
    big_t u = p, v = a, r = 0, s = 1;
    int kk = 0;
    while (v != 0) begin
      if (!u[0])      begin u = u >>> 1; s = s <<< 1; end
      else if (!v[0]) begin v = v >>> 1; r = r <<< 1; end
      else if (bits_of(u) > bits_of(v)) begin
        u = bin ? ((u ^ v) >> 1) : ((u - v) >>> 1);
        r = bin ? (r ^ s) : (r + s);
        s = s <<< 1;
      end else begin
        v = bin ? ((v ^ u) >> 1) : ((v - u) >>> 1);
        s = bin ? (s ^ r) : (s + r);
        r = r <<< 1;
        if (!bin && v < 0) begin v = -v; s = -s; end
      end
      kk++;
    end
    if (bin) begin
      if (bits_of(r) == bits_of(p)) r = r ^ p;
    end else if (r < 0) begin
      if (r <= -p) r = r + p;
      r = -r;
    end else begin
      if (r >= p) r = r - p;
      r = p - r;
    end
    r_out = r;
    k_out = kk;
  endtask

  // ---------------------------------------------------------------- driving
  task automatic run_one(input bit bin, input big_t p, input big_t a, input int e,
                         output int k_got, output int cyc_got);
    big_t r_hw, r_ref, lhs, rhs;
    int k_ref, exp_cyc;
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
    busy_cycles = 0;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    r_hw = '0;
    for (int i = 0; i < e; i++) begin
      res_addr = IW'(i); #1;
      r_hw[i*W +: W] = res_data;
    end
    ref_inverse(bin, p, a, r_ref, k_ref);
    k_got = int'(k);
    cyc_got = busy_cycles;
    if (e == 1) n_e1++;
    if (e == EMAX) n_emax++;
    // model comparison
    checks++;
    if (r_hw != r_ref || k_got != k_ref) begin
      failures++;
      $display("FAIL model bin=%0d e=%0d p=%h a=%h: r=%h k=%0d, expected r=%h k=%0d",
               bin, e, p, a, r_hw, k_got, r_ref, k_ref);
    end
    // independent check of the defining relation
    checks++;
    if (bin) begin
      lhs = pmulmod(r_hw, a, p);
      rhs = pmod(big_t'(1) << k_got, p);
    end else begin
      lhs = (r_hw * a) % p;
      rhs = 1;
      for (int i = 0; i < k_got; i++) rhs = (rhs << 1) % p;
    end
    if (lhs != rhs || (!bin && (r_hw <= 0 || r_hw > p))) begin
      failures++;
      $display("FAIL relation bin=%0d e=%0d p=%h a=%h r=%h k=%0d", bin, e, p, a, r_hw, k_got);
    end
    // cycle count: init e, k iterations of e+1, the v = 0 test, final passes
    exp_cyc = e + k_got * (e + 1) + 1 + 2 * e;
    checks++;
    if (cyc_got != exp_cyc) begin
      failures++;
      $display("FAIL cycles bin=%0d e=%0d: %0d, expected %0d", bin, e, cyc_got, exp_cyc);
    end
  endtask

  function automatic big_t rand_big(int nbits);
    big_t x = '0;
    for (int i = 0; i < nbits; i += 32) x[i +: 32] = $urandom;
    x = x & ((big_t'(1) <<< nbits) - 1);
    return x;
  endfunction

  // random modulus with exactly nbits bits (top and bottom bit set) and an operand
  task automatic rand_case(input bit bin, input int nbits, output big_t p, output big_t a);
    p = rand_big(nbits);
    p[nbits-1] = 1'b1;
    p[0] = 1'b1;
    forever begin
      a = rand_big(nbits);
      if (!bin) a = a % p;
      else if (bits_of(a) >= nbits) a = a ^ p;
      if (a == 0) continue;
      if (bin ? (pgcd(p, a) == 1) : (igcd(p, a) == 1)) break;
    end
  endtask

  int kg, cg;
  big_t P, A;
  big_t primes[4];
  int   pbits[4];
  real  ksum, csum;

  initial begin
    // NIST / SEC 2 prime-field moduli
    primes[0] = (big_t'(1) <<< 160) - (big_t'(1) <<< 31) - 1;                         // secp160r1
    primes[1] = (big_t'(1) <<< 192) - (big_t'(1) <<< 64) - 1;                          // P-192
    primes[2] = (big_t'(1) <<< 224) - (big_t'(1) <<< 96) + 1;                          // P-224
    primes[3] = (big_t'(1) <<< 256) - (big_t'(1) <<< 224) + (big_t'(1) <<< 192)
              + (big_t'(1) <<< 96) - 1;                                                 // P-256
    pbits = '{160, 192, 224, 256};
    foreach (n_op[i]) n_op[i] = 0;
    n_pcond = '{'{0, 0}, '{0, 0}};
    n_gcond = '{0, 0};

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // small sanity cases
    run_one(0, 11, 3, 1, kg, cg);
    run_one(1, 'b1011, 'b110, 1, kg, cg);

    // random sizes over all precisions, both fields
    for (int t = 0; t < 120; t++) begin
      bit bin;
      int nb, e;
      bin = t[0];
      nb = 3 + int'($urandom % (EMAX*W - 3));
      if (!bin && nb > EMAX*W - 2) nb = EMAX*W - 2;
      e = bin ? (nb + W - 1) / W : (nb + 1 + W - 1) / W;   // e*W >= n+1 bits (GF(2)) / n+2 (GF(p))
      if (t < 20) begin nb = 3 + int'($urandom % 28); e = 1; end
      rand_case(bin, nb, P, A);
      run_one(bin, P, A, e, kg, cg);
    end

    // table precisions in GF(p)
    for (int j = 0; j < 4; j++) begin
      int e;
      e = (pbits[j] + 2 + W - 1) / W;
      ksum = 0; csum = 0;
      for (int t = 0; t < 10; t++) begin
        do A = rand_big(pbits[j]) % primes[j]; while (A == 0);
        run_one(0, primes[j], A, e, kg, cg);
        ksum += kg;
        csum += kg * (e + 1);
      end
      $display("GF(p) %0d-bit, e=%0d: mean k = %0.1f, mean main-loop cycles k(e+1) = %0.1f",
               pbits[j], e, ksum / 10, csum / 10);
    end

    // binary fields: x^163+x^7+x^6+x^3+1 and x^233+x^74+1
    for (int j = 0; j < 2; j++) begin
      big_t f;
      int deg, e;
      f = (j == 0) ? ((big_t'(1) << 163) | 'hC9) : ((big_t'(1) << 233) | (big_t'(1) << 74) | 1);
      deg = (j == 0) ? 163 : 233;
      e = (deg + 1 + W - 1) / W;
      for (int t = 0; t < 6; t++) begin
        do A = rand_big(deg); while (A == 0);
        run_one(1, f, A, e, kg, cg);
      end
    end

    // every mechanism must have occurred
    foreach (n_op[i]) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL loop branch %0d never taken", i); end
    end
    checks++; if (n_vneg_use == 0) begin failures++; $display("FAIL negative v never used"); end
    checks++; if (n_flip == 0)     begin failures++; $display("FAIL correct-sign flip never seen"); end
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
      checks++;
      if (n_pcond[i][j] == 0) begin
        failures++; $display("FAIL GF(p) final case rneg=%0d taken=%0d never seen", i, j);
      end
    end
    for (int j = 0; j < 2; j++) begin
      checks++;
      if (n_gcond[j] == 0) begin failures++; $display("FAIL GF(2^n) reduction case %0d never seen", j); end
    end
    checks++; if (n_e1 == 0 || n_emax == 0) begin failures++; $display("FAIL precision range"); end
    $display("branches u/2=%0d v/2=%0d (u-v)/2=%0d (v-u)/2=%0d, negative v used=%0d, cs flips=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_vneg_use, n_flip);
    $display("GF(p) final cases %0d %0d %0d %0d, GF(2^n) reductions %0d/%0d",
             n_pcond[0][0], n_pcond[0][1], n_pcond[1][0], n_pcond[1][1], n_gcond[0], n_gcond[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
