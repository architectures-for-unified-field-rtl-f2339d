// tb_inv_controller: runs the control unit on its own, playing the datapaths
// by setting the status inputs (parities, bit sizes, sign of v, v = 0) at
// random before every iteration. Checks: the initialisation pass lasts e
// cycles; each iteration chooses the branch of Algorithm B and lasts e+1
// cycles; the u/v and r/s controls match the branch and the sign of v; the
// correct-sign flip comes exactly for (v-u)/2 with a negative result in GF(p);
// k counts the iterations; the two final passes pick their operands from the
// sign of r and the comparison result; and busy lasts e + k(e+1) + 1 + 2e.
module tb_inv_controller;
  import inv_pkg::*;
  localparam int unsigned W    = W_DEF;
  localparam int unsigned EMAX = EMAX_DEF;
  localparam int unsigned BW   = $clog2(W*EMAX + 1);
  localparam int unsigned IW   = (EMAX > 1) ? $clog2(EMAX) : 1;
  localparam int unsigned NW   = $clog2(EMAX + 1);
  localparam int unsigned KW   = $clog2(2*W*EMAX + 2) + 1;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  field_t        field_in = FIELD_GFP, field;
  logic [NW-1:0] nwords = NW'(1), e;
  logic          busy, done;
  logic [KW-1:0] k;
  logic [BW-1:0] u_bs = '0, v_bs = '0, rs_bs = '0;
  logic          u_lsb = 1'b0, v_lsb = 1'b0, v_zero = 1'b0, v_neg = 1'b0, uv_raw_sign = 1'b0;
  logic          rs_res_sign = 1'b0, rs_res_zero = 1'b0, r_msb = 1'b0;
  logic [IW-1:0] rd_addr, top_addr, uv_waddr, trk_idx;
  logic          init_pass, uv_swap, uv_bzero, uv_sub, uv_valid, uv_first, uv_flush, uv_dest_v;
  rs_op_t        rs_op;
  rs_final_t     rs_fin;
  logic          rs_valid, rs_first, cs_clear, cs_flip_s;
  logic          trk_u_valid, trk_v_valid, trk_rs_valid, trk_first, trk_last;
  iter_op_t      iter_op;
  logic          iter_start;
  int checks = 0, failures = 0;

  inv_controller #(.W(W), .EMAX(EMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    $display("FAIL %s (time %0t)", what, $time);
  endtask

  initial begin
    int e_i, n_it, busy_cyc, flips, exp_flips;
    bit gfp, vneg_i, rawneg, cnd;
    iter_op_t exp_op;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      e_i  = 1 + (t % EMAX);
      gfp  = t[0];
      n_it = int'($urandom % 40);
      @(negedge clk);
      field_in = gfp ? FIELD_GFP : FIELD_GF2N;
      nwords = NW'(e_i);
      v_zero = 1'b0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      busy_cyc = 1;
      // initialisation pass
      for (int c = 0; c < e_i; c++) begin
        checks++;
        if (!init_pass || !trk_u_valid || !trk_v_valid || rd_addr != IW'(c)) fail("init pass");
        if (c != e_i - 1) begin @(negedge clk); busy_cyc++; end
      end
      @(negedge clk); busy_cyc++;
      flips = 0; exp_flips = 0;
      for (int it = 0; it < n_it; it++) begin
        // status left by the previous iteration
        u_lsb = $urandom; v_lsb = $urandom; v_neg = gfp && $urandom % 2;
        u_bs  = BW'($urandom % (e_i*W)); v_bs = BW'($urandom % (e_i*W));
        rawneg = $urandom;
        vneg_i = v_neg;
        if (!u_lsb) exp_op = IT_UHALF;
        else if (!v_lsb) exp_op = IT_VHALF;
        else if (u_bs > v_bs) exp_op = IT_USUB;
        else exp_op = IT_VSUB;
        #1;
        checks++;
        if (!iter_start || iter_op != exp_op) fail($sformatf("branch %0d expected %0d", iter_op, exp_op));
        for (int c = 0; c <= e_i; c++) begin
          if (c > 0) begin @(negedge clk); busy_cyc++; end
          uv_raw_sign = (c == e_i) ? rawneg : $urandom;
          // the datapath inputs change; the chosen branch must not
          if (c > 0) begin u_lsb = $urandom; v_lsb = $urandom; v_neg = $urandom; u_bs = $urandom; v_bs = $urandom; end
          #1;
          checks++;
          if (iter_op != exp_op) fail("branch not held");
          if (uv_valid != (c < e_i) || uv_first != (c == 0) || uv_flush != (c == e_i)) fail("u/v timing");
          if (uv_bzero != (exp_op == IT_UHALF || exp_op == IT_VHALF)) fail("halving control");
          if (uv_swap != (exp_op == IT_VHALF || exp_op == IT_VSUB) || uv_dest_v != uv_swap) fail("steering");
          if (uv_sub != (gfp && !vneg_i)) fail("sign of v");
          if (rs_valid != (c < e_i)) fail("r/s timing");
          case (exp_op)
            IT_UHALF: if (rs_op != RS_SHL_S)    fail("rs op");
            IT_VHALF: if (rs_op != RS_SHL_R)    fail("rs op");
            IT_USUB:  if (rs_op != RS_ADDR_SHS) fail("rs op");
            default:  if (rs_op != RS_ADDS_SHR) fail("rs op");
          endcase
          if (trk_v_valid != (c > 0 && uv_dest_v) || trk_u_valid != (c > 0 && !uv_dest_v)) fail("detector feed");
          if (cs_flip_s) flips++;
        end
        if (gfp && exp_op == IT_VSUB && (vneg_i ^ rawneg)) exp_flips++;
        @(negedge clk); busy_cyc++;
        checks++;
        if (k != KW'(it + 1)) fail("k count");
      end
      checks++;
      if (flips != exp_flips) fail($sformatf("flips %0d expected %0d", flips, exp_flips));
      // v = 0: leave the loop
      v_zero = 1'b1;
      r_msb = $urandom;
      @(negedge clk); busy_cyc++;
      // comparison pass
      for (int c = 0; c < e_i; c++) begin
        #1;
        checks++;
        if (rs_op != RS_FINAL || !rs_valid || !rs_fin.dest_s || rs_fin.a_sel != SRC_R ||
            rs_fin.b_sel != SRC_P || (gfp && rs_fin.sub != !r_msb) || !trk_rs_valid) fail("compare pass");
        @(negedge clk); busy_cyc++;
        if (c == e_i - 1) begin
          rs_res_sign = $urandom; rs_res_zero = $urandom; rs_bs = $urandom;
        end
      end
      // output pass; the comparison outcome is taken in its first cycle
      if (gfp) cnd = r_msb ? (rs_res_sign || rs_res_zero) : !rs_res_sign;
      for (int c = 0; c < e_i; c++) begin
        #1;
        checks++;
        if (rs_op != RS_FINAL || rs_fin.dest_s || !rs_fin.sub ||
            rs_fin.a_sel != ((gfp && !r_msb) ? SRC_P : SRC_ZERO) ||
            (gfp && rs_fin.b_sel != (cnd ? SRC_S : SRC_R))) fail("output pass");
        @(negedge clk);
        if (c != e_i - 1) busy_cyc++;
        if (c == 0) begin rs_res_sign = $urandom; rs_res_zero = $urandom; end
      end
      checks++;
      if (!done || busy || k != KW'(n_it)) fail("done / k");
      checks++;
      if (busy_cyc != e_i + n_it * (e_i + 1) + 1 + 2 * e_i)
        fail($sformatf("busy %0d cycles, expected %0d", busy_cyc, e_i + n_it * (e_i + 1) + 1 + 2 * e_i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
