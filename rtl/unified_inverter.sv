// unified_inverter: scalable unified GF(p) / GF(2^n) Montgomery inverter.
//
// Computes the first phase of the Montgomery inverse: given a modulus p (an odd
// integer, or a polynomial with constant term 1) and an operand a coprime to
// it, it returns r and k with r = a^-1 * 2^k mod p in GF(p), or
// r(x) = a(x)^-1 * x^k mod p(x) in GF(2^n). Both fields run the same loop;
// the prime-field version compares bit sizes instead of values, so the loop's
// branch decision is identical to the binary-field degree comparison.
//
// Operands are e words of W bits (e chosen per operation, 1 <= e <= EMAX), and
// every arithmetic step walks through the words one per cycle, so the precision
// is limited only by the register depth, not by the adder width. A main-loop
// iteration takes e+1 cycles: the (u-v)/2 unit needs one cycle more than the
// e words to emit its last shifted word, and the r+s / 2r unit works in
// parallel. Total time: e (init) + k(e+1) + 1 + 2e (final correction).
// For GF(p), e must satisfy e*W >= n+2 for an n-bit p (r lies in [-2p, 2p]);
// for GF(2^n), e*W >= n+1.
//
// Interface
//   load: while idle, ld_we writes ld_data to word ld_addr of a (ld_sel = 0)
//         or p (ld_sel = 1), least significant word at address 0; words e-1
//         and below must be written, unused high bits zero.
//   start: one cycle while idle, with field and nwords = e.
//   busy: high until the result is ready; done: high from then until the next
//         start. k: the exponent. res_addr/res_data: read word of the result r.
//   iter_op / iter_start: which branch each main-loop iteration takes.
//
// Structure: five multi-word registers (u, v, r, s, p), the u/v unit
// (Figure 1's (u-v)/2), the r/s unit (Figure 2's r+s with correct-sign bits),
// three bit-size detectors and the controller.
module unified_inverter
  import inv_pkg::*;
#(
  parameter int unsigned W    = W_DEF,
  parameter int unsigned EMAX = EMAX_DEF,
  localparam int unsigned BW  = $clog2(W*EMAX + 1),
  localparam int unsigned IW  = (EMAX > 1) ? $clog2(EMAX) : 1,
  localparam int unsigned NW  = $clog2(EMAX + 1),
  localparam int unsigned KW  = $clog2(2*W*EMAX + 2) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_we,
  input  logic          ld_sel,
  input  logic [IW-1:0] ld_addr,
  input  logic [W-1:0]  ld_data,
  input  logic          start,
  input  field_t        field,
  input  logic [NW-1:0] nwords,
  output logic          busy,
  output logic          done,
  output logic [KW-1:0] k,
  input  logic [IW-1:0] res_addr,
  output logic [W-1:0]  res_data,
  output iter_op_t      iter_op,
  output logic          iter_start
);

  field_t        fld;
  logic [NW-1:0] e;
  logic [IW-1:0] rd_addr, top_addr, uv_waddr, trk_idx;
  logic          init_pass;
  logic          uv_swap, uv_bzero, uv_sub, uv_valid, uv_first, uv_flush, uv_dest_v;
  logic          uv_out_valid, uv_raw_sign;
  logic [W-1:0]  uv_out;
  rs_op_t        rs_op;
  rs_final_t     rs_fin;
  logic          rs_valid, rs_first, cs_clear, cs_flip_s, cs_s;
  logic          r_we_dp, s_we_dp, rs_res_sign, rs_res_zero;
  logic [W-1:0]  r_wd_dp, s_wd_dp, rs_sum;
  logic          trk_u_valid, trk_v_valid, trk_rs_valid, trk_first, trk_last;
  logic [BW-1:0] u_bs, v_bs, rs_bs;
  logic          u_lsb, v_lsb, u_zero, v_zero, u_neg, v_neg, rs_zero_t, rs_neg_t, rs_lsb_t;

  // register words
  logic [W-1:0]  u_rd, v_rd, r_rd, s_rd, p_rd, r_top;
  logic [W-1:0]  u_rd1, v_rd1, s_rd1, p_rd1;
  logic          u_we, v_we, r_we, s_we, p_we;
  logic [IW-1:0] u_wa, v_wa, r_wa, s_wa, p_wa, r_ra1;
  logic [W-1:0]  u_wd, v_wd, r_wd, s_wd, p_wd;

  // write-port multiplexing: load, initialisation, datapaths
  always_comb begin
    p_we = ld_we && ld_sel && !busy;
    p_wa = ld_addr;
    p_wd = ld_data;

    u_we = init_pass || (uv_out_valid && !uv_dest_v);
    u_wa = init_pass ? rd_addr : uv_waddr;
    u_wd = init_pass ? p_rd    : uv_out;

    v_we = busy ? (uv_out_valid && uv_dest_v) : (ld_we && !ld_sel);
    v_wa = busy ? uv_waddr : ld_addr;
    v_wd = busy ? uv_out   : ld_data;

    r_we = init_pass || r_we_dp;
    r_wa = rd_addr;
    r_wd = init_pass ? '0 : r_wd_dp;

    s_we = init_pass || s_we_dp;
    s_wa = rd_addr;
    s_wd = init_pass ? W'(rd_addr == '0) : s_wd_dp;

    r_ra1 = busy ? top_addr : res_addr;
  end

  word_mem #(.W(W), .EMAX(EMAX)) u_mem_u (.clk, .we(u_we), .waddr(u_wa), .wdata(u_wd),
    .raddr0(rd_addr), .rdata0(u_rd), .raddr1(top_addr), .rdata1(u_rd1));
  word_mem #(.W(W), .EMAX(EMAX)) u_mem_v (.clk, .we(v_we), .waddr(v_wa), .wdata(v_wd),
    .raddr0(rd_addr), .rdata0(v_rd), .raddr1(top_addr), .rdata1(v_rd1));
  word_mem #(.W(W), .EMAX(EMAX)) u_mem_r (.clk, .we(r_we), .waddr(r_wa), .wdata(r_wd),
    .raddr0(rd_addr), .rdata0(r_rd), .raddr1(r_ra1), .rdata1(r_top));
  word_mem #(.W(W), .EMAX(EMAX)) u_mem_s (.clk, .we(s_we), .waddr(s_wa), .wdata(s_wd),
    .raddr0(rd_addr), .rdata0(s_rd), .raddr1(top_addr), .rdata1(s_rd1));
  word_mem #(.W(W), .EMAX(EMAX)) u_mem_p (.clk, .we(p_we), .waddr(p_wa), .wdata(p_wd),
    .raddr0(rd_addr), .rdata0(p_rd), .raddr1(top_addr), .rdata1(p_rd1));

  assign res_data = r_top;

  uv_datapath #(.W(W)) u_uv (
    .clk, .rst_n, .field(fld), .u_word(u_rd), .v_word(v_rd),
    .swap(uv_swap), .b_zero(uv_bzero), .sub(uv_sub),
    .in_valid(uv_valid), .in_first(uv_first), .flush(uv_flush),
    .out_valid(uv_out_valid), .out_word(uv_out), .raw_sign(uv_raw_sign)
  );

  rs_datapath #(.W(W)) u_rs (
    .clk, .rst_n, .field(fld), .op(rs_op), .fin(rs_fin),
    .r_word(r_rd), .s_word(s_rd), .p_word(p_rd),
    .in_valid(rs_valid), .in_first(rs_first),
    .cs_clear, .cs_flip_s, .cs_s,
    .r_we(r_we_dp), .r_wdata(r_wd_dp), .s_we(s_we_dp), .s_wdata(s_wd_dp),
    .sum_word(rs_sum), .res_sign(rs_res_sign), .res_zero(rs_res_zero)
  );

  bitsize_unit #(.W(W), .EMAX(EMAX)) u_bs_u (
    .clk, .rst_n, .field(fld), .in_valid(trk_u_valid), .in_first(trk_first),
    .in_last(trk_last), .in_idx(trk_idx), .in_word(init_pass ? p_rd : uv_out),
    .bsize(u_bs), .is_zero(u_zero), .is_neg(u_neg), .lsb(u_lsb)
  );

  bitsize_unit #(.W(W), .EMAX(EMAX)) u_bs_v (
    .clk, .rst_n, .field(fld), .in_valid(trk_v_valid), .in_first(trk_first),
    .in_last(trk_last), .in_idx(trk_idx), .in_word(init_pass ? v_rd : uv_out),
    .bsize(v_bs), .is_zero(v_zero), .is_neg(v_neg), .lsb(v_lsb)
  );

  bitsize_unit #(.W(W), .EMAX(EMAX)) u_bs_rs (
    .clk, .rst_n, .field(fld), .in_valid(trk_rs_valid), .in_first(trk_first),
    .in_last(trk_last), .in_idx(trk_idx), .in_word(rs_sum),
    .bsize(rs_bs), .is_zero(rs_zero_t), .is_neg(rs_neg_t), .lsb(rs_lsb_t)
  );

  inv_controller #(.W(W), .EMAX(EMAX)) u_ctrl (
    .clk, .rst_n, .start, .field_in(field), .nwords, .field(fld), .e, .busy, .done, .k,
    .u_bs, .v_bs, .u_lsb, .v_lsb, .v_zero, .v_neg, .uv_raw_sign,
    .rs_res_sign, .rs_res_zero, .rs_bs, .r_msb(r_top[W-1]),
    .rd_addr, .top_addr, .uv_waddr, .init_pass,
    .uv_swap, .uv_bzero, .uv_sub, .uv_valid, .uv_first, .uv_flush, .uv_dest_v,
    .rs_op, .rs_fin, .rs_valid, .rs_first, .cs_clear, .cs_flip_s,
    .trk_u_valid, .trk_v_valid, .trk_rs_valid, .trk_first, .trk_last, .trk_idx,
    .iter_op, .iter_start
  );

endmodule
