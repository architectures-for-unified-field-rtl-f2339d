// inv_controller: control unit of the unified inverter.
//
// Sequences one inversion as a series of word-serial passes, counting words
// with cnt:
//  INIT  (e cycles)    u := p, r := 0, s := 1; v already holds a. The bit-size
//                      detectors watch p and a go by.
//  LOOP  (e+1 cycles   one iteration of the main loop of Algorithms A / B. In
//        per iteration) cycle 0 the branch is chosen from registered flags:
//                      u even -> u/2; else v even -> v/2; else
//                      bitsize(u) > bitsize(v) -> (u-v)/2; else (v-u)/2. The
//                      u/v unit streams e words and one flush cycle, the r/s
//                      unit works during the first e of them. At the last cycle
//                      k is incremented and, for (v-u)/2 in GF(p), s's
//                      correct-sign bit is toggled when the new v is negative.
//                      The loop ends when v = 0, checked in cycle 0 (one
//                      extra cycle in all).
//  FCMP  (e cycles)    GF(p): s := r - p (r >= 0) or r + p (r < 0);
//                      GF(2^n): s := r + p.
//  FOUT  (e cycles)    GF(p): r := p - r' (r >= 0) or -r' (r < 0), where r'
//                      is r or s as the comparison decided (steps 9-10 of
//                      Algorithm B). GF(2^n): r := r + p when deg(r) = deg(p)
//                      (step 9 of Algorithm A), detected as deg(r+p) < deg(p).
// Then done rises and stays high until the next start; k holds the exponent.
// A main loop of k iterations takes exactly k(e+1) cycles.
//
// The stored v is a two's complement word string whose magnitude is the
// algorithm's v: when v - u comes out negative it is not negated. The next
// subtraction instead uses the stored sign (Xv >= 0: A - B, Xv < 0: A + B),
// which folds the sign change into that subtraction. The flip of s's
// correct-sign bit is then "stored sign of v differs from the raw result's
// sign"; the one case this misreads, a raw result of zero, only occurs when
// u = v = 1, which ends the loop, so s is not used again.
//
// Interface: start (one cycle, while idle) with field and nwords = e latched;
// status from the datapaths and detectors; control to them. busy is high from
// start until done.
//
// The loop, its branch order and the e+1-cycle iteration follow the document.
// The handshake (start/busy/done), the one-cycle v = 0 test, the handling of a
// negative v and the form of the final passes are this design's choices.
module inv_controller
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
  // command
  input  logic          start,
  input  field_t        field_in,
  input  logic [NW-1:0] nwords,
  output field_t        field,
  output logic [NW-1:0] e,
  output logic          busy,
  output logic          done,
  output logic [KW-1:0] k,
  // status
  input  logic [BW-1:0] u_bs,
  input  logic [BW-1:0] v_bs,
  input  logic          u_lsb,
  input  logic          v_lsb,
  input  logic          v_zero,
  input  logic          v_neg,
  input  logic          uv_raw_sign,
  input  logic          rs_res_sign,
  input  logic          rs_res_zero,
  input  logic [BW-1:0] rs_bs,
  input  logic          r_msb,      // top bit of r's word e-1
  // memory addressing
  output logic [IW-1:0] rd_addr,    // stream read address of all registers
  output logic [IW-1:0] top_addr,   // word e-1
  output logic [IW-1:0] uv_waddr,
  output logic          init_pass,
  // u/v datapath
  output logic          uv_swap,
  output logic          uv_bzero,
  output logic          uv_sub,
  output logic          uv_valid,
  output logic          uv_first,
  output logic          uv_flush,
  output logic          uv_dest_v,
  // r/s datapath
  output rs_op_t        rs_op,
  output rs_final_t     rs_fin,
  output logic          rs_valid,
  output logic          rs_first,
  output logic          cs_clear,
  output logic          cs_flip_s,
  // bit-size detectors: u, v, and the r/s sum stream
  output logic          trk_u_valid,
  output logic          trk_v_valid,
  output logic          trk_rs_valid,
  output logic          trk_first,
  output logic          trk_last,
  output logic [IW-1:0] trk_idx,
  // observation
  output iter_op_t      iter_op,
  output logic          iter_start
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_LOOP, S_FCMP, S_FOUT} state_t;

  state_t        state;
  logic [NW-1:0] cnt;
  iter_op_t      op_q, op_dec;
  logic          vneg_q, vneg;
  logic          rneg_q, rneg;
  logic          cond_q, cond;
  logic [BW-1:0] p_bs;
  logic          first_iter;
  logic          gfp;
  logic          last_word;   // cnt == e-1
  logic          loop_run;    // an iteration is in progress

  assign gfp       = (field == FIELD_GFP);
  assign last_word = (cnt == e - NW'(1));
  assign busy      = (state != S_IDLE);
  assign rd_addr   = IW'(cnt);
  assign top_addr  = IW'(e - NW'(1));
  assign uv_waddr  = IW'(cnt - NW'(1));

  // branch decision of Algorithm B steps 4-7 (steps 3-7 of Algorithm A)
  always_comb begin
    if (!u_lsb)             op_dec = IT_UHALF;
    else if (!v_lsb)        op_dec = IT_VHALF;
    else if (u_bs > v_bs)   op_dec = IT_USUB;
    else                    op_dec = IT_VSUB;
  end

  assign loop_run   = (state == S_LOOP) && !(cnt == '0 && v_zero);
  assign iter_start = (state == S_LOOP) && cnt == '0 && !v_zero;
  assign iter_op    = (cnt == '0) ? op_dec : op_q;
  assign vneg       = (cnt == '0) ? (gfp && v_neg) : vneg_q;
  assign rneg       = (state == S_FCMP && cnt == '0) ? (gfp && r_msb) : rneg_q;
  assign cond       = (cnt == '0) ? (gfp ? (rneg ? (rs_res_sign || rs_res_zero) : !rs_res_sign)
                                         : (rs_bs < p_bs))
                                  : cond_q;

  // u/v datapath control
  always_comb begin
    uv_swap   = (iter_op == IT_VHALF) || (iter_op == IT_VSUB);
    uv_bzero  = (iter_op == IT_UHALF) || (iter_op == IT_VHALF);
    uv_sub    = gfp && !vneg;
    uv_dest_v = uv_swap;
    uv_valid  = loop_run && (cnt < e);
    uv_first  = loop_run && (cnt == '0);
    uv_flush  = loop_run && (cnt == e);
  end

  // r/s datapath control
  always_comb begin
    rs_op      = RS_NONE;
    rs_fin     = '{a_sel: SRC_ZERO, b_sel: SRC_R, sub: 1'b1, dest_s: 1'b0};
    rs_valid   = 1'b0;
    rs_first   = (cnt == '0);
    cs_clear   = (state == S_IDLE) && start;
    cs_flip_s  = loop_run && (cnt == e) && (iter_op == IT_VSUB) && gfp && (vneg ^ uv_raw_sign);
    unique case (state)
      S_LOOP: begin
        rs_valid = loop_run && (cnt < e);
        unique case (iter_op)
          IT_UHALF: rs_op = RS_SHL_S;
          IT_VHALF: rs_op = RS_SHL_R;
          IT_USUB:  rs_op = RS_ADDR_SHS;
          IT_VSUB:  rs_op = RS_ADDS_SHR;
        endcase
      end
      S_FCMP: begin
        rs_op    = RS_FINAL;
        rs_valid = 1'b1;
        rs_fin   = '{a_sel: SRC_R, b_sel: SRC_P, sub: !rneg, dest_s: 1'b1};
      end
      S_FOUT: begin
        rs_op    = RS_FINAL;
        rs_valid = 1'b1;
        rs_fin   = '{a_sel: (gfp && !rneg_q) ? SRC_P : SRC_ZERO,
                     b_sel: cond ? SRC_S : SRC_R, sub: 1'b1, dest_s: 1'b0};
      end
      default: ;
    endcase
  end

  // bit-size detector feeds
  always_comb begin
    init_pass    = (state == S_INIT);
    trk_u_valid  = 1'b0;
    trk_v_valid  = 1'b0;
    trk_rs_valid = 1'b0;
    trk_first    = (cnt == '0);
    trk_last     = last_word;
    trk_idx      = IW'(cnt);
    if (state == S_INIT) begin
      trk_u_valid = 1'b1;
      trk_v_valid = 1'b1;
    end else if (state == S_LOOP) begin
      // result word cnt-1 leaves the u/v datapath in cycle cnt
      trk_first   = (cnt == NW'(1));
      trk_last    = (cnt == e);
      trk_idx     = IW'(cnt - NW'(1));
      trk_u_valid = loop_run && (cnt != '0) && !uv_dest_v;
      trk_v_valid = loop_run && (cnt != '0) &&  uv_dest_v;
    end else if (state == S_FCMP) begin
      trk_rs_valid = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      field      <= FIELD_GFP;
      e          <= NW'(1);
      cnt        <= '0;
      k          <= '0;
      done       <= 1'b0;
      op_q       <= IT_UHALF;
      vneg_q     <= 1'b0;
      rneg_q     <= 1'b0;
      cond_q     <= 1'b0;
      p_bs       <= '0;
      first_iter <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_INIT;
          field <= field_in;
          e     <= nwords;
          cnt   <= '0;
          k     <= '0;
          done  <= 1'b0;
        end
        S_INIT: begin
          if (last_word) begin
            cnt        <= '0;
            state      <= S_LOOP;
            first_iter <= 1'b1;
          end else cnt <= cnt + NW'(1);
        end
        S_LOOP: begin
          if (cnt == '0) begin
            if (first_iter) p_bs <= u_bs;   // u = p before the first iteration
            first_iter <= 1'b0;
            op_q       <= op_dec;
            vneg_q     <= gfp && v_neg;
          end
          if (cnt == '0 && v_zero) begin
            state <= S_FCMP;
          end else if (cnt == e) begin
            cnt <= '0;
            k   <= k + KW'(1);
          end else cnt <= cnt + NW'(1);
        end
        S_FCMP: begin
          if (cnt == '0) rneg_q <= rneg;
          if (last_word) begin
            cnt   <= '0;
            state <= S_FOUT;
          end else cnt <= cnt + NW'(1);
        end
        S_FOUT: begin
          if (cnt == '0) cond_q <= cond;
          if (last_word) begin
            cnt   <= '0;
            state <= S_IDLE;
            done  <= 1'b1;
          end else cnt <= cnt + NW'(1);
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a start is only accepted while idle; the precision must fit the registers
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_IDLE && start) |-> (nwords >= NW'(1) && nwords <= NW'(EMAX)));

endmodule
