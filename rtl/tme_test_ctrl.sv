// tme_test_ctrl - counter-based test sequencer for the testable motion
// estimator.
//
// After `start` it runs three test phases and then raises `done` with
// `pass` = 1 if no response differed from its prediction (`err_cnt` counts
// the mismatching cycles, saturating).
//
//  PH_REGBUF   buf_tm = 1, buf_shift = 1 for 2^N + ROWS cycles. An N-bit
//              counter value k is shifted into both register buffers on
//              cycle k; from cycle ROWS on, the top line of each buffer must
//              equal the pattern of cycle k - ROWS, repeated across the line.
//  PH_SAD_FILL / PH_SAD_APPLY
//              for each of the 4 cases {tc, tr} in {00, 01, 10, 11}: fill the
//              current buffer with all-tc lines and the reference buffer with
//              all-tr lines (ROWS shifts), then with dp_tm = 1 sweep sad_ti
//              over 0..31. The cascade of NSAD SAD cells must return
//              sad_ti + NSAD*16*(tc ^ tr) mod 32. 4 x 32 = 128 patterns.
//  PH_ACC      dp_tm = 1, {acc_ti_a, acc_ti_b} swept over all 2^(2W) values;
//              the cascade of NACC tAccSAD modules must return the value of
//              accsad_resp_pred.
//
// Each check compares the responses of the current cycle (all paths under
// test are combinational from registered state or from this block's
// registered outputs). Timing: the whole test takes
// (2^N + ROWS) + 4*(ROWS + 32) + 2^(2W) cycles from the clock edge that
// samples start to the one that raises done.
//
// The counter patterns, the 2 x 2 bus cases, the cascades and the predicted
// responses follow the document; the sequencing, the order of the phases and
// the pass/fail outputs are this design's choices. Synchronous active-low
// reset.
module tme_test_ctrl
  import tme_pkg::*;
#(
  parameter int unsigned P    = 8,   // search range, p+1 BMMs
  parameter int unsigned W    = 9,
  parameter int unsigned N    = 8,
  parameter int unsigned ROWS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              pass,
  output logic [15:0]       err_cnt,
  output test_phase_e       phase,
  // register buffer test
  output logic              buf_tm,
  output logic              buf_shift,
  output logic [N-1:0]      cur_tpat,
  output logic [N-1:0]      ref_tpat,
  input  logic [15:0]       cur_top,
  input  logic [16+P-1:0]   ref_top,
  // datapath test
  output logic              dp_tm,
  output logic [SAD4_W-1:0] sad_ti,
  input  logic [SAD4_W-1:0] sad_to,
  output logic [W-1:0]      acc_ti_a, acc_ti_b,
  input  logic [W-1:0]      acc_to_a, acc_to_b
);
  localparam int unsigned NSAD = 16 * (P + 1);
  localparam int unsigned NACC = 5 * (P + 1);
  localparam int unsigned CW   = (2 * W > N + 1) ? 2 * W + 1 : N + 2;
  localparam logic [SAD4_W-1:0] SAD_K = SAD4_W'(NSAD * 16);

  logic [CW-1:0] cnt;
  logic [1:0]    cs;     // {tc, tr} of the SAD case
  logic          mismatch;
  logic [N-1:0]  exp_pat;
  logic [W-1:0]  pred_a, pred_b;

  accsad_resp_pred #(.W(W), .C(NACC)) u_pred (
    .a0(acc_ti_a), .b0(acc_ti_b), .ac(pred_a), .bc(pred_b)
  );

  // pattern generation
  always_comb begin
    buf_tm    = 1'b0;
    buf_shift = 1'b0;
    dp_tm     = 1'b0;
    cur_tpat  = cnt[N-1:0];
    ref_tpat  = cnt[N-1:0];
    sad_ti    = cnt[SAD4_W-1:0];
    {acc_ti_a, acc_ti_b} = cnt[2*W-1:0];
    unique case (phase)
      PH_REGBUF: begin
        buf_tm    = 1'b1;
        buf_shift = 1'b1;
      end
      PH_SAD_FILL: begin
        buf_tm    = 1'b1;
        buf_shift = 1'b1;
        cur_tpat  = {N{cs[1]}};
        ref_tpat  = {N{cs[0]}};
      end
      PH_SAD_APPLY: dp_tm = 1'b1;
      PH_ACC:       dp_tm = 1'b1;
      default: ;
    endcase
  end

  // response checking
  always_comb begin
    exp_pat  = N'(cnt - CW'(ROWS));
    mismatch = 1'b0;
    unique case (phase)
      PH_REGBUF:
        if (cnt >= CW'(ROWS)) begin
          for (int j = 0; j < 16; j++)
            if (cur_top[j] != exp_pat[j % N]) mismatch = 1'b1;
          for (int j = 0; j < 16 + P; j++)
            if (ref_top[j] != exp_pat[j % N]) mismatch = 1'b1;
        end
      PH_SAD_APPLY:
        mismatch = (sad_to != (sad_ti + ((cs[1] ^ cs[0]) ? SAD_K : '0)));
      PH_ACC:
        mismatch = (acc_to_a != pred_a) || (acc_to_b != pred_b);
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= PH_IDLE;
      cnt     <= '0;
      cs      <= '0;
      err_cnt <= '0;
    end else begin
      if (mismatch && err_cnt != '1) err_cnt <= err_cnt + 16'd1;
      unique case (phase)
        PH_IDLE, PH_DONE:
          if (start) begin
            phase   <= PH_REGBUF;
            cnt     <= '0;
            cs      <= '0;
            err_cnt <= '0;
          end
        PH_REGBUF:
          if (cnt == CW'((1 << N) + ROWS - 1)) begin
            phase <= PH_SAD_FILL;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        PH_SAD_FILL:
          if (cnt == CW'(ROWS - 1)) begin
            phase <= PH_SAD_APPLY;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        PH_SAD_APPLY:
          if (cnt == CW'(31)) begin
            cnt <= '0;
            cs  <= cs + 2'd1;
            phase <= (cs == 2'd3) ? PH_ACC : PH_SAD_FILL;
          end else cnt <= cnt + 1'b1;
        PH_ACC:
          if (cnt == CW'((1 << (2 * W)) - 1)) begin
            phase <= PH_DONE;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        default: phase <= PH_IDLE;
      endcase
    end
  end

  assign busy = (phase != PH_IDLE) && (phase != PH_DONE);
  assign done = (phase == PH_DONE);
  assign pass = done && (err_cnt == '0);
endmodule
