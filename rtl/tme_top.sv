// tme_top - testable variable-block-size motion estimator (tME-IV).
//
// Binary-feature (1 bit per pixel) block matching for H.264/AVC variable
// block sizes. A 16x16 current eMB buffer and a 16 x (16+P) reference buffer
// are filled line by line. P+1 block matching modules work in parallel: BMM k
// compares the current eMB with the reference window made of bits k..k+15 of
// every reference line, i.e. horizontal displacement k. Each BMM produces
// the 41 SADs of its candidate. Shifting one more reference line in moves
// every candidate down by one line, so each cycle yields P+1 new candidates.
//
// Normal operation: shift 16 lines into the current buffer (cur_shift,
// cur_line) and lines of the search area into the reference buffer
// (ref_shift, ref_line). Once both buffers have received 16 lines, `sads`
// holds, one clock after each cycle, the SADs of the window state of that
// cycle and `sad_valid` is 1. Line y bit x is pixel (y, x).
//
// Test operation: a pulse on test_start runs tme_test_ctrl, which tests the
// register buffers with counter patterns, the 16*(P+1) tSAD4x4 cells as one
// cascade (128 patterns) and the 5*(P+1) tAccSAD modules as one cascade
// (2^(2W) patterns), and reports test_done / test_pass / test_err_cnt. While
// the test runs the external shift inputs are ignored; afterwards the
// buffers hold test data and must be reloaded (sad_valid drops until 16 new
// lines have entered each buffer).
//
// The parallel BMM array, buffer sizes and the DFT structures follow the
// document. Sharing one current and one reference buffer between all BMMs,
// the registered SAD outputs, the valid flag and the test sequencer are this
// design's choices. Synchronous active-low reset.
module tme_top
  import tme_pkg::*;
#(
  parameter int unsigned P = 8,   // horizontal search range: P+1 BMMs
  parameter int unsigned W = 9,   // accumulated SAD word length
  parameter int unsigned N = 8    // register buffer test sub-line width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [15:0]     cur_line,
  input  logic            cur_shift,
  input  logic [16+P-1:0] ref_line,
  input  logic            ref_shift,
  output logic [W-1:0]    sads [P+1][NUM_SADS],
  output logic            sad_valid,
  input  logic            test_start,
  output logic            test_busy,
  output logic            test_done,
  output logic            test_pass,
  output logic [15:0]     test_err_cnt,
  output test_phase_e     test_phase
);
  localparam int unsigned NB = P + 1;

  logic [15:0]     cur_lines [16];
  logic [16+P-1:0] ref_lines [16];
  logic [15:0]     cur_top;
  logic [16+P-1:0] ref_top;

  logic              buf_tm, buf_shift, dp_tm;
  logic [N-1:0]      cur_tpat, ref_tpat;
  logic [SAD4_W-1:0] sad_ti, sad_to;
  logic [W-1:0]      acc_ti_a, acc_ti_b, acc_to_a, acc_to_b;

  tme_test_ctrl #(.P(P), .W(W), .N(N), .ROWS(16)) u_ctrl (
    .clk, .rst_n, .start(test_start),
    .busy(test_busy), .done(test_done), .pass(test_pass), .err_cnt(test_err_cnt),
    .phase(test_phase),
    .buf_tm, .buf_shift, .cur_tpat, .ref_tpat, .cur_top, .ref_top,
    .dp_tm, .sad_ti, .sad_to, .acc_ti_a, .acc_ti_b, .acc_to_a, .acc_to_b
  );

  treg_buf #(.ROWS(16), .COLS(16), .N(N)) u_cur (
    .clk, .rst_n, .shift(test_busy ? buf_shift : cur_shift), .tm(buf_tm),
    .line_in(cur_line), .tpat(cur_tpat), .lines(cur_lines), .top_line(cur_top)
  );

  treg_buf #(.ROWS(16), .COLS(16 + P), .N(N)) u_ref (
    .clk, .rst_n, .shift(test_busy ? buf_shift : ref_shift), .tm(buf_tm),
    .line_in(ref_line), .tpat(ref_tpat), .lines(ref_lines), .top_line(ref_top)
  );

  // BMM array; the two test cascades run through all BMMs in order 0..P
  logic [SAD4_W-1:0] sad_c [NB+1];
  logic [W-1:0]      acc_a [NB+1], acc_b [NB+1];
  logic [W-1:0]      sads_d [NB][NUM_SADS];

  assign sad_c[0] = sad_ti;
  assign acc_a[0] = acc_ti_a;
  assign acc_b[0] = acc_ti_b;

  for (genvar k = 0; k < NB; k++) begin : g_bmm
    logic [15:0] win [16];
    always_comb
      for (int y = 0; y < 16; y++) win[y] = ref_lines[y][k +: 16];

    bmm #(.W(W)) u_bmm (
      .tm(dp_tm), .cur(cur_lines), .refw(win),
      .sad_ti(sad_c[k]), .acc_ti_a(acc_a[k]), .acc_ti_b(acc_b[k]),
      .sads(sads_d[k]),
      .sad_to(sad_c[k+1]), .acc_to_a(acc_a[k+1]), .acc_to_b(acc_b[k+1])
    );
  end

  assign sad_to   = sad_c[NB];
  assign acc_to_a = acc_a[NB];
  assign acc_to_b = acc_b[NB];

  // load tracking and output register
  logic [4:0] cur_fill, ref_fill;

  always_ff @(posedge clk) begin
    if (!rst_n || test_busy || test_start) begin
      cur_fill  <= '0;
      ref_fill  <= '0;
      sad_valid <= 1'b0;
    end else begin
      if (cur_shift && cur_fill != 5'd16) cur_fill <= cur_fill + 5'd1;
      if (ref_shift && ref_fill != 5'd16) ref_fill <= ref_fill + 5'd1;
      sad_valid <= (cur_fill == 5'd16) && (ref_fill == 5'd16);
    end
  end

  always_ff @(posedge clk) sads <= sads_d;
endmodule
