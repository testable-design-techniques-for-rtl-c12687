// treg_buf - testable eMB register buffer (tRegBuf), used for both the
// current eMB (16 x 16 bits) and the reference eMB (16 x (16+p) bits).
//
// The buffer is a parallel line shifter: on each cycle with shift = 1 a new
// line enters at the bottom (line ROWS-1), every line moves up by one, and the
// top line (line 0) leaves; all lines are visible in parallel on `lines`.
// Because this is one-to-one from input to output, it is tested by shifting
// in counter patterns and reading them back from the top line ROWS shifts
// later. In test mode (tm = 1) the input line is the N-bit pattern tpat
// repeated across the line (the line is cut into N-bit sub-lines, bit j gets
// tpat[j mod N]), so 2^N patterns cover every sub-line exhaustively.
//
// The line-shifting structure, the bottom-in/top-out test and the N-bit
// sub-lines follow the document; the repetition of one pattern across all
// sub-lines and the synchronous active-low reset to zero are this design's
// choices. Timing: lines update on the rising clock edge after shift = 1.
module treg_buf #(
  parameter int unsigned ROWS = 16,
  parameter int unsigned COLS = 16,
  parameter int unsigned N    = 8   // test sub-line width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            shift,
  input  logic            tm,
  input  logic [COLS-1:0] line_in,
  input  logic [N-1:0]    tpat,
  output logic [COLS-1:0] lines [ROWS],
  output logic [COLS-1:0] top_line
);
  logic [COLS-1:0] din;

  always_comb begin
    for (int j = 0; j < COLS; j++) din[j] = tm ? tpat[j % N] : line_in[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ROWS; i++) lines[i] <= '0;
    end else if (shift) begin
      for (int i = 0; i < ROWS - 1; i++) lines[i] <= lines[i+1];
      lines[ROWS-1] <= din;
    end
  end

  assign top_line = lines[0];
endmodule
