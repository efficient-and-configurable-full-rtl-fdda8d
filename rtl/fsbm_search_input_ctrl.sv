// fsbm_search_input_ctrl -- search-area input controller.
//
// Accepts the search area of each macroblock as a stream of words (W pixels
// each, ceil(L/W) words per search row, rows 0 .. L-1 top to bottom) with a
// valid/ready handshake, and drives the serial-in, parallel-out input buffer.
// It counts words and rows, tells the buffer in which chain order the current
// row must be shifted (misalign), and raises row_full when the buffer holds a
// complete row.  The row stays there until the central controller takes it
// (row_take); only then does the next row start to load.
//
// Rows 0 .. H-1 of a macroblock pre-fill the array without rotation and are
// loaded aligned.  Row H+y is loaded after the last sweep over window y (the
// array holding rows y .. y+H-1); sweeps alternate in direction starting to
// the left, and a left sweep leaves the ring rotated by Q-1.  So row H+y is
// loaded misaligned when the number of sweeps up to and including window y
// is odd.  Window y takes one sweep per reference fraction it serves; with
// H = N that is one sweep, and rows N, N+2, N+4, ... are misaligned.  The row/word counting and the handshake
// are choices of this design; the controller's role (reading one row of L
// pixels and passing it in parallel to the array once the current row is
// processed) follows the architecture.
//
// Timing: s_ready = !row_full; a row takes ceil(L/W) accepted words, and the
// first word of the next row can be accepted in the clock after row_take.
module fsbm_search_input_ctrl
  import fsbm_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16,
  parameter int unsigned C = 1,
  parameter int unsigned W = 2,
  parameter int unsigned H = N,
  localparam int unsigned PH = p_hat(P, C),
  localparam int unsigned L  = search_l(N, P, C),
  localparam int unsigned NW = (L + W - 1) / W,
  localparam int unsigned RW = $clog2(L + 1),
  localparam int unsigned WW = $clog2(NW + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_valid,
  output logic          s_ready,
  output logic          shift_en,   // to the buffer: accept the input word
  output logic          misalign,   // to the buffer: chain order of this row
  output logic          row_full,   // a complete row waits in the buffer
  output logic [RW-1:0] row_idx,    // search-area row held / being loaded
  input  logic          row_take    // the array takes the row this clock
);

  logic [WW-1:0] word_q;
  logic          odd_q;      // parity of the sweeps done before row row_idx

  // sweeps over window y (one per fraction), odd or even
  function automatic logic sweeps_odd(int unsigned y);
    return 1'((frac_hi(y, N, H) - frac_lo(y, N, H, PH) + 1) % 2);
  endfunction

  assign s_ready  = !row_full;
  assign shift_en = s_valid && s_ready;
  assign misalign = (row_idx >= RW'(H)) && odd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q   <= '0;
      row_full <= 1'b0;
      row_idx  <= '0;
      odd_q    <= 1'b0;
    end else begin
      if (shift_en) begin
        if (word_q == WW'(NW - 1)) begin
          word_q   <= '0;
          row_full <= 1'b1;
        end else begin
          word_q <= word_q + 1'b1;
        end
      end
      if (row_take && row_full) begin
        row_full <= 1'b0;
        row_idx  <= (row_idx == RW'(L - 1)) ? '0 : row_idx + 1'b1;
        if (row_idx == RW'(L - 1))
          odd_q <= 1'b0;
        else if (row_idx >= RW'(H - 1))
          odd_q <= odd_q ^ sweeps_odd(int'(row_idx) + 1 - H);
      end
    end
  end

endmodule
