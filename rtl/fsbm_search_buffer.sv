// fsbm_search_buffer -- serial-in, parallel-out search-area input buffer with
// the alignment circuit for the cylindrical array.
//
// The buffer is a chain of L pixel registers.  A search row of the previous
// frame is shifted in, W pixels per accepted word (word[0] is the earliest
// pixel), and afterwards all L registers are handed in parallel to the bottom
// row of the PE array.  When the array takes a new row after a sweep to the
// left, its ring is rotated by Q-1 columns (Q = floor(2p/C)), so pixel k of
// the row must sit at array column (k - (Q-1)) mod L rather than at column k.
// To get this without a rotator on the L outputs, the register chain is split
// into a left part of C(l+m)-m registers (columns 0 .. L-Q) and a right part of
// m+N-1 registers (columns L-Q+1 .. L-1), and two sets of multiplexers choose
// the order in which the two parts are chained:
//   misalign = 0: input -> right part -> left part (pixel k ends in column k)
//   misalign = 1: input -> left part  -> right part (rotated by Q-1)
// The split and the two multiplexed joints follow the architecture's
// alignment circuit; shifting W pixels per clock (with a multiplexer at each
// of the W positions behind a joint) generalises it.  When L is not a multiple
// of W, the first word of a row carries ceil(L/W)*W - L leading filler pixels
// that fall off the end of the chain.
//
// misalign must be held constant while one row is being shifted in.
// Timing: row_out changes one clock after each accepted word.
module fsbm_search_buffer
  import fsbm_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16,
  parameter int unsigned C = 1,
  parameter int unsigned W = 2,
  localparam int unsigned Q = cands_per_core(P, C),
  localparam int unsigned L = search_l(N, P, C)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift_en,       // accept one word
  input  pix_t word [W],
  input  logic misalign,       // chain order for the row being loaded
  output pix_t row_out [L]     // register contents, in array column order
);

  // column of chain position k (0 = farthest from the input) per chain order
  function automatic int unsigned col_of(int unsigned k, bit mis);
    return mis ? (k + L - (Q - 1)) % L : k;
  endfunction
  // chain position of column c per chain order
  function automatic int unsigned pos_of(int unsigned c, bit mis);
    return mis ? (c + Q - 1) % L : c;
  endfunction

  pix_t r [L];

  for (genvar c = 0; c < L; c++) begin : g_reg
    localparam int unsigned KA = pos_of(c, 1'b0);
    localparam int unsigned KM = pos_of(c, 1'b1);
    pix_t src_a, src_m;
    if (KA + W < L) begin : g_a_chain
      assign src_a = r[col_of(KA + W, 1'b0)];
    end else begin : g_a_in
      assign src_a = word[KA + W - L];
    end
    if (KM + W < L) begin : g_m_chain
      assign src_m = r[col_of(KM + W, 1'b1)];
    end else begin : g_m_in
      assign src_m = word[KM + W - L];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        r[c] <= '0;
      else if (shift_en) r[c] <= misalign ? src_m : src_a;
    end
  end

  assign row_out = r;

endmodule
