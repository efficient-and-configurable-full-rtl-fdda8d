// fsbm_comparator -- keeps the best (smallest) SAD of a macroblock search and
// reports its motion vector.
//
// Each clock with in_valid, the C adder trees present the SADs of the
// candidates at search row `row` and candidate columns b*Q + col (b = core
// index).  The comparator picks the smallest of them (lowest core index on a
// tie), compares it with the best SAD so far and keeps the strictly smaller
// one, as in the sequential full-search algorithm.  `first` marks the first
// candidate group of a macroblock (the running minimum restarts), `last` the
// final one; one clock after `last` the result is presented with mv_valid for
// one clock.  Ties between equal SADs therefore go to the candidate scanned
// first in the zig-zag order.
//
// Motion vector: mv_x = column - (P-1), mv_y = row - (P-1), i.e. the
// displacement range is -(P-1) .. +P in both directions.  The row/column
// naming and the sign convention are choices of this design.
module fsbm_comparator
  import fsbm_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned P  = 16,
  parameter int unsigned C  = 1,
  localparam int unsigned SW = sad_w(N),
  localparam int unsigned Q  = cands_per_core(P, C),
  localparam int unsigned CW = $clog2(2 * P),   // candidate index width
  localparam int unsigned VW = $clog2(P) + 2    // signed vector width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 first,
  input  logic                 last,
  input  logic [CW-1:0]        row,
  input  logic [CW-1:0]        col,
  input  logic [SW-1:0]        sad [C],
  output logic                 mv_valid,
  output logic signed [VW-1:0] mv_x,
  output logic signed [VW-1:0] mv_y,
  output logic [SW-1:0]        mv_sad
);

  logic [SW-1:0] best_q, grp_sad, cand_sad;
  logic [CW-1:0] bx_q, by_q, grp_col;
  logic          have_q;

  // smallest SAD of this clock's candidate group
  always_comb begin
    grp_sad = sad[0];
    grp_col = col;
    for (int unsigned b = 1; b < C; b++) begin
      if (sad[b] < grp_sad) begin
        grp_sad = sad[b];
        grp_col = CW'(b * Q) + col;
      end
    end
    cand_sad = grp_sad;
  end

  logic take;
  assign take = in_valid && (first || !have_q || cand_sad < best_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_q   <= '0;
      bx_q     <= '0;
      by_q     <= '0;
      have_q   <= 1'b0;
      mv_valid <= 1'b0;
      mv_x     <= '0;
      mv_y     <= '0;
      mv_sad   <= '0;
    end else begin
      mv_valid <= 1'b0;
      if (take) begin
        best_q <= cand_sad;
        bx_q   <= grp_col;
        by_q   <= row;
        have_q <= 1'b1;
      end
      if (in_valid && last) begin
        mv_valid <= 1'b1;
        mv_sad   <= take ? cand_sad : best_q;
        mv_x     <= VW'(signed'({1'b0, take ? grp_col : bx_q})) - VW'(P - 1);
        mv_y     <= VW'(signed'({1'b0, take ? row : by_q})) - VW'(P - 1);
        have_q   <= 1'b0;
      end
    end
  end

endmodule
