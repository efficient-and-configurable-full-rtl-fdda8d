// fsbm_top -- full-search block-matching motion-estimation processor.
//
// For every N x N reference macroblock the processor evaluates the sum of
// absolute differences (SAD) against all p_hat x p_hat candidate blocks of an
// L x L search area (L = p_hat + N - 1, displacements -(P-1) .. +P) and
// returns the displacement with the smallest SAD.
//
// Structure (one instance of each unless noted):
//   fsbm_ref_input          buffer R + controller: next reference block into
//                           the running registers of the active PEs
//   fsbm_search_input_ctrl  search-area input controller
//   fsbm_search_buffer      SIPO row buffer with the alignment multiplexers
//   fsbm_pe_array           H x L cylindrical array: C active blocks of H x N
//                           PEs, passive columns and the connection block
//   fsbm_adder_tree (C)     one (partial) SAD per active block per clock
//   fsbm_sad_accum          adds the partial SADs of the F = N/H fractions
//   fsbm_comparator         running minimum -> motion vector
//   fsbm_central_ctrl       phases, zig-zag sweeps, row loads, stalls
//
// Interface: the reference block is streamed one pixel per clock (r_valid /
// r_ready, raster order).  The search area of the same macroblock is streamed
// as rows 0 .. L-1, each as ceil(L/W) words of W pixels (s_valid / s_ready;
// word[0] first; the first word of a row starts with ceil(L/W)*W - L filler
// pixels).  The next macroblock's reference may be sent while the current
// one is processed.  One clock-wide mv_valid carries mv_x, mv_y and the
// minimum SAD.
//
// Active blocks of H < N rows (H dividing N) trade speed for area: each
// active PE stores F = N/H reference pixels, the reference block is matched
// one fraction of H rows per sweep and the scan takes F times as long.
//
// Timing: once the first H search rows are in the array, the scan takes
// F * p_hat * floor(p_hat/C) clocks without idle clocks, provided every
// further row arrives in time (ceil(L/W)+1 <= Q); otherwise the array
// stalls.  mv_valid follows the last scan clock by four clocks.
// Defaults are those of the single-core chip configuration: N = 16, P = 16
// (-15 .. +16), C = 1, so p_hat = 32, L = 47.  The input width W = 2 is a
// choice of this design, the smallest that keeps the default scan stall-free.
module fsbm_top
  import fsbm_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16,
  parameter int unsigned C = 1,
  parameter int unsigned W = 2,
  parameter int unsigned H = N,
  localparam int unsigned L  = search_l(N, P, C),
  localparam int unsigned F  = n_frac(N, H),
  localparam int unsigned FW = (F > 1) ? $clog2(F) : 1,
  localparam int unsigned SW = sad_w(N),
  localparam int unsigned CW = $clog2(2 * P),
  localparam int unsigned VW = $clog2(P) + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // reference macroblock
  input  logic                 r_valid,
  output logic                 r_ready,
  input  pix_t                 r_pix,
  // search area
  input  logic                 s_valid,
  output logic                 s_ready,
  input  pix_t                 s_word [W],
  // result
  output logic                 mv_valid,
  output logic signed [VW-1:0] mv_x,
  output logic signed [VW-1:0] mv_y,
  output logic [SW-1:0]        mv_sad,
  // status
  output logic                 stall
);

  // ---------------- reference path
  logic ref_shift, ref_ready, ref_xfer;
  pix_t ref_row [N];

  fsbm_ref_input #(.N(N)) u_ref (
    .clk, .rst_n, .r_valid, .r_ready, .r_pix,
    .ref_shift, .ref_row, .ref_ready, .ref_take(ref_xfer)
  );

  // ---------------- search path
  logic shift_en, misalign, row_full, row_take;
  logic [$clog2(L + 1)-1:0] row_idx;
  pix_t row_out [L];

  fsbm_search_input_ctrl #(.N(N), .P(P), .C(C), .W(W), .H(H)) u_sctl (
    .clk, .rst_n, .s_valid, .s_ready, .shift_en, .misalign,
    .row_full, .row_idx, .row_take
  );

  fsbm_search_buffer #(.N(N), .P(P), .C(C), .W(W)) u_sbuf (
    .clk, .rst_n, .shift_en, .word(s_word), .misalign, .row_out
  );

  // ---------------- control
  arr_op_e       op;
  logic          cand_valid, cand_first, cand_last;
  logic [CW-1:0] cand_row, cand_col;
  logic [FW-1:0] cand_frac;
  logic [$clog2(L + 1)-1:0] win;

  fsbm_central_ctrl #(.N(N), .P(P), .C(C), .H(H)) u_ctl (
    .clk, .rst_n, .ref_ready, .ref_xfer, .row_full, .row_take, .op,
    .cand_valid, .cand_first, .cand_last, .cand_row, .cand_col, .cand_frac,
    .win, .stall, .dir_left()
  );

  // ---------------- PE array
  pix_t ad    [C][H][N];

  fsbm_pe_array #(.N(N), .P(P), .C(C), .H(H)) u_arr (
    .clk, .rst_n, .op, .row_in(row_out), .ref_shift, .ref_row_in(ref_row),
    .ref_xfer, .frac(cand_frac), .ad, .s_out()
  );

  // ---------------- candidate tags follow the two pipeline registers
  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic [FW-1:0] frac;
    logic [CW-1:0] row;
    logic [CW-1:0] col;
  } tag_t;

  tag_t tag0, tag1, tag2;
  assign tag0 = '{valid: cand_valid, first: cand_first, last: cand_last,
                  frac: cand_frac, row: cand_row, col: cand_col};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1 <= '0;
      tag2 <= '0;
    end else begin
      tag1 <= tag0;
      tag2 <= tag1;
    end
  end

  // ---------------- adder trees, accumulator and comparator
  logic [SW-1:0] sad [C];
  logic          sad_valid [C];

  for (genvar b = 0; b < C; b++) begin : g_tree
    fsbm_adder_tree #(.N(N), .R(H)) u_tree (
      .clk, .rst_n, .ad(ad[b]), .in_valid(tag1.valid),
      .sad(sad[b]), .sad_valid(sad_valid[b])
    );
  end

  logic          acc_valid, acc_first, acc_last;
  logic [CW-1:0] acc_row, acc_col;
  logic [SW-1:0] acc_sad [C];

  fsbm_sad_accum #(.N(N), .P(P), .C(C), .H(H)) u_acc (
    .clk, .rst_n, .in_valid(tag2.valid), .in_first(tag2.first),
    .in_last(tag2.last), .in_frac(tag2.frac), .in_row(tag2.row),
    .in_col(tag2.col), .in_sad(sad), .out_valid(acc_valid),
    .out_first(acc_first), .out_last(acc_last), .out_row(acc_row),
    .out_col(acc_col), .out_sad(acc_sad)
  );

  fsbm_comparator #(.N(N), .P(P), .C(C)) u_cmp (
    .clk, .rst_n, .in_valid(acc_valid), .first(acc_first), .last(acc_last),
    .row(acc_row), .col(acc_col), .sad(acc_sad), .mv_valid, .mv_x, .mv_y,
    .mv_sad
  );

  // ---------------- protocol rules
  // rows reach the array in order: fill rows 0..H-1, then row H+y after the
  // last sweep over window y
  property p_row_order;
    @(posedge clk) disable iff (!rst_n)
      (op == OP_LOAD && cand_valid) |-> row_idx == ($bits(row_idx))'(H) + win;
  endproperty
  a_row_order: assert property (p_row_order);

  a_tree_sync: assert property (@(posedge clk) disable iff (!rst_n)
    sad_valid[0] == tag2.valid);

endmodule
