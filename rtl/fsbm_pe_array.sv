// fsbm_pe_array -- cylindrical processing-element array of the FSBM processor.
//
// The array holds H rows by L columns of search-area pixels, L = p_hat + N - 1.
// Its columns are closed into a ring: the last column (the end of the
// connection block) feeds the first column of the first active block, so a
// rotation by one column never loses a pixel.  Column b*Q .. b*Q+N-1 of the
// ring is active block b (b = 0..C-1, Q = floor(2p/C)); every other column is a
// passive column.  This is why the array needs only N + 2p - 1 columns instead
// of the N + 2(2p - 1) of a planar array with a passive block on each side.
//
// Operation (one per clock, from the central controller):
//   OP_LEFT / OP_RIGHT  rotate the ring: the active blocks move to the next or
//                       previous candidate column of the current search row;
//   OP_LOAD             shift every row up and take the L pixels of row_in
//                       into the bottom row: the window moves one search row
//                       down;
//   OP_HOLD             keep all pixels.
// Alternating left and right sweeps between row loads is the zig-zag scan; the
// input buffer is responsible for presenting each new row in the rotation the
// ring has at that moment.
//
// Reference pixels: ref_row_in carries one row of N reference pixels; on
// ref_shift it enters the running-register chain of every active block.  The
// chain runs up through the H PE rows of fraction slot F-1, then continues at
// the bottom of slot F-2, and so on, so that after N pushes reference row
// f*H + r sits in PE row r, slot f.  ref_xfer copies running into standing
// registers; `frac` selects the fraction compared in the current clock.
// With the default H = N there is one slot (F = 1).
//
// Outputs: ad[b][r][k] = |R - S| of active block b, PE row r, column k,
// registered in the PE (one clock after the array state it was computed
// from).  s_out exposes the search registers for observation.
module fsbm_pe_array
  import fsbm_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16,
  parameter int unsigned C = 1,
  parameter int unsigned H = N,
  localparam int unsigned Q  = cands_per_core(P, C),
  localparam int unsigned L  = search_l(N, P, C),
  localparam int unsigned F  = n_frac(N, H),
  localparam int unsigned FW = (F > 1) ? $clog2(F) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  arr_op_e       op,
  input  pix_t          row_in     [L],
  input  logic          ref_shift,
  input  pix_t          ref_row_in [N],
  input  logic          ref_xfer,
  input  logic [FW-1:0] frac,
  output pix_t          ad         [C][H][N],
  output pix_t          s_out      [H][L]
);

  // index of the active block a column belongs to, or C for a passive column
  function automatic int unsigned block_of(int unsigned col);
    for (int unsigned b = 0; b < C; b++)
      if (col >= b * Q && col < b * Q + N) return b;
    return C;
  endfunction

  pix_t s   [H][L];
  pix_t run [C][H][N][F];  // running reference pixels per block, row, column, slot

  for (genvar r = 0; r < H; r++) begin : g_row
    for (genvar i = 0; i < L; i++) begin : g_col
      localparam int unsigned BLK = block_of(i);
      pix_t below;
      if (r == H - 1) begin : g_bot
        assign below = row_in[i];
      end else begin : g_mid
        assign below = s[r+1][i];
      end

      if (BLK < C) begin : g_act
        localparam int unsigned K = i - BLK * Q;  // column inside the block
        pix_t rin [F];
        for (genvar f = 0; f < F; f++) begin : g_slot
          if (r < H - 1) begin : g_up
            assign rin[f] = run[BLK][r+1][K][f];
          end else if (f < F - 1) begin : g_wrap
            assign rin[f] = run[BLK][0][K][f+1];
          end else begin : g_entry
            assign rin[f] = ref_row_in[K];
          end
        end
        fsbm_active_pe #(.F(F)) u_pe (
          .clk, .rst_n, .op,
          .from_right (s[r][(i + 1) % L]),
          .from_left  (s[r][(i + L - 1) % L]),
          .from_below (below),
          .s          (s[r][i]),
          .ref_shift,
          .ref_in     (rin),
          .ref_out    (run[BLK][r][K]),
          .ref_xfer,
          .frac,
          .ad         (ad[BLK][r][K])
        );
      end else begin : g_pas
        fsbm_passive_pe u_pe (
          .clk, .rst_n, .op,
          .from_right (s[r][(i + 1) % L]),
          .from_left  (s[r][(i + L - 1) % L]),
          .from_below (below),
          .s          (s[r][i])
        );
      end
    end
  end

  assign s_out = s;

endmodule
