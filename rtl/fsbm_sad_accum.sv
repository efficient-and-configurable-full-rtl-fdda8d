// fsbm_sad_accum -- accumulates the partial SADs of a fractioned reference
// block into complete SADs.
//
// With active blocks of H < N rows the reference block is processed as
// F = N/H fractions.  The partial SAD of candidate (row j, column x) for
// fraction f is produced while the array window sits at search row j + f*H,
// so the F contributions of one candidate arrive in F different sweeps, in
// increasing f.  Candidate row j stays open from window j to window
// j + (F-1)*H, so at most (F-1)*H + 1 <= N rows are open at once.  This unit
// keeps one partial sum per candidate for N candidate rows (slot j mod N)
// and the Q columns of each core: fraction 0 writes the sum, the middle
// fractions add to it, and fraction F-1 adds and passes the complete SAD on,
// together with the candidate's row, column and first/last flags.
//
// The architecture states that each distortion value is obtained over
// several excursions of the cores; the storage of the partial sums is not
// described and this organisation is a choice of this design.  With F = 1
// (H = N, the default) every SAD is already complete and the unit reduces to
// one pipeline register.
//
// Timing: out_* one clock after the final fraction's in_*.
module fsbm_sad_accum
  import fsbm_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned P  = 16,
  parameter int unsigned C  = 1,
  parameter int unsigned H  = N,
  localparam int unsigned SW = sad_w(N),
  localparam int unsigned Q  = cands_per_core(P, C),
  localparam int unsigned F  = n_frac(N, H),
  localparam int unsigned FW = (F > 1) ? $clog2(F) : 1,
  localparam int unsigned CW = $clog2(2 * P),
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [FW-1:0] in_frac,
  input  logic [CW-1:0] in_row,
  input  logic [CW-1:0] in_col,
  input  logic [SW-1:0] in_sad [C],
  output logic          out_valid,
  output logic          out_first,
  output logic          out_last,
  output logic [CW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output logic [SW-1:0] out_sad [C]
);

  logic [SW-1:0] sum [C];
  logic          final_frac;

  assign final_frac = (in_frac == FW'(F - 1));

  if (F == 1) begin : g_single
    assign sum = in_sad;
  end else begin : g_multi
    logic [SW-1:0]   part [N][C][Q];
    logic [RW-1:0]   slot;
    logic [QW-1:0]   ci;

    assign ci         = QW'(in_col);

    assign slot       = RW'(int'(in_row) % int'(N));

    always_comb begin
      for (int b = 0; b < int'(C); b++)
        sum[b] = (in_frac == '0) ? in_sad[b] : part[slot][b][ci] + in_sad[b];
    end

    // partial sums: plain storage, written only with valid data
    always_ff @(posedge clk) begin
      if (in_valid && !final_frac)
        for (int b = 0; b < int'(C); b++) part[slot][b][ci] <= sum[b];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      for (int b = 0; b < int'(C); b++) out_sad[b] <= '0;
    end else begin
      out_valid <= in_valid && final_frac;
      out_first <= in_first;
      out_last  <= in_last;
      out_row   <= in_row;
      out_col   <= in_col;
      for (int b = 0; b < int'(C); b++) out_sad[b] <= sum[b];
    end
  end

endmodule
