// tb_fsbm_pe_array -- the cylindrical PE array with two active blocks of one
// row (N = 2, H = 1, so two reference fractions; P = 3, C = 2: Q = 3, L = 7,
// active columns 0-1 and 3-4).  Random operations (rotations, row loads,
// holds), random reference rows and a random fraction select are applied; a
// ring model in this file predicts every search register and the registered
// absolute differences of both active blocks.  The model keeps the reference
// block as N rows: row f*H + r is fraction f of PE row r.
module tb_fsbm_pe_array;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  localparam int unsigned N = 2, P = 3, C = 2, H = 1;
  localparam int unsigned Q = cands_per_core(P, C);
  localparam int unsigned L = search_l(N, P, C);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  arr_op_e op;
  pix_t row_in [L];
  logic ref_shift, ref_xfer;
  pix_t ref_row_in [N];
  logic [0:0] frac;
  pix_t ad [C][H][N];
  pix_t s_out [H][L];

  int ms [H][L], mrun [N][N], mstd [N][N], mad [C][H][N];
  int checks = 0, failures = 0;

  fsbm_pe_array #(.N(N), .P(P), .C(C), .H(H)) u_dut (.*);

  initial begin
    op = OP_HOLD; ref_shift = 1'b0; ref_xfer = 1'b0; frac = '0;
    foreach (row_in[i]) row_in[i] = '0;
    foreach (ref_row_in[i]) ref_row_in[i] = '0;
    foreach (ms[r, i]) ms[r][i] = 0;
    foreach (mrun[r, k]) begin mrun[r][k] = 0; mstd[r][k] = 0; end
    foreach (mad[b, r, k]) mad[b][r][k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int nxt [H][L];
      @(negedge clk);
      checks++;
      begin
        automatic bit bad = 0;
        foreach (ms[r, i]) if (int'(s_out[r][i]) != ms[r][i]) bad = 1;
        foreach (mad[b, r, k]) if (int'(ad[b][r][k]) != mad[b][r][k]) bad = 1;
        if (bad) begin
          failures++;
          $display("FAIL t=%0d", t);
        end
      end
      op = arr_op_e'($urandom_range(3));
      foreach (row_in[i]) row_in[i] = pix_t'($urandom);
      foreach (ref_row_in[k]) ref_row_in[k] = pix_t'($urandom);
      ref_shift = $urandom_range(1);
      ref_xfer  = ($urandom_range(5) == 0);
      frac      = 1'($urandom_range(1));
      // absolute differences from the present state
      for (int b = 0; b < int'(C); b++)
        foreach (ms[r, k]) if (k < int'(N)) begin
          automatic int d = mstd[int'(frac) * H + r][k] - ms[r][b * Q + k];
          mad[b][r][k] = (d < 0) ? -d : d;
        end
      if (ref_xfer) mstd = mrun;
      if (ref_shift) begin
        for (int r = 0; r + 1 < int'(N); r++) mrun[r] = mrun[r+1];
        foreach (ref_row_in[k]) mrun[N-1][k] = int'(ref_row_in[k]);
      end
      nxt = ms;
      foreach (ms[r, i]) begin
        case (op)
          OP_LEFT:  nxt[r][i] = ms[r][(i + 1) % L];
          OP_RIGHT: nxt[r][i] = ms[r][(i + L - 1) % L];
          OP_LOAD:  nxt[r][i] = (r == H - 1) ? int'(row_in[i]) : ms[r+1][i];
          default:  ;
        endcase
      end
      ms = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
