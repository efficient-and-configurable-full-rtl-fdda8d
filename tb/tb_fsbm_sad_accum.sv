// tb_fsbm_sad_accum -- the partial-SAD accumulator with N = 4, H = 1 (four
// reference fractions), P = 4, C = 2 (Q = 4, p_hat = 8, L = 11).  The inputs
// follow the controller's sweep order: windows y = 0 .. L-H, inside a window
// the fractions f with 0 <= y - f*H < p_hat in ascending order, Q groups per
// sweep, with random idle clocks in between.  Every partial SAD is random.
// Checked one clock later: out_valid exactly for the final fraction, the
// complete SAD of each core equal to the sum of the F partial SADs of that
// candidate, and row, column and first/last flags passed through.
module tb_fsbm_sad_accum;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  localparam int unsigned N = 4, P = 4, C = 2, H = 1;
  localparam int unsigned Q  = cands_per_core(P, C);
  localparam int unsigned PH = p_hat(P, C);
  localparam int unsigned L  = search_l(N, P, C);
  localparam int unsigned F  = n_frac(N, H);
  localparam int unsigned SW = sad_w(N);
  localparam int unsigned CW = $clog2(2 * P);
  localparam int unsigned FW = (F > 1) ? $clog2(F) : 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid, in_first, in_last, out_valid, out_first, out_last;
  logic [FW-1:0] in_frac;
  logic [CW-1:0] in_row, in_col, out_row, out_col;
  logic [SW-1:0] in_sad [C], out_sad [C];
  int checks = 0, failures = 0, outs = 0;

  fsbm_sad_accum #(.N(N), .P(P), .C(C), .H(H)) u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int acc [PH][Q][C];          // model: running sum per candidate and core
  bit exp_v;
  int exp_s [C];

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_frac = '0; in_row = '0; in_col = '0;
    foreach (in_sad[b]) in_sad[b] = '0;
    exp_v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int mb = 0; mb < 3; mb++) begin
      automatic int k = 0;
      automatic bit started = 0;
      for (int y = 0; y <= int'(L - H); y++)
        for (int f = 0; f < int'(F); f++) begin
          automatic int j = y - f * int'(H);
          if (j < 0 || j >= int'(PH)) continue;
          for (int t = 0; t < int'(Q); t++) begin
            automatic int x = (k % 2 == 0) ? t : int'(Q) - 1 - t;
            automatic bit fin = (f == int'(F) - 1);
            while ($urandom_range(3) == 0) begin
              @(negedge clk);
              in_valid = 0;
              @(posedge clk);
              #1 check(out_valid == exp_v, "out_valid (idle)");
              exp_v = 0;
            end
            @(negedge clk);
            in_valid = 1; in_frac = FW'(f); in_row = CW'(j); in_col = CW'(x);
            in_first = fin && !started;
            in_last  = fin && y == int'(L - H) && t == int'(Q) - 1;
            if (fin) started = 1;
            for (int b = 0; b < int'(C); b++) begin
              in_sad[b] = SW'($urandom_range(255 * N));
              acc[j][x][b] = (f == 0) ? int'(in_sad[b]) : acc[j][x][b] + int'(in_sad[b]);
              exp_s[b] = acc[j][x][b];
            end
            @(posedge clk);
            #1;
            check(out_valid == fin, $sformatf("mb %0d y %0d f %0d: out_valid %0d", mb, y, f, out_valid));
            if (fin) begin
              outs++;
              check(int'(out_row) == j && int'(out_col) == x &&
                    out_first == in_first && out_last == in_last,
                    $sformatf("mb %0d y %0d: tag (%0d,%0d)", mb, y, out_row, out_col));
              for (int b = 0; b < int'(C); b++)
                check(int'(out_sad[b]) == exp_s[b],
                      $sformatf("mb %0d cand (%0d,%0d) core %0d: sad %0d expected %0d",
                                mb, j, x, b, out_sad[b], exp_s[b]));
            end
          end
          k++;
        end
    end
    @(negedge clk);
    in_valid = 0;
    check(outs == 3 * int'(PH * Q), $sformatf("%0d complete groups", outs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
