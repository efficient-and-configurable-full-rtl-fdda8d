// tb_fsbm_comparator -- the minimum-SAD comparator with two cores
// (N = 4, P = 4, C = 2, Q = 4).  Each search presents 8 x 4 candidate groups
// with random SADs (small range, so ties occur); groups may be separated by
// idle clocks.  The expected result is the first smallest SAD in presentation
// order (core 0 before core 1 within a group), with the vector
// (b*Q + col - (P-1), row - (P-1)); it must appear one clock after `last`.
module tb_fsbm_comparator;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  localparam int unsigned N = 4, P = 4, C = 2;
  localparam int unsigned Q  = cands_per_core(P, C);
  localparam int unsigned SW = sad_w(N);
  localparam int unsigned CW = $clog2(2 * P);
  localparam int unsigned VW = $clog2(P) + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, first, last, mv_valid;
  logic [CW-1:0] row, col;
  logic [SW-1:0] sad [C];
  logic signed [VW-1:0] mv_x, mv_y;
  logic [SW-1:0] mv_sad;
  int checks = 0, failures = 0;

  fsbm_comparator #(.N(N), .P(P), .C(C)) u_dut (.*);

  initial begin
    in_valid = 0; first = 0; last = 0; row = '0; col = '0;
    foreach (sad[b]) sad[b] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 50; s++) begin
      automatic int best = -1, bx = 0, by = 0;
      for (int j = 0; j < 8; j++)
        for (int c = 0; c < int'(Q); c++) begin
          @(negedge clk);
          while ($urandom_range(3) == 0) begin
            in_valid = 0; first = 0; last = 0;
            @(negedge clk);
          end
          in_valid = 1;
          first = (j == 0 && c == 0);
          last  = (j == 7 && c == int'(Q) - 1);
          row = CW'(j); col = CW'(c);
          for (int b = 0; b < int'(C); b++) begin
            sad[b] = SW'((s % 3 == 0) ? $urandom_range(1000) : $urandom_range(20));
            if (best < 0 || int'(sad[b]) < best) begin
              best = int'(sad[b]); bx = b * int'(Q) + c - int'(P) + 1; by = j - int'(P) + 1;
            end
          end
          checks++;
          if (mv_valid) begin
            failures++;
            $display("FAIL search %0d: early result", s);
          end
        end
      @(negedge clk);
      in_valid = 0; first = 0; last = 0;
      checks++;
      if (!mv_valid || int'(mv_sad) != best || int'(mv_x) != bx || int'(mv_y) != by) begin
        failures++;
        $display("FAIL search %0d: v=%0d sad=%0d/%0d mv=(%0d,%0d)/(%0d,%0d)",
                 s, mv_valid, mv_sad, best, mv_x, mv_y, bx, by);
      end
    end
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
