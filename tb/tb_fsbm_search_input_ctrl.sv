// tb_fsbm_search_input_ctrl -- the search-area input controller with
// N = 4, P = 4, C = 1, W = 2 and active blocks of H = 2 rows (L = 11, six
// words per row, two reference fractions).  Words are offered with random
// gaps and rows are taken after random delays.  Checked: row_full rises
// exactly after six accepted words, s_ready is low while a row waits,
// row_idx counts 0 .. L-1 and wraps, and misalign is set exactly for the
// rows H+y loaded after a left sweep: the sweeps up to and including window
// y (one per fraction f with 0 <= y - f*H < p_hat) are odd in number.
module tb_fsbm_search_input_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  localparam int unsigned N = 4, P = 4, C = 1, W = 2, H = 2;
  localparam int unsigned PH = p_hat(P, C);
  localparam int unsigned L  = search_l(N, P, C);
  localparam int unsigned NW = (L + W - 1) / W;
  localparam int unsigned RW = $clog2(L + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic s_valid, s_ready, shift_en, misalign, row_full, row_take;
  logic [RW-1:0] row_idx;
  int checks = 0, failures = 0;

  fsbm_search_input_ctrl #(.N(N), .P(P), .C(C), .W(W), .H(H)) u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sweeps made over windows 0 .. y
  function automatic int sweeps_upto(int y);
    int n = 0;
    for (int w = 0; w <= y; w++)
      for (int f = 0; f < int'(N / H); f++)
        if (w - f * int'(H) >= 0 && w - f * int'(H) < int'(PH)) n++;
    return n;
  endfunction

  initial begin
    s_valid = 0; row_take = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 3 * int'(L); r++) begin
      automatic int exp_row = r % int'(L);
      automatic bit exp_mis = (exp_row >= int'(H)) && (sweeps_upto(exp_row - int'(H)) % 2 == 1);
      for (int w = 0; w < int'(NW); w++) begin
        @(negedge clk);
        check(!row_full && s_ready, $sformatf("row %0d word %0d: not ready", r, w));
        check(int'(row_idx) == exp_row && misalign == exp_mis,
              $sformatf("row %0d: idx %0d mis %0d", r, row_idx, misalign));
        while ($urandom_range(2) == 0) begin
          s_valid = 0;
          @(negedge clk);
        end
        s_valid = 1;
        #1 check(shift_en, "shift_en low while valid and ready");
      end
      @(negedge clk);
      s_valid = 1;  // keeps offering: must not be accepted
      check(row_full && !s_ready && !shift_en, $sformatf("row %0d: not full after %0d words", r, NW));
      repeat ($urandom_range(3)) begin
        @(negedge clk);
        check(row_full && !shift_en, "row lost while waiting");
      end
      row_take = 1;
      @(negedge clk);
      row_take = 0;
      s_valid  = 0;
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
