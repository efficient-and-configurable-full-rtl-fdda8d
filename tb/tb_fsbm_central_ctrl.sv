// tb_fsbm_central_ctrl -- the central controller with N = 3, P = 3, C = 2
// and active blocks of one row (H = 1, so F = 3 reference fractions; Q = 3
// candidate columns per core, p_hat = 6 candidate rows, windows 0 .. 7).
// The reference-ready and row-full inputs come from simple models that
// become ready after random delays.  The expected sweep list (window y and
// fraction f for every sweep, fractions ascending inside a window, only those
// with 0 <= y - f*H < p_hat) is built here.  For four macroblocks the test
// checks: one reference transfer, then H fill loads without candidates; then
// the candidate groups sweep by sweep (even sweeps columns 0..Q-1, odd sweeps
// Q-1..0) with row y - f*H, fraction, window and first/last flags (first and
// last complete group); the array operation issued with every group (rotate
// left on even sweeps, right on odd ones; at a sweep end hold if the next
// sweep uses the same window, else load, or hold = stall when the row is
// missing; hold after the last group); row_take only with a full buffer; and
// a scan length of F*p_hat*Q clocks plus the stalls.
module tb_fsbm_central_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  localparam int unsigned N = 3, P = 3, C = 2, H = 1;
  localparam int unsigned Q  = cands_per_core(P, C);
  localparam int unsigned PH = p_hat(P, C);
  localparam int unsigned L  = search_l(N, P, C);
  localparam int unsigned F  = n_frac(N, H);
  localparam int unsigned NS = F * PH;        // sweeps per macroblock
  localparam int unsigned CW = $clog2(2 * P);
  localparam int unsigned FW = (F > 1) ? $clog2(F) : 1;
  localparam int unsigned YW = $clog2(L + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ref_ready, ref_xfer, row_full, row_take;
  arr_op_e op;
  logic cand_valid, cand_first, cand_last, stall, dir_left;
  logic [CW-1:0] cand_row, cand_col;
  logic [FW-1:0] cand_frac;
  logic [YW-1:0] win;
  int checks = 0, failures = 0;
  int sw_y [NS], sw_f [NS];

  fsbm_central_ctrl #(.N(N), .P(P), .C(C), .H(H)) u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // input models: ready again a random number of clocks after being consumed
  int ref_wait = 0, row_wait = 0;
  always @(posedge clk) if (rst_n) begin
    if (ref_xfer) begin ref_ready <= 1'b0; ref_wait <= $urandom_range(5); end
    else if (!ref_ready) begin
      if (ref_wait == 0) ref_ready <= 1'b1; else ref_wait <= ref_wait - 1;
    end
    if (row_take) begin row_full <= 1'b0; row_wait <= $urandom_range(Q + 1); end
    else if (!row_full) begin
      if (row_wait == 0) row_full <= 1'b1; else row_wait <= row_wait - 1;
    end
  end

  int mb = 0, e = 0, fills = 0, xfers = 0, stalls = 0, n_stall_total = 0;
  int t_first = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (row_take) check(row_full && op == OP_LOAD, "row_take without full row / load");
    if (op == OP_LOAD) check(row_take, "load without row_take");
    if (ref_xfer) begin
      check(ref_ready, "ref_xfer without ready reference");
      check(e == 0 && fills == 0, "ref_xfer in the middle of a macroblock");
      xfers++;
    end
    if (op == OP_LOAD && !cand_valid && !stall && e == 0) begin
      check(xfers == mb + 1, "fill before reference transfer");
      fills++;
    end
    if (stall) begin stalls++; n_stall_total++; end
    if (cand_valid) begin
      automatic int k = e / int'(Q);
      automatic int t = e % int'(Q);
      automatic int y = sw_y[k];
      automatic int f = sw_f[k];
      automatic int j = y - f * int'(H);
      automatic int c = (k % 2 == 0) ? t : int'(Q) - 1 - t;
      automatic bit row_end = (t == int'(Q) - 1);
      automatic bit last_g  = (e == int'(NS * Q) - 1);
      automatic bit same_w  = !last_g && row_end && sw_y[k+1] == y;
      automatic bit first_g = (f == int'(F) - 1) && (k == 0 || sw_f[k-1] != f) && t == 0 &&
                              (j == 0);
      arr_op_e exp_op;
      if (e == 0) begin
        check(fills == int'(H), $sformatf("mb %0d: %0d fill loads", mb, fills));
        t_first = cyc; stalls = 0;
      end
      check(int'(cand_row) == j && int'(cand_col) == c,
            $sformatf("mb %0d group %0d: (%0d,%0d) expected (%0d,%0d)", mb, e, cand_row, cand_col, j, c));
      check(int'(cand_frac) == f && int'(win) == y,
            $sformatf("mb %0d group %0d: frac %0d win %0d expected %0d %0d", mb, e, cand_frac, win, f, y));
      check(cand_first == first_g && cand_last == last_g, $sformatf("mb %0d group %0d: flags", mb, e));
      if (!row_end)     exp_op = (k % 2 == 0) ? OP_LEFT : OP_RIGHT;
      else if (last_g)  exp_op = OP_HOLD;
      else if (same_w)  exp_op = OP_HOLD;
      else              exp_op = row_full ? OP_LOAD : OP_HOLD;
      check(op == exp_op, $sformatf("mb %0d group %0d: op %0d expected %0d", mb, e, op, exp_op));
      check(stall == (row_end && !last_g && !same_w && !row_full), "stall flag");
      check(dir_left == (k % 2 == 0), "sweep direction");
      e++;
      if (last_g) begin
        check(cyc - t_first + 1 == int'(NS * Q) + stalls,
              $sformatf("mb %0d: scan %0d clocks, %0d stalls", mb, cyc - t_first + 1, stalls));
        e = 0; fills = 0; mb++;
        if (mb == 4) begin
          check(n_stall_total > 0, "no stall occurred");
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end else if (stall) begin
      check(op == OP_HOLD && !row_full, "repeated stall clock");
    end
  end

  initial begin
    automatic int k = 0;
    for (int y = 0; y <= int'(L - H); y++)
      for (int f = 0; f < int'(F); f++)
        if (y - f * int'(H) >= 0 && y - f * int'(H) < int'(PH)) begin
          sw_y[k] = y; sw_f[k] = f; k++;
        end
    if (k != int'(NS)) $display("FAIL: sweep list has %0d entries", k);
    ref_ready = 1'b0; row_full = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
