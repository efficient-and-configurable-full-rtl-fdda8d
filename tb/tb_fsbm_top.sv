// tb_fsbm_top -- end-to-end test of the FSBM processor at a reduced size with
// two processing cores (N = 4, P = 4, C = 2, W = 4: p_hat = 8, L = 11, Q = 4).
//
// Six macroblocks with random reference and search pixels are streamed in.
// For each, the expected best SAD and motion vector come from a direct
// full-search model in this file that walks the candidates in the order in
// which the processor completes them (row by row, alternate sweep direction,
// core 0 first) with the strict "smaller than" rule.  The test checks SAD and
// vector, that the scan delivers exactly F*p_hat*Q candidate groups (F = N/H
// reference fractions), that it needs F*p_hat*Q clocks plus the counted
// stalls, that no stall occurs while the search input keeps up, and that the
// result follows the last scan clock by four clocks.  The
// last three macroblocks are sent with random gaps in the search stream to
// force stalls.  Left and right rotations, aligned and misaligned row loads,
// stalls and reference transfers are counted; each must occur.
module tb_fsbm_top;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  localparam int unsigned N   = 4;
  localparam int unsigned P   = 4;
  localparam int unsigned C   = 2;
  localparam int unsigned W   = 4;
  localparam int unsigned H   = N;
  localparam int unsigned F   = n_frac(N, H);
  localparam int unsigned Q   = cands_per_core(P, C);
  localparam int unsigned PH  = p_hat(P, C);
  localparam int unsigned L   = search_l(N, P, C);
  localparam int unsigned NW  = (L + W - 1) / W;
  localparam int unsigned PAD = NW * W - L;
  localparam int unsigned NMB = 6;
  localparam int unsigned NTHR = 3;  // first macroblock sent with gaps
  localparam int unsigned SW  = sad_w(N);
  localparam int unsigned VW  = $clog2(P) + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic r_valid, r_ready, s_valid, s_ready, mv_valid, stall;
  pix_t r_pix;
  pix_t s_word [W];
  logic signed [VW-1:0] mv_x, mv_y;
  logic [SW-1:0] mv_sad;

  fsbm_top #(.N(N), .P(P), .C(C), .W(W), .H(H)) u_dut (.*);

  int unsigned refpix [NMB][N][N];
  int unsigned srch   [NMB][L][L];
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  bit throttle = 1'b0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference model: best SAD in the processor's scan order
  // (sweep k runs left when k is even; window y makes one sweep for each
  // fraction f with 0 <= y - f*H < p_hat; candidate row j is complete in the
  // sweep of the last fraction, in window j + (F-1)*H)
  bit row_left [PH];
  initial begin
    automatic int k = 0;
    for (int y = 0; y <= int'(L - H); y++)
      for (int f = 0; f < int'(F); f++)
        if (y - f * int'(H) >= 0 && y - f * int'(H) < int'(PH)) begin
          if (f == int'(F) - 1) row_left[y - f * int'(H)] = (k % 2 == 0);
          k++;
        end
  end

  task automatic expect_mv(int m, output int ex, output int ey, output int es);
    es = -1;
    for (int j = 0; j < int'(PH); j++)
      for (int t = 0; t < int'(Q); t++) begin
        int c = row_left[j] ? t : int'(Q) - 1 - t;
        for (int b = 0; b < int'(C); b++) begin
          int x = b * int'(Q) + c;
          int sad = 0;
          for (int u = 0; u < int'(N); u++)
            for (int v = 0; v < int'(N); v++) begin
              automatic int d = int'(refpix[m][u][v]) - int'(srch[m][j+u][x+v]);
              sad += (d < 0) ? -d : d;
            end
          if (es < 0 || sad < es) begin
            es = sad; ex = x - int'(P) + 1; ey = j - int'(P) + 1;
          end
        end
      end
  endtask

  // streams: an index per stream advances on every accepted transfer
  int unsigned ridx = 0, sidx = 0;
  bit gate = 1'b1;
  localparam int unsigned RTOT = NMB * N * N;
  localparam int unsigned STOT = NMB * L * NW;

  always_comb begin
    int unsigned m, u, v, y, w, k;
    m = ridx / (N * N); u = (ridx / N) % N; v = ridx % N;
    r_valid = rst_n && ridx < RTOT;
    r_pix   = (ridx < RTOT) ? pix_t'(refpix[m][u][v]) : '0;
    m = sidx / (L * NW); y = (sidx / NW) % L; w = sidx % NW;
    s_valid = rst_n && sidx < STOT && gate;
    for (int j = 0; j < int'(W); j++) begin
      k = w * W + j;
      s_word[j] = (sidx < STOT && k >= PAD) ? pix_t'(srch[m][y][k - PAD]) : 8'hA5;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (r_valid && r_ready) ridx <= ridx + 1;
    if (s_valid && s_ready) sidx <= sidx + 1;
    throttle <= (sidx / (L * NW)) >= NTHR;
    gate <= !throttle || ($urandom_range(2) == 0);
  end

  // stimulus
  initial begin
    for (int m = 0; m < int'(NMB); m++) begin
      for (int u = 0; u < int'(N); u++)
        for (int v = 0; v < int'(N); v++) refpix[m][u][v] = $urandom_range(255);
      for (int y = 0; y < int'(L); y++)
        for (int x = 0; x < int'(L); x++) srch[m][y][x] = $urandom_range(255);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // mechanism counters and scan timing
  int n_left = 0, n_right = 0, n_load_al = 0, n_load_mis = 0, n_stall = 0, n_xfer = 0;
  int mb = 0, groups = 0, mb_stall = 0;
  int unsigned t_first = 0, t_last = 0;
  bit mb_throttled = 1'b0, armed = 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (u_dut.op == OP_LEFT)  n_left++;
    if (u_dut.op == OP_RIGHT) n_right++;
    if (u_dut.row_take &&  u_dut.misalign) n_load_mis++;
    if (u_dut.row_take && !u_dut.misalign) n_load_al++;
    if (u_dut.ref_xfer) n_xfer++;
    if (stall) begin n_stall++; mb_stall++; end
    if (u_dut.cand_valid) begin
      if (armed) begin
        t_first = cyc; groups = 0; mb_stall = stall; mb_throttled = throttle;
        armed = 1'b0;
      end
      groups++;
      if (u_dut.cand_last) begin
        t_last = cyc;
        armed = 1'b1;
        check(groups == int'(F * PH * Q), $sformatf("mb %0d: %0d candidate groups", mb, groups));
        check(t_last - t_first + 1 == F * PH * Q + mb_stall,
              $sformatf("mb %0d: scan took %0d clocks, %0d stalls", mb, t_last - t_first + 1, mb_stall));
        if (!mb_throttled)
          check(mb_stall == 0, $sformatf("mb %0d: %0d stalls with full-rate input", mb, mb_stall));
      end
    end
    if (mv_valid) begin
      int ex, ey, es;
      expect_mv(mb, ex, ey, es);
      check(cyc == t_last + 4, $sformatf("mb %0d: result latency %0d", mb, cyc - t_last));
      check(int'(mv_sad) == es, $sformatf("mb %0d: sad %0d expected %0d", mb, mv_sad, es));
      check(int'(mv_x) == ex && int'(mv_y) == ey,
            $sformatf("mb %0d: mv (%0d,%0d) expected (%0d,%0d)", mb, mv_x, mv_y, ex, ey));
      mb++;
      if (mb == int'(NMB)) begin
        check(n_left  > 0, "no left rotation");
        check(n_right > 0, "no right rotation");
        check(n_load_al  > 0, "no aligned row load");
        check(n_load_mis > 0, "no misaligned row load");
        check(n_stall > 0, "no stall");
        check(n_xfer == int'(NMB), $sformatf("%0d reference transfers", n_xfer));
        $display("mechanisms: left=%0d right=%0d load_aligned=%0d load_misaligned=%0d stall=%0d ref_xfer=%0d",
                 n_left, n_right, n_load_al, n_load_mis, n_stall, n_xfer);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
