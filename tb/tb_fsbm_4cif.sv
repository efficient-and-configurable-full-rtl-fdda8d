// tb_fsbm_4cif -- one 4CIF frame (704 x 576 pixels, 44 x 36 = 1584
// macroblocks) through the processor at its default size.
//
// The previous frame is a pseudo-random texture given by a hash of the pixel
// coordinates; the current frame is the previous one moved by a known global
// motion (content of the current frame at (x, y) comes from (x + 5, y - 3) of
// the previous one, clamped at the borders).  Each macroblock's search area is
// cut from the previous frame with the same clamping.  Checks:
//   * every result's SAD equals the minimum found by a plain full search;
//   * every macroblock whose displaced block lies inside the frame reports
//     exactly mv = (+5, -3) with SAD 0;
//   * the whole frame, with inputs always available, fits in the clock budget
//     of 16 frames/s at 36.5 MHz (2 281 250 clocks).
module tb_fsbm_4cif;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  localparam int unsigned N = 16, P = 16, C = 1, W = 2;
  localparam int unsigned PH  = p_hat(P, C);
  localparam int unsigned L   = search_l(N, P, C);
  localparam int unsigned NW  = (L + W - 1) / W;
  localparam int unsigned PAD = NW * W - L;
  localparam int FW = 704, FH = 576;
  localparam int MBX = FW / 16, MBY = FH / 16;
  localparam int unsigned NMB = MBX * MBY;
  localparam int GX = 5, GY = -3;                // global motion
  localparam int unsigned BUDGET = 36_500_000 / 16;
  localparam int unsigned SW = sad_w(N);
  localparam int unsigned VW = $clog2(P) + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic r_valid, r_ready, s_valid, s_ready, mv_valid, stall;
  pix_t r_pix;
  pix_t s_word [W];
  logic signed [VW-1:0] mv_x, mv_y;
  logic [SW-1:0] mv_sad;

  fsbm_top u_dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int clampi(int v, int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction
  // previous frame: hashed texture
  function automatic int prev_px(int x, int y);
    int unsigned h;
    x = clampi(x, FW - 1); y = clampi(y, FH - 1);
    h = (unsigned'(x) * 32'h9E3779B1) ^ (unsigned'(y) * 32'h85EBCA77);
    h = h ^ (h >> 15); h = h * 32'h2C1B3C6D; h = h ^ (h >> 12);
    return int'(h & 255);
  endfunction
  // current frame: previous frame moved by the global motion
  function automatic int cur_px(int x, int y);
    return prev_px(clampi(x + GX, FW - 1), clampi(y + GY, FH - 1));
  endfunction
  // search area pixel (row sy, column sx) of macroblock m
  function automatic int srch_px(int m, int sy, int sx);
    int x0 = (m % MBX) * 16, y0 = (m / MBX) * 16;
    return prev_px(x0 - int'(P) + 1 + sx, y0 - int'(P) + 1 + sy);
  endfunction
  function automatic int ref_px(int m, int u, int v);
    return cur_px((m % MBX) * 16 + v, (m / MBX) * 16 + u);
  endfunction

  // streams
  int unsigned ridx = 0, sidx = 0;
  localparam int unsigned RTOT = NMB * N * N;
  localparam int unsigned STOT = NMB * L * NW;

  always_comb begin
    int unsigned m, y, w, k;
    m = ridx / (N * N);
    r_valid = rst_n && ridx < RTOT;
    r_pix   = (ridx < RTOT) ? pix_t'(ref_px(int'(m), int'((ridx / N) % N), int'(ridx % N))) : '0;
    m = sidx / (L * NW); y = (sidx / NW) % L; w = sidx % NW;
    s_valid = rst_n && sidx < STOT;
    for (int j = 0; j < int'(W); j++) begin
      k = w * W + j;
      s_word[j] = (sidx < STOT && k >= PAD) ? pix_t'(srch_px(int'(m), int'(y), int'(k - PAD))) : 8'h00;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (r_valid && r_ready) ridx <= ridx + 1;
    if (s_valid && s_ready) sidx <= sidx + 1;
  end

  task automatic full_search(int m, output int best);
    int rp [N][N];
    int sp [L][L];
    for (int u = 0; u < int'(N); u++)
      for (int v = 0; v < int'(N); v++) rp[u][v] = ref_px(m, u, v);
    for (int y = 0; y < int'(L); y++)
      for (int x = 0; x < int'(L); x++) sp[y][x] = srch_px(m, y, x);
    best = -1;
    for (int j = 0; j < int'(PH); j++)
      for (int x = 0; x < int'(PH); x++) begin
        automatic int sad = 0;
        for (int u = 0; u < int'(N); u++)
          for (int v = 0; v < int'(N); v++) begin
            automatic int d = rp[u][v] - sp[j+u][x+v];
            sad += (d < 0) ? -d : d;
          end
        if (best < 0 || sad < best) best = sad;
      end
  endtask

  int mb = 0, n_exact = 0;
  int unsigned t_start = 0;

  always @(posedge clk) if (rst_n && mv_valid) begin
    int best;
    automatic int x0 = (mb % MBX) * 16, y0 = (mb / MBX) * 16;
    full_search(mb, best);
    checks++;
    if (int'(mv_sad) != best) begin
      failures++;
      $display("FAIL mb %0d: sad %0d, full search %0d", mb, mv_sad, best);
    end
    if (x0 + GX >= 0 && x0 + GX + 15 < FW && y0 + GY >= 0 && y0 + GY + 15 < FH) begin
      n_exact++;
      checks++;
      if (int'(mv_x) != GX || int'(mv_y) != GY || mv_sad != '0) begin
        failures++;
        $display("FAIL mb %0d: mv (%0d,%0d) sad %0d, expected (%0d,%0d) sad 0", mb, mv_x, mv_y, mv_sad, GX, GY);
      end
    end
    mb++;
    if (mb == int'(NMB)) begin
      checks++;
      $display("frame: %0d clocks for %0d macroblocks (budget %0d), %0d with exact motion check",
               cyc - t_start, NMB, BUDGET, n_exact);
      if (cyc - t_start > BUDGET) begin
        failures++;
        $display("FAIL: frame exceeds the 16 frames/s budget");
      end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t_start = cyc;
  end

  initial begin
    repeat (2_600_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
