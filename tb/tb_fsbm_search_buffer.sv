// tb_fsbm_search_buffer -- the search-area input buffer with N = 4, P = 4,
// C = 2, W = 3 (L = 11, Q = 4, four words per row with one leading filler
// pixel).  Random rows are shifted in, alternately in aligned and misaligned
// order; afterwards column c must hold row pixel c (aligned) or pixel
// (c + Q - 1) mod L (misaligned).  Clocks without shift_en must not move data.
module tb_fsbm_search_buffer;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  localparam int unsigned N = 4, P = 4, C = 2, W = 3;
  localparam int unsigned Q   = cands_per_core(P, C);
  localparam int unsigned L   = search_l(N, P, C);
  localparam int unsigned NW  = (L + W - 1) / W;
  localparam int unsigned PAD = NW * W - L;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic shift_en, misalign;
  pix_t word [W];
  pix_t row_out [L];
  int checks = 0, failures = 0;

  fsbm_search_buffer #(.N(N), .P(P), .C(C), .W(W)) u_dut (.*);

  initial begin
    int pix [L];
    shift_en = 1'b0; misalign = 1'b0;
    foreach (word[j]) word[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int row = 0; row < 40; row++) begin
      foreach (pix[k]) pix[k] = $urandom_range(255);
      @(negedge clk);
      misalign = row[0];
      for (int w = 0; w < int'(NW); w++) begin
        // idle clocks in between
        while ($urandom_range(2) == 0) begin
          shift_en = 1'b0;
          @(negedge clk);
        end
        shift_en = 1'b1;
        for (int j = 0; j < int'(W); j++) begin
          automatic int k = w * int'(W) + j - int'(PAD);
          word[j] = (k < 0) ? 8'h5A : pix_t'(pix[k]);
        end
        @(negedge clk);
      end
      shift_en = 1'b0;
      repeat (2) @(negedge clk);
      for (int c = 0; c < int'(L); c++) begin
        automatic int k = misalign ? (c + int'(Q) - 1) % int'(L) : c;
        checks++;
        if (int'(row_out[c]) != pix[k]) begin
          failures++;
          $display("FAIL row %0d mis=%0d col %0d: %0d expected %0d", row, misalign, c, row_out[c], pix[k]);
        end
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
