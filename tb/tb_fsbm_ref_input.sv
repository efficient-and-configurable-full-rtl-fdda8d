// tb_fsbm_ref_input -- the reference input buffer with N = 4.  Ten reference
// blocks are offered pixel by pixel with random gaps.  A model of the running
// registers (rows pushed in at the bottom, moving up) is fed from ref_shift /
// ref_row; after each block it must equal the block sent, ref_ready must be
// high and r_ready low until ref_take, and exactly N pushes must have occurred.
module tb_fsbm_ref_input;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  localparam int unsigned N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic r_valid, r_ready, ref_shift, ref_ready, ref_take;
  pix_t r_pix;
  pix_t ref_row [N];
  int run [N][N];
  int blk [N][N];
  int pushes = 0;
  int checks = 0, failures = 0;

  fsbm_ref_input #(.N(N)) u_dut (.*);

  always @(posedge clk) if (rst_n && ref_shift) begin
    for (int r = 0; r + 1 < int'(N); r++) run[r] = run[r+1];
    foreach (ref_row[k]) run[N-1][k] = int'(ref_row[k]);
    pushes++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    r_valid = 0; r_pix = '0; ref_take = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 10; b++) begin
      pushes = 0;
      foreach (blk[u, v]) blk[u][v] = $urandom_range(255);
      for (int u = 0; u < int'(N); u++)
        for (int v = 0; v < int'(N); v++) begin
          @(negedge clk);
          while ($urandom_range(2) == 0) begin
            r_valid = 0;
            @(negedge clk);
          end
          r_valid = 1;
          r_pix = pix_t'(blk[u][v]);
          while (!r_ready) @(negedge clk);
        end
      @(negedge clk);
      r_valid = 1;  // next block's first pixel must wait
      r_pix = 8'h33;
      repeat (3) @(negedge clk);
      check(ref_ready && !r_ready, $sformatf("block %0d: ready=%0d r_ready=%0d", b, ref_ready, r_ready));
      check(pushes == int'(N), $sformatf("block %0d: %0d row pushes", b, pushes));
      foreach (blk[u, v])
        check(run[u][v] == blk[u][v], $sformatf("block %0d pixel (%0d,%0d)", b, u, v));
      r_valid = 0;
      ref_take = 1;
      @(negedge clk);
      ref_take = 0;
      check(!ref_ready && r_ready, "not released after ref_take");
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
