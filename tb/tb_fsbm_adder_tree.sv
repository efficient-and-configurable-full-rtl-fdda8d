// tb_fsbm_adder_tree -- the adder tree at the default N = 16 (256 inputs):
// random and all-maximum inputs; each sum is compared with a plain loop sum
// one clock later, and the valid flag must follow with the same latency.
module tb_fsbm_adder_tree;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned SW = sad_w(N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pix_t ad [N][N];
  logic in_valid, sad_valid;
  logic [SW-1:0] sad;
  int expected, exp_valid;
  int checks = 0, failures = 0;

  fsbm_adder_tree #(.N(N)) u_dut (.*);

  initial begin
    in_valid = 1'b0;
    for (int r = 0; r < int'(N); r++) for (int k = 0; k < int'(N); k++) ad[r][k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      expected = 0;
      for (int r = 0; r < int'(N); r++)
        for (int k = 0; k < int'(N); k++) begin
          ad[r][k] = (t == 5) ? 8'hFF : pix_t'($urandom);
          expected += int'(ad[r][k]);
        end
      in_valid  = $urandom_range(1);
      exp_valid = in_valid;
      @(negedge clk);
      checks++;
      if (int'(sad) != expected || sad_valid != exp_valid[0]) begin
        failures++;
        $display("FAIL t=%0d: sad=%0d expected %0d valid=%0d", t, sad, expected, sad_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
