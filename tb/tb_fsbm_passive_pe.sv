// tb_fsbm_passive_pe -- random test of the passive PE: 2000 clocks of random
// operations and neighbour pixels, compared with a one-register model.
module tb_fsbm_passive_pe;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  arr_op_e op;
  pix_t from_right, from_left, from_below, s, model;
  int checks = 0, failures = 0;

  fsbm_passive_pe u_dut (.*);

  initial begin
    op = OP_HOLD; from_right = '0; from_left = '0; from_below = '0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (s !== model) begin
        failures++;
        $display("FAIL t=%0d: s=%0d expected %0d", t, s, model);
      end
      op         = arr_op_e'($urandom_range(3));
      from_right = pix_t'($urandom);
      from_left  = pix_t'($urandom);
      from_below = pix_t'($urandom);
      case (op)
        OP_LEFT:  model = from_right;
        OP_RIGHT: model = from_left;
        OP_LOAD:  model = from_below;
        default:  ;
      endcase
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
