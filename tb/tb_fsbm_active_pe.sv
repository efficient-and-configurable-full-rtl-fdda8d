// tb_fsbm_active_pe -- random test of the active PE with two reference slots
// (F = 2): search-register moves, running/standing reference registers, the
// slot selection and the registered absolute difference, all compared with a
// register-level model written here.
module tb_fsbm_active_pe;
  timeunit 1ns; timeprecision 1ps;
  import fsbm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned F = 2;

  arr_op_e op;
  pix_t from_right, from_left, from_below, s, ad;
  pix_t ref_in [F], ref_out [F];
  logic ref_shift, ref_xfer;
  logic [0:0] frac;
  int   m_s, m_ad;
  int   m_run [F], m_std [F];
  int checks = 0, failures = 0;

  fsbm_active_pe #(.F(F)) u_dut (.*);

  initial begin
    op = OP_HOLD; from_right = '0; from_left = '0; from_below = '0;
    ref_shift = 1'b0; ref_xfer = 1'b0; frac = '0;
    m_s = 0; m_ad = 0;
    for (int f = 0; f < int'(F); f++) begin
      ref_in[f] = '0; m_run[f] = 0; m_std[f] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int d;
      @(negedge clk);
      checks++;
      if (int'(s) != m_s || int'(ref_out[0]) != m_run[0] ||
          int'(ref_out[1]) != m_run[1] || int'(ad) != m_ad) begin
        failures++;
        $display("FAIL t=%0d: s=%0d/%0d run=%0d,%0d/%0d,%0d ad=%0d/%0d", t, s, m_s,
                 ref_out[0], ref_out[1], m_run[0], m_run[1], ad, m_ad);
      end
      op         = arr_op_e'($urandom_range(3));
      from_right = pix_t'($urandom);
      from_left  = pix_t'($urandom);
      from_below = pix_t'($urandom);
      ref_in[0]  = pix_t'($urandom);
      ref_in[1]  = pix_t'($urandom);
      frac       = 1'($urandom_range(1));
      ref_shift  = ($urandom_range(3) == 0);
      ref_xfer   = ($urandom_range(7) == 0);
      // model of the next clock edge (all registers sample old values)
      d    = m_std[frac] - m_s;
      m_ad = (d < 0) ? -d : d;
      if (ref_xfer)  m_std = m_run;
      if (ref_shift) for (int f = 0; f < int'(F); f++) m_run[f] = int'(ref_in[f]);
      case (op)
        OP_LEFT:  m_s = int'(from_right);
        OP_RIGHT: m_s = int'(from_left);
        OP_LOAD:  m_s = int'(from_below);
        default:  ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
