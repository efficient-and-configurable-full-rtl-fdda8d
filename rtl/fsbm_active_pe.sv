// fsbm_active_pe -- active processing element of the FSBM array.
//
// An active PE is a passive PE (search-area displacement register) extended
// with reference-pixel registers and the absolute-difference operator.
// The reference pixels of the next macroblock travel through the running-data
// registers (ref_in from the chain below, ref_out towards the chain above)
// while the current macroblock is processed from the standing-data
// registers.  On ref_xfer every running value is copied into its standing
// register, so a new reference block is available without idle cycles.
//
// When the active block has fewer rows than the macroblock (H < N), the
// reference block is cut into F = N/H fractions and the PE keeps one running
// and one standing register per fraction; `frac` selects the standing pixel
// used in the current sweep.  With F = 1 (the default, H = N) the PE has one
// register of each kind.  Each clock the PE registers |R - S| of the selected
// standing pixel R and the search pixel S it currently holds.
//
// The running/standing registers and the selecting multiplexer follow the
// architecture; registering the absolute difference inside the PE is a
// pipelining choice of this design.
//
// Timing: ad is |R - S| of the register contents one clock earlier.
module fsbm_active_pe
  import fsbm_pkg::*;
#(
  parameter int unsigned F  = 1,
  localparam int unsigned FW = (F > 1) ? $clog2(F) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  arr_op_e       op,
  input  pix_t          from_right,
  input  pix_t          from_left,
  input  pix_t          from_below,
  output pix_t          s,
  input  logic          ref_shift,   // move the running-data chain one step
  input  pix_t          ref_in  [F], // running pixel entering each slot
  output pix_t          ref_out [F], // running pixel held in each slot
  input  logic          ref_xfer,    // copy running into standing registers
  input  logic [FW-1:0] frac,        // standing register used this clock
  output pix_t          ad           // registered |standing - search|
);

  pix_t run_q [F];
  pix_t std_q [F];
  pix_t r_sel;

  fsbm_passive_pe u_disp (
    .clk, .rst_n, .op, .from_right, .from_left, .from_below, .s
  );

  assign r_sel = std_q[(F > 1) ? int'(frac) : 0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < int'(F); f++) begin
        run_q[f] <= '0;
        std_q[f] <= '0;
      end
      ad <= '0;
    end else begin
      for (int f = 0; f < int'(F); f++) begin
        if (ref_shift) run_q[f] <= ref_in[f];
        if (ref_xfer)  std_q[f] <= run_q[f];
      end
      ad <= (r_sel > s) ? r_sel - s : s - r_sel;
    end
  end

  assign ref_out = run_q;

endmodule
