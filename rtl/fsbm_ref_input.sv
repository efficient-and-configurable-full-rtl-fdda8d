// fsbm_ref_input -- reference-macroblock input buffer (buffer R) and its
// controller.
//
// Reference pixels arrive one per clock under a valid/ready handshake, in
// raster order (row 0 first, left to right).  A serial-in, parallel-out
// register of N pixels collects one row; in the clock after it is full the row
// is pushed (ref_shift) into the bottom row of running-data registers of the
// active PEs, moving the rows already there up by one.  After N rows the whole
// next reference block sits in the running registers and ref_ready is raised;
// no more pixels are accepted until the central controller copies the block
// into the standing registers (ref_take).  Because this happens while the
// previous macroblock is still being processed, loading a reference block
// costs no processing cycles.
//
// The buffer R feeding the active block and the running/standing scheme
// follow the architecture; the one-pixel-per-clock input and the handshake are
// choices of this design.
//
// Timing: N*N accepted pixels plus N push clocks per reference block.
module fsbm_ref_input
  import fsbm_pkg::*;
#(
  parameter int unsigned N  = 16,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic r_valid,
  output logic r_ready,
  input  pix_t r_pix,
  output logic ref_shift,       // push ref_row into the running registers
  output pix_t ref_row [N],
  output logic ref_ready,       // a complete block waits in the running registers
  input  logic ref_take         // standing <- running this clock
);

  logic [CW-1:0] pix_q, rows_q;

  assign ref_shift = (pix_q == CW'(N));
  assign ref_ready = (rows_q == CW'(N));
  assign r_ready   = (pix_q < CW'(N)) && !ref_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_q  <= '0;
      rows_q <= '0;
      for (int unsigned k = 0; k < N; k++) ref_row[k] <= '0;
    end else begin
      if (r_valid && r_ready) begin
        for (int unsigned k = 0; k + 1 < N; k++) ref_row[k] <= ref_row[k+1];
        ref_row[N-1] <= r_pix;
        pix_q        <= pix_q + 1'b1;
      end
      if (ref_shift) begin
        pix_q  <= '0;
        rows_q <= rows_q + 1'b1;
      end
      if (ref_take && ref_ready) rows_q <= '0;
    end
  end

endmodule
