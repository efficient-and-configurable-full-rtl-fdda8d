// fsbm_passive_pe -- passive processing element: one search-area displacement
// register of the cylindrical PE array.
//
// A passive PE only stores and moves a search-area pixel.  Every clock the
// central controller picks one of four moves for the whole array (see
// fsbm_pkg::arr_op_e): hold, take the pixel of the right-hand neighbour
// (rotation to the left), take the pixel of the left-hand neighbour (rotation
// to the right), or take the pixel of the PE below (a new search row entering
// from the input buffer).  Moving pixels in these directions is what the
// architecture asks of a passive PE; reset clearing the register to zero is a
// choice of this implementation.
//
// Timing: the new value appears one clock after the operation is presented.
module fsbm_passive_pe
  import fsbm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  arr_op_e op,
  input  pix_t    from_right,  // neighbour at column i+1 (used by OP_LEFT)
  input  pix_t    from_left,   // neighbour at column i-1 (used by OP_RIGHT)
  input  pix_t    from_below,  // row below or input buffer (used by OP_LOAD)
  output pix_t    s            // stored search-area pixel
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0;
    end else begin
      unique case (op)
        OP_LEFT:  s <= from_right;
        OP_RIGHT: s <= from_left;
        OP_LOAD:  s <= from_below;
        default:  s <= s;
      endcase
    end
  end

endmodule
