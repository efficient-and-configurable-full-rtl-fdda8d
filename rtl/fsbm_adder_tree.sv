// fsbm_adder_tree -- sums the R*N absolute differences of one active block
// (R = rows of PEs, N by default; the sum width always covers N*N inputs so
// that partial sums of a fractioned block can be accumulated).
//
// The inputs are added pairwise, level by level, in a balanced binary tree of
// ceil(log2(R*N)) levels; the final sum is registered.  A valid/tag pair
// travels alongside so the caller can follow which candidate a sum belongs to.
// The architecture gives one adder tree per active block; the tree shape and
// the single output register are choices of this design.
//
// Timing: sad and sad_valid appear one clock after ad/in_valid.
module fsbm_adder_tree
  import fsbm_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned R  = N,
  localparam int unsigned SW = sad_w(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pix_t          ad [R][N],
  input  logic          in_valid,
  output logic [SW-1:0] sad,
  output logic          sad_valid
);

  localparam int unsigned NI  = R * N;
  localparam int unsigned LV  = (NI > 1) ? $clog2(NI) : 1;
  localparam int unsigned NP  = 1 << LV;

  // level 0: the inputs, zero-padded to a power of two; level v has NP>>v sums
  for (genvar v = 0; v <= LV; v++) begin : g_lvl
    logic [SW-1:0] sum [NP >> v];
    for (genvar j = 0; j < (NP >> v); j++) begin : g_node
      if (v == 0) begin : g_leaf
        if (j < NI) begin : g_v
          assign sum[j] = SW'(ad[j / N][j % N]);
        end else begin : g_z
          assign sum[j] = '0;
        end
      end else begin : g_add
        assign sum[j] = g_lvl[v-1].sum[2*j] + g_lvl[v-1].sum[2*j+1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad       <= '0;
      sad_valid <= 1'b0;
    end else begin
      sad       <= g_lvl[LV].sum[0];
      sad_valid <= in_valid;
    end
  end

endmodule
