// fsbm_central_ctrl -- central control unit: main state machine, data-flow
// controller and the line/column counters of the zig-zag scan.
//
// Per macroblock the controller runs three phases:
//   ST_REF   wait until the next reference block is complete in the running
//            registers, then copy it into the standing registers (ref_xfer);
//   ST_FILL  load the first H search rows into the array (OP_LOAD each time
//            the input buffer holds a full row);
//   ST_RUN   the zig-zag scan.  The array holds the window of search rows
//            y .. y+H-1.  For every reference fraction f that this window
//            serves (candidate row j = y - f*H inside 0 .. p_hat-1) the ring
//            makes one sweep of Q positions, producing one candidate group
//            (C candidates, columns b*Q + col) per clock; consecutive sweeps
//            run in opposite directions.  Between two sweeps of the same
//            window the array simply holds (the next clock already compares
//            the next fraction); after the last sweep of a window the next
//            search row is loaded, which moves the window one row down.
//            With H = N (one fraction, the default) this is the plain
//            zig-zag: p_hat rows of Q clocks, p_hat*Q clocks in total; in
//            general F*p_hat*Q clocks, F = N/H, without idle clocks.
// If the input buffer has not finished the next row when a window is done,
// the array holds (stall) and the repeated candidate group is not reported
// again.
//
// The zig-zag order and the cycle count follow the architecture; the phase
// structure, the serial reference/fill phases (no overlap of the next search
// area with the current scan), the ascending fraction order within a window
// and the stall rule are choices of this design.
//
// Outputs: cand_* describe the array contents during the same clock;
// cand_first / cand_last mark the first and last group whose SADs are
// complete (fraction F-1).  The active PEs, adder trees and accumulator add
// three clocks before the SADs reach the comparator.
module fsbm_central_ctrl
  import fsbm_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16,
  parameter int unsigned C = 1,
  parameter int unsigned H = N,
  localparam int unsigned Q  = cands_per_core(P, C),
  localparam int unsigned PH = p_hat(P, C),
  localparam int unsigned L  = search_l(N, P, C),
  localparam int unsigned F  = n_frac(N, H),
  localparam int unsigned NY = L - H,                 // last window
  localparam int unsigned CW = $clog2(2 * P),
  localparam int unsigned FW = (F > 1) ? $clog2(F) : 1,
  localparam int unsigned YW = $clog2(L + 1),
  localparam int unsigned HW = $clog2(H + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ref_ready,
  output logic          ref_xfer,
  input  logic          row_full,
  output logic          row_take,
  output arr_op_e       op,
  output logic          cand_valid,
  output logic          cand_first,
  output logic          cand_last,
  output logic [CW-1:0] cand_row,
  output logic [CW-1:0] cand_col,
  output logic [FW-1:0] cand_frac,
  output logic [YW-1:0] win,         // first search row in the array
  output logic          stall,       // a scan clock lost waiting for a row
  output logic          dir_left     // current sweep direction
);

  typedef enum logic [1:0] {ST_REF, ST_FILL, ST_RUN} state_e;

  state_e        st_q;
  logic [HW-1:0] fill_q;
  logic [YW-1:0] win_q;
  logic [FW-1:0] frac_q;
  logic [CW-1:0] col_q;
  logic          left_q, emitted_q, started_q;

  logic end_sweep, last_win, more_frac, complete;
  logic [FW-1:0] next_lo;

  assign end_sweep = left_q ? (col_q == CW'(Q - 1)) : (col_q == '0);
  assign last_win  = (win_q == YW'(NY));
  assign more_frac = (int'(frac_q) < int'(frac_hi(int'(win_q), N, H)));
  assign next_lo   = FW'(frac_lo(int'(win_q) + 1, N, H, PH));
  assign complete  = (int'(frac_q) == int'(F) - 1);

  assign cand_row  = CW'(int'(win_q) - int'(frac_q) * int'(H));
  assign cand_col  = col_q;
  assign cand_frac = frac_q;
  assign win       = win_q;
  assign dir_left  = left_q;

  always_comb begin
    ref_xfer   = 1'b0;
    row_take   = 1'b0;
    op         = OP_HOLD;
    cand_valid = 1'b0;
    cand_first = 1'b0;
    cand_last  = 1'b0;
    stall      = 1'b0;
    unique case (st_q)
      ST_REF:  ref_xfer = ref_ready;
      ST_FILL: begin
        row_take = row_full;
        op       = row_full ? OP_LOAD : OP_HOLD;
      end
      ST_RUN: begin
        cand_valid = !emitted_q;
        cand_first = !emitted_q && complete && !started_q;
        if (!end_sweep) begin
          op = left_q ? OP_LEFT : OP_RIGHT;
        end else if (more_frac) begin
          op = OP_HOLD;                 // next fraction, same window
        end else if (last_win) begin
          cand_last = 1'b1;
        end else if (row_full) begin
          op       = OP_LOAD;
          row_take = 1'b1;
        end else begin
          stall = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= ST_REF;
      fill_q    <= '0;
      win_q     <= '0;
      frac_q    <= '0;
      col_q     <= '0;
      left_q    <= 1'b1;
      emitted_q <= 1'b0;
      started_q <= 1'b0;
    end else begin
      unique case (st_q)
        ST_REF: if (ref_ready) begin
          st_q   <= ST_FILL;
          fill_q <= '0;
        end
        ST_FILL: if (row_full) begin
          if (fill_q == HW'(H - 1)) begin
            st_q      <= ST_RUN;
            win_q     <= '0;
            frac_q    <= '0;
            col_q     <= '0;
            left_q    <= 1'b1;
            emitted_q <= 1'b0;
            started_q <= 1'b0;
          end else begin
            fill_q <= fill_q + 1'b1;
          end
        end
        ST_RUN: begin
          if (cand_first) started_q <= 1'b1;
          if (!end_sweep) begin
            col_q     <= left_q ? col_q + 1'b1 : col_q - 1'b1;
            emitted_q <= 1'b0;
          end else if (more_frac) begin
            frac_q    <= frac_q + 1'b1;
            left_q    <= !left_q;
            emitted_q <= 1'b0;
          end else if (last_win) begin
            st_q <= ST_REF;
          end else if (row_full) begin
            win_q     <= win_q + 1'b1;
            frac_q    <= next_lo;
            left_q    <= !left_q;
            emitted_q <= 1'b0;
          end else begin
            emitted_q <= 1'b1;
          end
        end
        default: st_q <= ST_REF;
      endcase
    end
  end

endmodule
