// Aging-aware variable-latency 64 x 64 multiplier with adaptive hold logic.
//
// A clock period shorter than the multiplier's worst-case delay is used.
// Operands are registered on acceptance; the column-bypassing multiplier
// (mult64) works on the registered operands while the adaptive hold logic
// (ahl) counts the zeros of the registered multiplicand. If it judges the
// operation short, the product is registered at the next clock edge; if
// long, the operands are held for one more cycle (hold = 1) and the product
// is registered one edge later. The aging input switches the AHL to its
// stricter judgement so that, as the circuit slows down, more operations
// are given two cycles instead of failing timing.
// Variable latency, the AHL on the multiplicand and the aging input follow
// the design; the valid/ready handshake, the reset and the register
// placement are this design's choice.
//
// Interface (all synchronous to clk, rst active high and synchronous):
//   in_valid/in_ready : an operation (md, mr) is accepted on an edge where
//                       both are 1. in_ready is 1 when idle, in the last
//                       cycle of an operation, so back-to-back short
//                       operations run at one per cycle.
//   out_valid         : one-cycle pulse with product; out_long tells the
//                       operation was given two cycles.
//   hold              : 1 in the first cycle of a two-cycle operation.
//   p1..p4            : the four sub-products of the operation in flight
//                       (combinational, for observation).
// Timing: a short operation accepted at edge t has out_valid after edge
// t+1, a long one after edge t+2.
module ahl_mult_top
  import ahl_mult_pkg::*;
#(
  parameter int unsigned W = OP_W
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           aging,      // from the aging indicator
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [W-1:0]   md,         // multiplicand
  input  logic [W-1:0]   mr,         // multiplier
  output logic           out_valid,
  output logic           out_long,
  output logic [2*W-1:0] product,
  output logic           hold,
  output logic [W-1:0]   p1,         // partial products of the four
  output logic [W-1:0]   p2,         // sub-multipliers, for observation
  output logic [W-1:0]   p3,
  output logic [W-1:0]   p4
);
  vl_state_t        state_q, state_d;
  logic [W-1:0]     md_q, mr_q;
  logic [2*W-1:0]   mult_p;
  logic [$clog2(W+1)-1:0] zeros;
  logic             one_cycle;
  logic             done;       // product of the current operation is ready
  logic             accept;

  mult64 #(.HALF_W(W / 2)) u_mult (
    .md(md_q), .mr(mr_q), .product(mult_p),
    .p1(p1), .p2(p2), .p3(p3), .p4(p4)
  );

  ahl #(.WIDTH(W)) u_ahl (
    .md(md_q), .aging(aging), .zeros(zeros), .one_cycle(one_cycle)
  );

  always_comb begin
    done     = (state_q == VL_HOLD) || (state_q == VL_EXEC && one_cycle);
    in_ready = (state_q == VL_IDLE) || done;
    accept   = in_valid && in_ready;
    hold     = (state_q == VL_EXEC) && !one_cycle;
    if (accept)       state_d = VL_EXEC;
    else if (hold)    state_d = VL_HOLD;
    else if (done)    state_d = VL_IDLE;
    else              state_d = state_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= VL_IDLE;
      md_q      <= '0;
      mr_q      <= '0;
      out_valid <= 1'b0;
      out_long  <= 1'b0;
      product   <= '0;
    end else begin
      state_q   <= state_d;
      out_valid <= done;
      if (done) begin
        product  <= mult_p;
        out_long <= (state_q == VL_HOLD);
      end
      if (accept) begin
        md_q <= md;
        mr_q <= mr;
      end
    end
  end

  // The operands must not change while an operation is being held.
  a_hold_stable: assert property (@(posedge clk) disable iff (rst)
    hold |=> (md_q == $past(md_q) && mr_q == $past(mr_q)));
endmodule
