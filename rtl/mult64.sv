// Wide multiplier assembled from four half-width column-bypassing
// multipliers (combinational).
//
// With md = {mdH, mdL} and mr = {mrH, mrL}, each half HALF_W bits wide:
//   p1 = mdL * mrL, p2 = mdH * mrL, p3 = mdL * mrH, p4 = mdH * mrH
//   product = p1 + (p2 << HALF_W) + (p3 << HALF_W) + (p4 << 2*HALF_W)
// computed by three adders in a chain (ADDER0, ADDER1, ADDER2). The four
// sub-multipliers, their names p1..p4 and the three adders follow the
// design's 64 x 64 structure; which quarter each of p1..p4 holds and the
// chained order of the adders are this design's choice.
//
// Interface: md (multiplicand) drives the bypass of all four arrays;
// product is 2*OP_W bits. p1..p4 are brought out for observation.
// Timing: no clock.
module mult64 #(
  parameter int unsigned HALF_W = ahl_mult_pkg::HALF_W
) (
  input  logic [2*HALF_W-1:0] md,       // multiplicand
  input  logic [2*HALF_W-1:0] mr,       // multiplier
  output logic [4*HALF_W-1:0] product,  // md * mr
  output logic [2*HALF_W-1:0] p1,       // mdL * mrL
  output logic [2*HALF_W-1:0] p2,       // mdH * mrL
  output logic [2*HALF_W-1:0] p3,       // mdL * mrH
  output logic [2*HALF_W-1:0] p4        // mdH * mrH
);
  localparam int unsigned PW = 4 * HALF_W;

  logic [HALF_W-1:0] md_l, md_h, mr_l, mr_h;
  logic [PW-1:0]     add0, add1;

  assign md_l = md[HALF_W-1:0];
  assign md_h = md[2*HALF_W-1:HALF_W];
  assign mr_l = mr[HALF_W-1:0];
  assign mr_h = mr[2*HALF_W-1:HALF_W];

  cb_mult #(.N(HALF_W)) m1 (.a(md_l), .b(mr_l), .p(p1));
  cb_mult #(.N(HALF_W)) m2 (.a(md_h), .b(mr_l), .p(p2));
  cb_mult #(.N(HALF_W)) m3 (.a(md_l), .b(mr_h), .p(p3));
  cb_mult #(.N(HALF_W)) m4 (.a(md_h), .b(mr_h), .p(p4));

  always_comb begin
    add0    = PW'(p1) + (PW'(p2) << HALF_W);         // ADDER0
    add1    = add0 + (PW'(p3) << HALF_W);            // ADDER1
    product = add1 + (PW'(p4) << (2 * HALF_W));      // ADDER2
  end
endmodule
