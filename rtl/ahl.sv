// Adaptive hold logic (AHL) for a column-bypassing multiplier.
//
// A column-bypassing multiplier is faster the more multiplicand bits are 0,
// because each 0 bit bypasses a whole diagonal of adders. The AHL therefore
// counts the zeros of the multiplicand and predicts whether the product can
// be taken after one clock cycle or needs two. Two judging blocks compare
// the count with two thresholds: TH_FRESH for a new circuit and the
// stricter TH_AGED (more zeros needed) for a circuit whose paths have slowed
// with age. The aging input, from an aging indicator outside this block,
// selects which judgement is used. The zero count and the use of
// multiplicand bits follow the design; the threshold values and the
// two-threshold form are this design's choice.
//
// Interface: md is the multiplicand; one_cycle = 1 means one cycle is
// enough, 0 means the operation must be held for a second cycle.
// Timing: purely combinational.
module ahl #(
  parameter int unsigned WIDTH    = 64,
  parameter int unsigned TH_FRESH = WIDTH / 2,
  parameter int unsigned TH_AGED  = WIDTH / 2 + 1
) (
  input  logic [WIDTH-1:0]         md,         // multiplicand
  input  logic                     aging,      // 1: circuit has aged
  output logic [$clog2(WIDTH+1)-1:0] zeros,    // number of 0 bits in md
  output logic                     one_cycle   // 1: product valid after one cycle
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic judge_fresh, judge_aged;

  always_comb begin
    zeros = '0;
    for (int i = 0; i < WIDTH; i++) zeros = zeros + CW'(!md[i]);
    judge_fresh = (zeros >= CW'(TH_FRESH));
    judge_aged  = (zeros >= CW'(TH_AGED));
    one_cycle   = aging ? judge_aged : judge_fresh;
  end
endmodule
