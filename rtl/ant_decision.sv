// ant_decision: error detection and correction of the algorithmic noise
// tolerant (ANT) scheme.
//
// How it works: the RPR result yr is aligned to the MDSP result by its weight
// (yr * 2^SHIFT).  The block forms |ya - yr * 2^SHIFT| and compares it with
// the threshold TH.  A difference up to TH is what the replica's own
// truncation can explain, so ya is trusted; a larger difference can only come
// from a soft error of the main multiplier, and the aligned RPR value is
// output instead.  use_rpr tells which value was chosen.
//
// TH must be the largest |exact product - aligned RPR result| over all inputs.
// For the 12 x 12 multiplier with the 6-bit fixed-width RPR (fw_rpr) that
// maximum is 455553, found by evaluating all 2^24 operand pairs.
//
// Interface and timing: purely combinational.
//
// Taken from the fixed-width-RPR ANT scheme: the selection rule and the
// definition of the threshold. This design's own choices: the alignment by
// SHIFT, the numeric TH and the use_rpr flag.
module ant_decision #(
  parameter int unsigned WA    = 24,
  parameter int unsigned WR    = 6,
  parameter int unsigned SHIFT = 18,
  parameter int unsigned TH    = 455553
) (
  input  logic [WA-1:0] ya,
  input  logic [WR-1:0] yr,
  output logic [WA-1:0] y,
  output logic          use_rpr
);

  logic [WA-1:0] yr_al;
  logic [WA:0]   diff;   // ya - yr_al, two's complement with one extra bit
  logic [WA-1:0] mag;

  assign yr_al   = WA'(yr) << SHIFT;
  assign diff    = {1'b0, ya} - {1'b0, yr_al};
  assign mag     = diff[WA] ? WA'(-diff) : diff[WA-1:0];
  assign use_rpr = (mag > WA'(TH));
  assign y       = use_rpr ? yr_al : ya;

endmodule
