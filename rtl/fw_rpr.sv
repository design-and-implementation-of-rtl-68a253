// fw_rpr: fixed-width reduced-precision replica (RPR) of the ANT multiplier.
//
// How it works: the replica multiplies only the H most significant bits of
// each operand (xh, yh) and keeps only the upper half of that H x H product.
// Of the partial products x[i] & y[j] (i, j in 0..H-1) it builds only the
// most significant part, MSP, the terms with i + j >= H.  The terms it drops
// are compensated as follows:
//   * ICV (input correction vector, beta): the H terms with i + j = H - 1.
//     The first H-1 of them, C1..C(H-1) = x[H-1]y[0], x[H-2]y[1], ...,
//     x[1]y[H-2], are injected unchanged into the lowest kept column
//     (weight 2^H), so each counts as one LSB of the result.
//   * The last ICV term x[0]y[H-1] goes through one OR gate whose other input
//     is the condition "beta == 0 and the MICV is not all zero", MICV (minor
//     ICV, alpha) being the H-1 terms with i + j = H - 2.  This adds one LSB
//     in the case where the ICV alone would under-compensate.
//   * Everything below (the LSP) is dropped.
// yr is bits [2H-1:H] of MSP + compensation * 2^H.  The maximum is 2^H - 1,
// so no carry-out exists.  The compensation logic sits beside the
// partial-product array, not on the path through its adders.
//
// Interface and timing: purely combinational.  yr has the weight 2^(3H) in
// the 4H-bit product of the full-width operands.
//
// Taken from the fixed-width-RPR ANT scheme: the MSP/ICV/MICV/LSP split, the
// direct injection of the ICV terms with unit weight and the conditional OR
// gate.  This design's own choices: the OR gate's "beta' != 0" condition is
// read as "MICV not all zero"; the adders of the kept array are written as a
// sum left to synthesis.
module fw_rpr #(
  parameter int unsigned H = 6
) (
  input  logic [H-1:0] xh,
  input  logic [H-1:0] yh,
  output logic [H-1:0] yr
);

  logic [H-1:0]   icv;     // icv[k]  = x[H-1-k] & y[k]
  logic [H-2:0]   micv;    // micv[k] = x[H-2-k] & y[k]
  logic           or_term;
  logic [2*H-1:0] msp;
  logic [H-1:0]   comp;    // number of compensation LSBs, at most H

  always_comb begin
    for (int k = 0; k < H; k++)     icv[k]  = xh[H-1-k] & yh[k];
    for (int k = 0; k < H - 1; k++) micv[k] = xh[H-2-k] & yh[k];
  end

  // Conditional OR gate of the compensation vector.
  assign or_term = icv[H-1] | ((icv == '0) && (micv != '0));

  always_comb begin
    msp = '0;
    for (int j = 0; j < H; j++)
      for (int i = 0; i < H; i++)
        if (i + j >= H) msp += (2*H)'(xh[i] & yh[j]) << (i + j);
    comp = H'(or_term);
    for (int k = 0; k < H - 1; k++) comp += H'(icv[k]);
  end

  // Keep the upper half; compensation enters at column H.  msp has no bits
  // below column H, so the lower half of the sum is always zero.
  assign yr = H'((msp + ((2*H)'(comp) << H)) >> H);

endmodule
