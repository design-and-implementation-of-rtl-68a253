// ant_multiplier: N x N unsigned algorithmic-noise-tolerant (ANT) multiplier
// with a fixed-width reduced-precision replica.
//
// How it works: the main multiplier (mdsp_dadda) computes the full 2N-bit
// product ya.  It is meant to run from an overscaled supply, where its
// longest paths may miss the sampling edge and ya may be wrong.  In parallel,
// the replica (fw_rpr) multiplies only the N/2 MSBs of both operands and
// keeps an N/2-bit compensated upper half yr; its paths are short, so it
// stays correct.  ant_decision keeps ya when |ya - yr * 2^(3N/2)| <= Th and
// substitutes the aligned replica value otherwise.  The chosen value and a
// flag saying whether the replica was used are registered on the clock.
//
// Interface and timing: x and y are sampled with the result one cycle later:
// p and corrected change on the rising clk edge after the operands were
// applied.  rst_n (asynchronous, active low) clears the output register.
//
// Taken from the fixed-width-RPR ANT scheme: the MDSP/RPR/decision structure,
// 12-bit operands, the 6-bit fixed-width replica and the Dadda main
// multiplier.  This design's own choices: an output register as the only
// storage, the reset, the corrected flag, and the threshold value for N = 12
// (TH must be recomputed for any other N).
module ant_multiplier #(
  parameter int unsigned N  = 12,
  parameter int unsigned TH = 455553
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p,
  output logic           corrected
);

  localparam int unsigned H = N / 2;

  logic [2*N-1:0] ya;       // MDSP output
  logic [H-1:0]   yr;       // RPR output
  logic [2*N-1:0] y_sel;
  logic           use_rpr;

  mdsp_dadda #(.N(N)) u_mdsp (
    .x (x),
    .y (y),
    .p (ya)
  );

  fw_rpr #(.H(H)) u_rpr (
    .xh (x[N-1:H]),
    .yh (y[N-1:H]),
    .yr (yr)
  );

  ant_decision #(
    .WA    (2*N),
    .WR    (H),
    .SHIFT (3*H),
    .TH    (TH)
  ) u_dec (
    .ya      (ya),
    .yr      (yr),
    .y       (y_sel),
    .use_rpr (use_rpr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p         <= '0;
      corrected <= 1'b0;
    end else begin
      p         <= y_sel;
      corrected <= use_rpr;
    end
  end

endmodule
