// mdsp_dadda: the main DSP (MDSP) of the ANT multiplier, a full-precision
// N x N unsigned Dadda multiplier.
//
// How it works: the N*N partial products x[i] & y[j] are placed in bit
// columns of weight i+j.  The columns are then reduced in Dadda stages whose
// target heights are the Dadda sequence 2, 3, 4, 6, 9, 13, ... taken from the
// top down: in each stage a column that (with the carries arriving from the
// column below) is taller than the target gets just enough full adders and, if
// needed, one half adder to come down to the target.  When every column holds
// at most two bits, a carry-propagate adder forms the 2N-bit product.  The
// reduction is described with loops over constant bounds; all heights depend
// only on N, so the loops unroll into a fixed adder netlist.
//
// Interface and timing: purely combinational, p = x * y.
//
// Taken from the fixed-width-RPR ANT scheme: the Dadda tree as the MDSP of a
// 12 x 12 ANT multiplier, unsigned operands.  This design's own choices: the
// textbook Dadda schedule and a plain '+' for the final adder.
module mdsp_dadda #(
  parameter int unsigned N = 12
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  localparam int unsigned W = 2 * N;

  // k-th Dadda height (k >= 1): 2, 3, 4, 6, 9, 13, ...
  function automatic int unsigned dadda_height(int unsigned k);
    int unsigned d;
    d = 2;
    for (int unsigned i = 1; i < k; i++) d = (d * 3) / 2;
    return d;
  endfunction

  // Number of reduction stages: how many Dadda heights lie below N.
  function automatic int unsigned num_stages(int unsigned n);
    int unsigned k;
    k = 0;
    for (int unsigned i = 1; i <= n; i++)
      if (dadda_height(i) < n) k = i;
    return k;
  endfunction

  localparam int unsigned NSTAGES = num_stages(N);
  // Reductions one column may need in one stage.
  localparam int unsigned MAXOPS  = N / 2 + 1;

  logic [W-1:0] row_a, row_b;

  always_comb begin
    logic        bits [W][N];
    logic        nbits[W][N];
    int unsigned ht   [W];
    int unsigned nht  [W];
    int unsigned d, used, total;
    logic        s, c;

    s     = 1'b0;
    c     = 1'b0;
    d     = 0;
    used  = 0;
    total = 0;
    row_a = '0;
    row_b = '0;
    for (int col = 0; col < W; col++) begin
      ht[col]  = 0;
      nht[col] = 0;
      for (int k = 0; k < N; k++) begin
        bits[col][k]  = 1'b0;
        nbits[col][k] = 1'b0;
      end
    end
    // Partial-product array.
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) begin
        bits[i+j][ht[i+j]] = x[i] & y[j];
        ht[i+j]++;
      end

    for (int stage = 0; stage < int'(NSTAGES); stage++) begin
      d     = dadda_height(NSTAGES - stage);
      nht   = '{default: 0};
      nbits = '{default: 1'b0};
      for (int col = 0; col < W; col++) begin
        used  = 0;
        total = ht[col] + nht[col];   // nht[col] holds carries from col-1
        for (int k = 0; k < int'(MAXOPS); k++) begin
          if (total > d) begin
            if (total - d >= 2 && ht[col] - used >= 3) begin
              {c, s} = bits[col][used] + bits[col][used+1] + bits[col][used+2];
              used  += 3;
              total -= 2;
            end else begin
              {c, s} = bits[col][used] + bits[col][used+1];
              used  += 2;
              total -= 1;
            end
            nbits[col][nht[col]] = s;
            nht[col]++;
            if (col + 1 < W) begin
              nbits[col+1][nht[col+1]] = c;
              nht[col+1]++;
            end
          end
        end
        for (int k = 0; k < N; k++)
          if (k >= used && k < ht[col]) begin
            nbits[col][nht[col]] = bits[col][k];
            nht[col]++;
          end
      end
      bits = nbits;
      ht   = nht;
    end

    for (int col = 0; col < W; col++) begin
      row_a[col] = (ht[col] > 0) ? bits[col][0] : 1'b0;
      row_b[col] = (ht[col] > 1) ? bits[col][1] : 1'b0;
    end
  end

  assign p = row_a + row_b;

endmodule
