// tb_fw_rpr: self-checking testbench of the fixed-width replica.
// Runs all 2^12 input pairs of the 6-bit replica.  The expected value is
// built from the partial-product definitions: the kept terms (i + j >= 6),
// the ICV (i + j = 5) counted with unit weight at column 6, except that its
// last term x[0]y[5] is ORed with "ICV all zero and MICV (i + j = 4) not all
// zero".  It also checks the error bound |xh*yh - yr*2^6| < 2^8, counts how
// often each compensation case (ICV used, OR condition used) occurs, and
// confirms the ANT threshold: for 12-bit operands X = xh*2^6 + xl, the
// largest |X*Y - yr*2^18| over all inputs must equal TH = 455553.  X*Y grows
// with the low bits xl, yl, so for each (xh, yh) the extremes lie at
// xl, yl in {0, 63}; four corners per replica input cover all 2^24 pairs.
module tb_fw_rpr;
  localparam int H = 6;

  logic [H-1:0] xh, yh, yr;
  int checks = 0, failures = 0;
  int n_icv = 0, n_cond = 0;
  longint max_dev = 0;
  localparam longint TH = 455553;

  fw_rpr #(.H(H)) dut (.xh(xh), .yh(yh), .yr(yr));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << H); a++)
      for (int b = 0; b < (1 << H); b++) begin
        int kept, beta, alpha, exp_v, diff;
        bit last;
        kept = 0; beta = 0; alpha = 0;
        for (int i = 0; i < H; i++)
          for (int j = 0; j < H; j++)
            if ((((a >> i) & 1) != 0) && (((b >> j) & 1) != 0)) begin
              if (i + j >= H)        kept += (1 << (i + j));
              else if (i + j == H-1) beta++;
              else if (i + j == H-2) alpha++;
            end
        last  = ((a & 1) != 0) && (((b >> (H-1)) & 1) != 0);
        exp_v = (kept >> H) + (beta - int'(last)) + int'(last || (beta == 0 && alpha != 0));
        if (beta != 0) n_icv++;
        if (beta == 0 && alpha != 0) n_cond++;
        xh = H'(a); yh = H'(b);
        #1;
        checks++;
        if (int'(yr) != exp_v) begin
          failures++;
          if (failures <= 10) $display("MISMATCH xh=%0d yh=%0d yr=%0d exp=%0d", a, b, yr, exp_v);
        end
        for (int c = 0; c < 4; c++) begin
          longint xf, yf, dev;
          xf  = (longint'(a) << H) + ((c & 1) != 0 ? (1 << H) - 1 : 0);
          yf  = (longint'(b) << H) + ((c & 2) != 0 ? (1 << H) - 1 : 0);
          dev = xf * yf - (longint'(yr) << (3 * H));
          if (dev < 0) dev = -dev;
          if (dev > max_dev) max_dev = dev;
        end
        diff = a * b - (int'(yr) << H);
        checks++;
        if (diff >= (1 << (H + 2)) || diff <= -(1 << (H + 2))) begin
          failures++;
          $display("ERROR BOUND xh=%0d yh=%0d yr=%0d", a, b, yr);
        end
      end
    checks++;
    if (n_icv == 0 || n_cond == 0) failures++;
    checks++;
    if (max_dev != TH) begin
      failures++;
      $display("threshold mismatch: max deviation %0d, TH %0d", max_dev, TH);
    end
    $display("cases: ICV nonzero=%0d, OR condition=%0d", n_icv, n_cond);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
