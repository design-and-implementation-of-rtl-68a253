// tb_ant_multiplier: end-to-end testbench of the 12 x 12 ANT multiplier at
// its default parameters.
//
// Operands are applied on the falling clock edge and the registered result
// is checked one rising edge later (one cycle of latency).  The expected
// value comes from a reference model written here: exact product, the 6-bit
// fixed-width replica computed from its partial-product definition, and the
// threshold rule.  Voltage-overscaling soft errors of the main multiplier are
// emulated by forcing its output (u_dut.ya) to a value with one or more bits
// flipped on some cycles.  The test counts, and requires at least once:
// reset, a cycle without error, an emulated soft error corrected by the
// replica, a soft error small enough to be kept, an ICV-compensated replica
// result, and a replica result that used the conditional OR term.  Whatever
// the emulated error, a replaced output must lie within TH of the exact
// product and a kept one within 2*TH.
module tb_ant_multiplier;
  localparam int     N     = 12;
  localparam int     H     = N / 2;
  localparam longint TH = 455553;
  localparam int     NVEC  = 300000;

  logic           clk = 1'b0;
  logic           rst_n;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  logic           corrected;
  logic [2*N-1:0] ya_err;

  int checks = 0, failures = 0;
  int n_reset = 0, n_clean = 0, n_fixed = 0, n_kept_err = 0, n_icv = 0, n_or = 0;

  ant_multiplier dut (
    .clk (clk), .rst_n (rst_n), .x (x), .y (y), .p (p), .corrected (corrected));

  always #5 clk = ~clk;

  // Replica reference: kept terms of weight >= 2^H, ICV terms with unit
  // weight, last ICV term ORed with (ICV == 0 && MICV != 0).
  function automatic int rpr_ref(int a, int b, output bit icv_used, output bit or_used);
    int kept = 0, beta = 0, alpha = 0;
    bit last;
    for (int i = 0; i < H; i++)
      for (int j = 0; j < H; j++)
        if ((((a >> i) & 1) != 0) && (((b >> j) & 1) != 0)) begin
          if (i + j >= H)          kept += 1 << (i + j);
          else if (i + j == H - 1) beta++;
          else if (i + j == H - 2) alpha++;
        end
    last     = ((a & 1) != 0) && (((b >> (H - 1)) & 1) != 0);
    icv_used = (beta != 0);
    or_used  = (beta == 0) && (alpha != 0);
    return (kept >> H) + beta - int'(last) + int'(last || or_used);
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    x = '0; y = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++; n_reset++;
    if (p !== '0 || corrected !== 1'b0) begin
      failures++;
      $display("reset did not clear the output");
    end
    @(negedge clk);
    rst_n = 1'b1;

    for (int v = 0; v < NVEC; v++) begin
      int a, b, r;
      longint exact, ya_v, al, d, exp_p;
      bit inject, icv_used, or_used, exp_sel;
      a = int'($urandom_range(0, (1 << N) - 1));
      b = int'($urandom_range(0, (1 << N) - 1));
      if (v < 4) begin a = (1 << N) - 1; b = (v < 2) ? (1 << N) - 1 : 0; end
      exact  = longint'(a) * longint'(b);
      inject = (v % 4 == 3);
      ya_v   = exact;
      if (inject) begin
        // Flip one random bit of the product, or two high bits.
        if ($urandom_range(0, 1) == 0)
          ya_v = exact ^ (longint'(1) << $urandom_range(0, 2 * N - 1));
        else
          ya_v = exact ^ (longint'(3) << $urandom_range(2 * N - 6, 2 * N - 2));
        ya_v &= (longint'(1) << (2 * N)) - 1;
      end
      r     = rpr_ref(a >> H, b >> H, icv_used, or_used);
      al    = longint'(r) << (3 * H);
      d     = ya_v - al;
      if (d < 0) d = -d;
      exp_sel = (d > TH);
      exp_p   = exp_sel ? al : ya_v;

      // Apply on the falling edge; check after the next rising edge.
      @(negedge clk);
      x = N'(a); y = N'(b);
      if (inject) begin
        ya_err = (2 * N)'(ya_v);
        force dut.ya = ya_err;
      end
      @(posedge clk);
      #1;
      if (inject) release dut.ya;
      checks++;
      if (longint'(p) != exp_p || corrected != exp_sel) begin
        failures++;
        if (failures <= 10)
          $display("MISMATCH x=%0d y=%0d inj=%0b p=%0d exp=%0d corr=%0b", a, b, inject, p, exp_p, corrected);
      end
      d = longint'(p) - exact;
      if (d < 0) d = -d;
      // A replaced result is within TH of the exact product; a kept one,
      // being within TH of the replica, is within 2*TH of it.
      checks++;
      if (d > (corrected ? TH : 2 * TH)) begin
        failures++;
        $display("OUTPUT TOO FAR x=%0d y=%0d p=%0d", a, b, p);
      end
      if (!inject) n_clean++;
      if (inject && exp_sel && ya_v != exact) n_fixed++;
      if (inject && !exp_sel && ya_v != exact) n_kept_err++;
      if (icv_used) n_icv++;
      if (or_used)  n_or++;
      // An error-free MDSP result must never be replaced.
      if (!inject) begin
        checks++;
        if (corrected) failures++;
      end
    end

    // Latency: a new operand appears exactly one rising edge later.
    @(negedge clk);
    x = N'(100); y = N'(200);
    @(posedge clk);
    #1;
    checks++;
    if (p != 24'd20000) begin failures++; $display("latency check failed"); end

    $display("mechanisms: reset=%0d clean=%0d soft_error_corrected=%0d small_error_kept=%0d icv=%0d or_term=%0d",
             n_reset, n_clean, n_fixed, n_kept_err, n_icv, n_or);
    checks += 6;
    if (n_reset == 0)    failures++;
    if (n_clean == 0)    failures++;
    if (n_fixed == 0)    failures++;
    if (n_kept_err == 0) failures++;
    if (n_icv == 0)      failures++;
    if (n_or == 0)       failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
