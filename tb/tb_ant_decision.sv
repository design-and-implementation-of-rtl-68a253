// tb_ant_decision: self-checking testbench of the ANT error detector.
// Drives random ya/yr pairs and pairs placed exactly at the threshold
// (difference TH and TH+1, both signs), and checks the selected value and
// flag against a reference computed with integer arithmetic.
module tb_ant_decision;
  localparam int WA = 24, WR = 6, SHIFT = 18;
  localparam longint TH = 455553;

  logic [WA-1:0] ya, y;
  logic [WR-1:0] yr;
  logic          use_rpr;
  int checks = 0, failures = 0, n_sel = 0, n_keep = 0;

  ant_decision #(.WA(WA), .WR(WR), .SHIFT(SHIFT), .TH(32'(TH))) dut (
    .ya(ya), .yr(yr), .y(y), .use_rpr(use_rpr));

  task automatic drive(longint a, int r);
    longint al, d;
    bit exp_sel;
    ya = WA'(a); yr = WR'(r);
    #1;
    al = longint'(r) << SHIFT;
    d  = a - al;
    if (d < 0) d = -d;
    exp_sel = (d > TH);
    checks++;
    if (use_rpr != exp_sel || longint'(y) != (exp_sel ? al : a)) begin
      failures++;
      if (failures <= 10) $display("MISMATCH ya=%0d yr=%0d y=%0d sel=%0b", a, r, y, use_rpr);
    end
    if (exp_sel) n_sel++; else n_keep++;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < (1 << WR); r++) begin
      longint base;
      base = longint'(r) << SHIFT;
      if (base + TH < (1 << WA))      drive(base + TH, r);
      if (base + TH + 1 < (1 << WA))  drive(base + TH + 1, r);
      if (base - TH >= 0)             drive(base - TH, r);
      if (base - TH - 1 >= 0)         drive(base - TH - 1, r);
      drive(base, r);
    end
    for (int k = 0; k < 100000; k++) drive(longint'($urandom) & ((1 << WA) - 1), int'($urandom) & ((1 << WR) - 1));
    checks++;
    if (n_sel == 0 || n_keep == 0) failures++;
    $display("selected RPR %0d times, kept MDSP %0d times", n_sel, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
