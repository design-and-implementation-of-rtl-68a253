// tb_mdsp_dadda: self-checking testbench of the Dadda main multiplier.
// Drives all 2^24 operand pairs of the 12 x 12 multiplier when EXHAUSTIVE is
// set, otherwise corner values plus 200000 random pairs, and compares the
// product with one accumulated bit by bit by shift-and-add (independent of
// the multiply operator).  A watchdog stops the run if it hangs.
module tb_mdsp_dadda;
  localparam int unsigned N = 12;
  localparam bit EXHAUSTIVE = 1'b0;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  mdsp_dadda #(.N(N)) dut (.x(x), .y(y), .p(p));

  function automatic logic [2*N-1:0] ref_mul(logic [N-1:0] a, logic [N-1:0] b);
    logic [2*N-1:0] acc = '0;
    for (int i = 0; i < N; i++)
      if (b[i]) acc = acc + ({{N{1'b0}}, a} << i);
    return acc;
  endfunction

  task automatic check(logic [N-1:0] a, logic [N-1:0] b);
    x = a; y = b;
    #1;
    checks++;
    if (p !== ref_mul(a, b)) begin
      failures++;
      if (failures <= 10) $display("MISMATCH x=%0d y=%0d p=%0d exp=%0d", a, b, p, ref_mul(a, b));
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 1);
    check(1, '1);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) check(N'(1) << i, N'(1) << j);
    if (EXHAUSTIVE) begin
      for (int a = 0; a < (1 << N); a++)
        for (int b = 0; b < (1 << N); b++) check(N'(a), N'(b));
    end else begin
      for (int k = 0; k < 200000; k++) check(N'($urandom), N'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
