// tb_vedic_mul32: self-checking testbench of the 32x32 Vedic multiplier.
//
// Applies corner operands (0, 1, all ones, single bits) and 20000 random pairs, and compares
// each product with the simulator's own multiplication of the operands
// widened to 64 bits. A watchdog ends the run with a failure if it has
// not finished in time.
module tb_vedic_mul32;

  localparam int unsigned N = 32;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] q;
  int checks = 0;
  int failures = 0;

  vedic_mul32 dut (.a(a), .b(b), .q(q));

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] expected;
    a = x;
    b = y;
    #1;
    expected = (2*N)'(x) * (2*N)'(y);
    checks++;
    if (q !== expected) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %0d x %0d: got %0d expected %0d", x, y, q, expected);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      apply(N'(1) << k, '1);
      apply('1, N'(1) << k);
    end
    apply('0, '0); apply('1, '1); apply('1, '0); apply(N'(1), '1);
    for (int i = 0; i < 20000; i++) begin
      apply(N'({$urandom, $urandom}), N'({$urandom, $urandom}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
