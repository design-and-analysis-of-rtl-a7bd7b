// tb_cla_adder: self-checking testbench of the carry lookahead adder.
//
// Runs the adder at its default 64-bit width (the accumulation adder), at
// the widths the multiplier stages use (4, 6, 8, 12, 16, 24, 32, 48) and
// at 4, 8, 16 and 24 bits, the sizes at which adders are usually compared.
// Every instance sees the same stimulus, cut to its width: corner pairs
// that ripple a carry through the whole word (all ones plus one, etc.) and
// random pairs with random carry in. Sum and carry out are compared with
// the simulator's addition widened by one bit. A watchdog ends a run that
// hangs with a failure.
module tb_cla_adder;

  localparam int NW = 9;
  localparam int unsigned WIDTHS [NW] = '{64, 48, 32, 24, 16, 12, 8, 6, 4};

  logic [63:0] a, b;
  logic        cin;
  logic [63:0] sum  [NW];
  logic        cout [NW];
  int checks = 0;
  int failures = 0;

  // default-parameter instance: the 64-bit accumulation adder
  cla_adder dut64 (.a(a), .b(b), .cin(cin), .sum(sum[0]), .cout(cout[0]));

  for (genvar i = 1; i < NW; i++) begin : g_w
    localparam int unsigned W = WIDTHS[i];
    logic [W-1:0] s;
    cla_adder #(.WIDTH(W)) dut (
      .a (a[W-1:0]), .b (b[W-1:0]), .cin (cin), .sum (s), .cout (cout[i])
    );
    assign sum[i] = 64'(s);
  end

  task automatic apply(input logic [63:0] x, input logic [63:0] y, input logic ci);
    logic [64:0] full;
    logic [63:0] mask;
    a   = x;
    b   = y;
    cin = ci;
    #1;
    for (int i = 0; i < NW; i++) begin
      mask = (WIDTHS[i] == 64) ? '1 : ((64'd1 << WIDTHS[i]) - 64'd1);
      full = 65'(x & mask) + 65'(y & mask) + 65'(ci);
      checks++;
      if (sum[i] !== (full[63:0] & mask) || cout[i] !== full[WIDTHS[i]]) begin
        failures++;
        if (failures <= 10)
          $display("FAIL width %0d: %h + %h + %0d gave %h carry %0d",
                   WIDTHS[i], x & mask, y & mask, ci, sum[i], cout[i]);
      end
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
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);
    apply('1, 64'd1, 1'b0);
    apply('1, '1, 1'b1);
    apply(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    for (int k = 0; k < 64; k++) begin
      apply(~(64'd1 << k), 64'd1 << k, 1'b1);   // carry from cin to the top
      apply(64'd1 << k, 64'd1 << k, 1'b0);
    end
    for (int i = 0; i < 20000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
