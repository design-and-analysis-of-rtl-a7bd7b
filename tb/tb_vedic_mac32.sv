// tb_vedic_mac32: end-to-end testbench of the 32x32 multiply-accumulate unit
// at its default configuration.
//
// A reference model keeps its own 65-bit running sum of operand products,
// computed with the simulator's multiplication and addition. The stimulus
// runs as phases: reset, random operands, runs of all-ones operands (whose
// products push the 64-bit sum past 2^64 every other cycle, so the carry
// output fires), small operands, and resets in the middle of a run. After
// every rising edge the unit's result and carry must equal the model's,
// which checks the one-cycle latency and the rate of one product per clock.
// The test counts how often each mechanism happened (reset clear, plain
// accumulation, accumulation with carry out) and fails if any never did. A
// watchdog ends a run that hangs with a failure.
module tb_vedic_mac32;

  import vedic_mac_pkg::*;

  logic     clk = 1'b0;
  logic     reset_low;
  operand_t operand_1, operand_2;
  acc_t     result;
  logic     carry;

  acc_t model_acc;
  logic model_carry;
  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int n_reset = 0;
  int n_accum = 0;
  int n_carry = 0;

  vedic_mac32 dut (
    .clk (clk), .reset_low (reset_low),
    .operand_1 (operand_1), .operand_2 (operand_2),
    .result (result), .carry (carry)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 200_000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end

  // present one set of inputs, let the edge take them, check the outputs
  task automatic step(input logic rst_n, input operand_t x, input operand_t y);
    logic [ACC_W:0] next;
    @(negedge clk);
    reset_low = rst_n;
    operand_1 = x;
    operand_2 = y;
    if (!rst_n) begin
      model_acc   = '0;
      model_carry = 1'b0;
      n_reset++;
    end else begin
      next        = (ACC_W+1)'(model_acc) + (ACC_W+1)'(ACC_W'(x) * ACC_W'(y));
      model_acc   = next[ACC_W-1:0];
      model_carry = next[ACC_W];
      if (model_carry) n_carry++;
      else             n_accum++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (result !== model_acc || carry !== model_carry) begin
      failures++;
      if (failures <= 10)
        $display("FAIL cycle %0d: result %h carry %0d, expected %h %0d",
                 cycles, result, carry, model_acc, model_carry);
    end
  endtask

  initial begin
    reset_low = 1'b0;
    operand_1 = '1;
    operand_2 = '1;
    repeat (3) step(1'b0, '1, '1);
    // a few products small enough to follow by hand: 3*5 + 7*11 = 92
    step(1'b1, 32'd3, 32'd5);
    step(1'b1, 32'd7, 32'd11);
    if (result != 64'd92) begin
      failures++;
      $display("FAIL small sum %0d", result);
    end
    checks++;
    for (int phase = 0; phase < 20; phase++) begin
      for (int i = 0; i < 200; i++)
        step(1'b1, $urandom, $urandom);
      for (int i = 0; i < 10; i++)
        step(1'b1, '1, '1);
      for (int i = 0; i < 20; i++)
        step(1'b1, $urandom_range(0, 255), $urandom_range(0, 255));
      step(1'b0, $urandom, $urandom);   // clear in the middle of a run
    end
    $display("mechanisms: reset clears=%0d accumulations=%0d carry outs=%0d",
             n_reset, n_accum, n_carry);
    if (n_reset == 0) begin failures++; $display("FAIL no reset clear"); end
    if (n_accum == 0) begin failures++; $display("FAIL no accumulation"); end
    if (n_carry == 0) begin failures++; $display("FAIL no carry out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
