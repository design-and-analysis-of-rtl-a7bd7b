// tb_mac_accumulator: self-checking testbench of the accumulator register.
//
// Drives random sums and carries with reset_low mostly high and sometimes
// low, and checks after every rising edge that the register holds the
// value and carry presented before the edge, or zero when reset_low was
// low. This also checks the one-cycle latency from sum to acc. A watchdog
// ends a run that hangs with a failure.
module tb_mac_accumulator;

  localparam int unsigned W = 64;

  logic         clk = 1'b0;
  logic         reset_low;
  logic [W-1:0] sum, acc, exp_acc;
  logic         sum_carry, carry, exp_carry;
  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int resets = 0;

  mac_accumulator dut (
    .clk (clk), .reset_low (reset_low), .sum (sum), .sum_carry (sum_carry),
    .acc (acc), .carry (carry)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 100_000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end

  initial begin
    reset_low = 1'b0;
    sum       = {$urandom, $urandom};
    sum_carry = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (acc !== exp_acc || carry !== exp_carry) begin
          failures++;
          if (failures <= 10)
            $display("FAIL step %0d: acc %h carry %0d, expected %h %0d",
                     i, acc, carry, exp_acc, exp_carry);
        end
      end
      reset_low = (i < 2) ? 1'b0 : ($urandom_range(0, 9) != 0);
      sum       = {$urandom, $urandom};
      sum_carry = 1'($urandom);
      exp_acc   = reset_low ? sum : '0;
      exp_carry = reset_low ? sum_carry : 1'b0;
      if (!reset_low) resets++;
    end
    if (resets == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
