// mac_accumulator: the accumulator register of the multiply-accumulate unit.
//
// On each rising clock edge it stores the sum coming from the accumulation
// adder and that addition's carry out. While reset_low is low it clears both
// instead. Its stored value feeds back to the adder and is the unit's Result;
// the stored carry is the unit's Carry.
//
// Interface: clk, reset_low (active low, synchronous), sum/sum_carry in;
// acc/carry out, valid from the edge after the sum was presented.
// The 64-bit width and the active-low reset pin follow the published unit.
// The clock, the synchronous reset and the registered carry are this
// design's choices.
module mac_accumulator #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             reset_low,
  input  logic [WIDTH-1:0] sum,
  input  logic             sum_carry,
  output logic [WIDTH-1:0] acc,
  output logic             carry
);

  always_ff @(posedge clk) begin
    if (!reset_low) begin
      acc   <= '0;
      carry <= 1'b0;
    end else begin
      acc   <= sum;
      carry <= sum_carry;
    end
  end

endmodule
