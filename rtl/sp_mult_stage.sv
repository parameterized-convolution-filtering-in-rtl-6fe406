// sp_mult_stage: one bit-slice of the serial-parallel carry-save multiplier.
//
// The stage holds one bit of the coefficient register (loaded from x_i when ldc is high)
// and a full adder with two flip-flops: a carry that feeds back into the same stage and a
// sum that is passed down to the next lower stage on p_out. In every bit time the stage
// adds (coefficient bit AND serial bit y), the sum arriving from the stage above on p_in
// and its own carry. Because the sum moves down one stage per clock while y advances one
// bit weight per clock, all terms of equal weight meet in the same adder, and the bottom
// stage emits the product one bit per clock, lsb first, one clock after the y bit.
//
// Two's complement coefficient: the stage that holds the coefficient's sign bit
// (SIGN_STAGE=1) adds the inverted partial product bit and starts each word with a carry
// of one. Over a word this subtracts y*2^i modulo 2^WORD_W, the weight the sign bit has.
// In the cycle where `first` is high (bit 0 of a new word on y), p_in and the carry are
// ignored, so nothing of the previous product leaks into the next one.
//
// The document gives the stage's structure (coefficient register with load multiplexer,
// AND of coefficient and serial operand, full adder, carry and sum flip-flops, P.in/P.out
// chain). The sign-bit handling and the per-word clearing are this design's own choices.
module sp_mult_stage #(
  parameter bit SIGN_STAGE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x_i,    // coefficient bus bit
  input  logic ldc,    // load enable of the coefficient register
  input  logic y,      // serial operand, common to all stages
  input  logic first,  // bit 0 of a word is on y in this cycle
  input  logic p_in,   // partial sum from the stage above
  output logic p_out,  // partial sum to the stage below
  output logic c_bit   // stored coefficient bit
);
  logic pp, pin_eff, cin_eff, carry_q, sum_q, sum_d, carry_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   c_bit <= 1'b0;
    else if (ldc) c_bit <= x_i;
  end

  always_comb begin
    pp      = (c_bit & y) ^ SIGN_STAGE;
    pin_eff = first ? 1'b0 : p_in;
    cin_eff = first ? SIGN_STAGE : carry_q;
    sum_d   = pp ^ pin_eff ^ cin_eff;
    carry_d = (pp & pin_eff) | (pp & cin_eff) | (pin_eff & cin_eff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q <= 1'b0;
      sum_q   <= 1'b0;
    end else begin
      carry_q <= carry_d;
      sum_q   <= sum_d;
    end
  end

  assign p_out = sum_q;
endmodule
