// serial_adder: bit-serial adder of the accumulation chain.
//
// Adds the partial-sum stream arriving from the left (a) and the product stream from the
// multiplier above (b), both lsb first and aligned bit for bit. The sum bit s is
// combinational; the carry is held in a flip-flop for the next bit time and is forced to
// zero in the cycle where `first` marks bit 0 of a word, so that every word is summed
// modulo 2^WORD_W on its own. The result goes to a pixel_delay (or, at the end of the
// chain, to the result_register), which provides the register stage.
//
// The document says only that each adder computes the bit-serial sum of its two inputs;
// the single carry flip-flop is the simplest circuit that does that.
module serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic first,
  input  logic a,
  input  logic b,
  output logic s
);
  logic carry_q, cin;

  assign cin = first ? 1'b0 : carry_q;
  assign s   = a ^ b ^ cin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) carry_q <= 1'b0;
    else        carry_q <= (a & b) | (a & cin) | (b & cin);
  end
endmodule
