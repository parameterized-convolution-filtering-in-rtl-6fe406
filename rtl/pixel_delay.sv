// pixel_delay: the one-pixel delay between adjacent adders of the chain.
//
// A WORD_W-stage shift register: the serial partial sum leaves WORD_W clocks (one pixel
// time) after it entered, so that it meets the next adder together with the product of
// the next pixel. The contents reset to zero. The delay of one pixel is the document's;
// the shift register is the simplest way to build it.
module pixel_delay #(
  parameter int unsigned WORD_W = conv_pkg::WORD_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic [WORD_W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[WORD_W-2:0], d};
  end

  assign q = sr[WORD_W-1];
endmodule
