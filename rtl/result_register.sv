// result_register: collects the final serial sum and truncates it to an output pixel.
//
// The WORD_W-bit weighted sum leaves the last adder lsb first. A WORD_W-bit shift
// register gathers it (this is also the last one-pixel delay of the chain). In the bit
// time marked by `last` (the sum's top bit is on s_in) the complete word is registered
// on sum_out, and bits [FRAC_BITS+PIX_W-1:FRAC_BITS] of it on pix_out; valid is high for
// that one clock after. Because the chain starts from one half of an output step, this
// truncation rounds to nearest. There is no saturation: a sum outside 0..2^WORD_W-1
// wraps, as the document's truncation implies.
module result_register #(
  parameter int unsigned WORD_W    = conv_pkg::WORD_W,
  parameter int unsigned PIX_W     = conv_pkg::PIX_W,
  parameter int unsigned FRAC_BITS = conv_pkg::FRAC_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_in,
  input  logic              last,
  output logic [WORD_W-1:0] sum_out,
  output logic [PIX_W-1:0]  pix_out,
  output logic              valid
);
  logic [WORD_W-2:0] sr;
  logic [WORD_W-1:0] word;

  assign word = {s_in, sr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr      <= '0;
      sum_out <= '0;
      pix_out <= '0;
      valid   <= 1'b0;
    end else begin
      sr    <= word[WORD_W-1:1];
      valid <= last;
      if (last) begin
        sum_out <= word;
        pix_out <= word[FRAC_BITS +: PIX_W];
      end
    end
  end
endmodule
