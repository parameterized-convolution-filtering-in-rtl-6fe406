// sp_multiplier: serial-parallel multiplier built by stacking COEF_W sp_mult_stage slices.
//
// The coefficient (two's complement, COEF_W bits) is loaded in parallel from the bus x
// when ldc is high and kept in the stages' register bits. The pixel arrives bit-serially
// on y, lsb first, as a WORD_W-bit word padded with zeros. Stage i holds coefficient bit
// i; the top stage holds the sign bit, each stage's p_out feeds p_in of the stage below,
// and the product leaves the bottom stage lsb first.
//
// Timing: bit k of the WORD_W-bit product (modulo 2^WORD_W) is on p one clock after the
// cycle in which bit k of the pixel word was on y. `first` marks bit 0 on y.
// Stacking and signal mapping follow the document; see sp_mult_stage for the signed
// handling, which is this design's own.
module sp_multiplier #(
  parameter int unsigned COEF_W = conv_pkg::COEF_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [COEF_W-1:0] x,
  input  logic              ldc,
  input  logic              y,
  input  logic              first,
  output logic              p,
  output logic [COEF_W-1:0] coef
);
  logic [COEF_W:0] chain;  // chain[i+1] is p_in of stage i

  assign chain[COEF_W] = 1'b0;

  for (genvar i = 0; i < COEF_W; i++) begin : g_stage
    sp_mult_stage #(.SIGN_STAGE(i == COEF_W - 1)) u_stage (
      .clk  (clk),
      .rst_n(rst_n),
      .x_i  (x[i]),
      .ldc  (ldc),
      .y    (y),
      .first(first),
      .p_in (chain[i+1]),
      .p_out(chain[i]),
      .c_bit(coef[i])
    );
  end

  assign p = chain[0];
endmodule
