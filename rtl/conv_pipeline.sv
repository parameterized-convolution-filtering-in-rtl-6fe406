// conv_pipeline: bit-serial KERNEL_M x KERNEL_M convolution filter for raster-scan images.
//
// Every input pixel is multiplied by all KERNEL_M^2 coefficients at once, one
// serial-parallel multiplier per coefficient, and the products are summed along a chain
// of bit-serial adders. Between adjacent adders of a row the partial sum waits one pixel
// time (pixel_delay); after the last adder of a row it waits one pixel time and then
// LINE_LEN-KERNEL_M further pixel times (line_delay). The delays line the pixels up so
// that coefficient C(r*M+c) weights the pixel in row r, column c of the window, counted
// from its top-left corner: C0 weights the oldest pixel, C(M*M-1) the newest. The chain
// starts from the constant one half of an output step, so that truncating the final sum
// to PIX_W bits rounds it. Each input pixel is read once, and one output pixel leaves per
// input pixel.
//
// Interface:
//   coef_x, ldc   coefficient bus and one load strobe per coefficient; coefficient j is
//                 loaded from coef_x in each cycle where ldc[j] is high. Load them before
//                 the image starts.
//   y, word_start the pixel stream: WORD_W bit times per pixel, bit 0 (lsb) in the cycle
//                 where word_start is high, PIX_W data bits, then zeros.
//   pix_out, sum_out, pix_valid  the result for the window whose newest pixel is pixel n
//                 is presented with pix_valid high in the second bit time of pixel n+1's
//                 word, i.e. WORD_W+1 clocks after bit 0 of pixel n was on y.
//   sum_serial    the final weighted sum as it leaves the last adder, lsb first.
// Output n is a valid filter result once (KERNEL_M-1)*LINE_LEN + KERNEL_M-1 pixels have
// entered before it; windows wrap around line ends as in any raster pipeline.
//
// The structure (multipliers, adder chain, one-pixel and line-minus-M delays, the initial
// one half, 8-bit pixels, 8-bit two's complement coefficients, 16-bit sums, 16 bit times
// per pixel) follows the document. The serial word timing, the fraction position and the
// interface are this design's choices.
module conv_pipeline #(
  parameter int unsigned KERNEL_M  = conv_pkg::KERNEL_M,
  parameter int unsigned LINE_LEN  = conv_pkg::LINE_LEN,
  parameter int unsigned PIX_W     = conv_pkg::PIX_W,
  parameter int unsigned COEF_W    = conv_pkg::COEF_W,
  parameter int unsigned WORD_W    = conv_pkg::WORD_W,
  parameter int unsigned FRAC_BITS = conv_pkg::FRAC_BITS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [COEF_W-1:0]            coef_x,
  input  logic [KERNEL_M*KERNEL_M-1:0] ldc,
  input  logic                         y,
  output logic                         word_start,
  output logic                         sum_serial,
  output logic [WORD_W-1:0]            sum_out,
  output logic [PIX_W-1:0]             pix_out,
  output logic                         pix_valid
);
  localparam int unsigned NTAP  = KERNEL_M * KERNEL_M;
  localparam int unsigned SW    = $clog2(WORD_W);
  localparam int unsigned LDLY  = LINE_LEN - KERNEL_M;  // line delay in pixel times
  localparam logic [SW-1:0] HALF_SLOT = SW'(FRAC_BITS - 1);

  // Word timing on the y line, and a copy delayed one clock to match the multipliers.
  logic [SW-1:0] slot_y, slot_p;
  logic          first_y, first_p, last_p, half_bit;

  word_timer #(.WORD_W(WORD_W)) u_timer (
    .clk(clk), .rst_n(rst_n), .slot(slot_y), .first(first_y), .last()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_p  <= SW'(WORD_W - 1);
      first_p <= 1'b0;
    end else begin
      slot_p  <= slot_y;
      first_p <= first_y;
    end
  end

  assign last_p     = (slot_p == SW'(WORD_W - 1));
  assign half_bit   = (slot_p == HALF_SLOT);   // the constant 1/2 as a serial word
  assign word_start = first_y;

  // Products, adder inputs from the left (acc_in) and adder outputs (acc_out).
  logic [NTAP-1:0] prod, acc_in, acc_out;
  logic [NTAP-1:0] dly_out;  // top bit unused: the last adder feeds result_register

  for (genvar j = 0; j < NTAP; j++) begin : g_tap
    sp_multiplier #(.COEF_W(COEF_W)) u_mul (
      .clk(clk), .rst_n(rst_n), .x(coef_x), .ldc(ldc[j]), .y(y), .first(first_y),
      .p(prod[j]), .coef()
    );

    serial_adder u_add (
      .clk(clk), .rst_n(rst_n), .first(first_p), .a(acc_in[j]), .b(prod[j]),
      .s(acc_out[j])
    );

    if (j == 0) begin : g_head
      assign acc_in[j] = half_bit;
    end

    if (j < NTAP - 1) begin : g_delay
      pixel_delay #(.WORD_W(WORD_W)) u_pix (
        .clk(clk), .rst_n(rst_n), .d(acc_out[j]), .q(dly_out[j])
      );
      if ((j % KERNEL_M) == KERNEL_M - 1) begin : g_row_end
        line_delay #(.WORDS(LDLY), .WORD_W(WORD_W)) u_line (
          .clk(clk), .rst_n(rst_n), .first(first_p), .d(dly_out[j]), .q(acc_in[j+1])
        );
      end else begin : g_in_row
        assign acc_in[j+1] = dly_out[j];
      end
    end else begin : g_last
      assign dly_out[j] = 1'b0;
    end
  end

  assign sum_serial = acc_out[NTAP-1];

  result_register #(.WORD_W(WORD_W), .PIX_W(PIX_W), .FRAC_BITS(FRAC_BITS)) u_out (
    .clk(clk), .rst_n(rst_n), .s_in(acc_out[NTAP-1]), .last(last_p),
    .sum_out(sum_out), .pix_out(pix_out), .valid(pix_valid)
  );
endmodule
