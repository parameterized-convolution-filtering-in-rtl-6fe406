// conv_pkg: widths and number formats shared by the bit-serial convolution pipeline.
//
// A pixel is an unsigned PIX_W-bit value. A coefficient is a COEF_W-bit two's complement
// number read as a fraction of 2**FRAC_BITS. Every pixel travels through the pipeline as
// a WORD_W-bit serial word, least significant bit first: PIX_W data bits followed by
// WORD_W-PIX_W zero bits, so that one product or partial sum fits exactly in one word
// time. The 8/8/16 widths follow the document; the fraction position (8 bits, so the
// output pixel is bits [15:8] of the sum) is this design's choice.
package conv_pkg;
  localparam int unsigned PIX_W     = 8;   // pixel width
  localparam int unsigned COEF_W    = 8;   // coefficient width, two's complement
  localparam int unsigned WORD_W    = 16;  // bit times per pixel and width of a partial sum
  localparam int unsigned FRAC_BITS = 8;   // fraction bits of coefficient and sum
  localparam int unsigned KERNEL_M  = 3;   // filter is KERNEL_M x KERNEL_M
  localparam int unsigned LINE_LEN  = 640; // pixels per image line
endpackage
