// tb_conv_pipeline: end-to-end test of the convolution pipeline at its default size
// (3x3 kernel, 640-pixel lines, 8-bit pixels and coefficients, 16 bit times per pixel).
// Seven image lines are filtered with two coefficient sets; see conv_check for what is
// checked.
module tb_conv_pipeline;
  bit          done;
  int unsigned checks, failures;

  conv_check #(.M(3), .L(640), .NLINES(7), .USE_DEFAULTS(1'b1)) u_check (
    .done, .checks, .failures
  );

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
