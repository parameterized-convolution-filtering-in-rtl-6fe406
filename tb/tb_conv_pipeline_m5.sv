// tb_conv_pipeline_m5: the same end-to-end test with the pipeline generated for a 5x5
// kernel on 24-pixel lines over twelve lines, which exercises the kernel-size parameter: 25 multipliers,
// four line delays of 19 pixel times each.
module tb_conv_pipeline_m5;
  bit          done;
  int unsigned checks, failures;

  conv_check #(.M(5), .L(24), .NLINES(12), .USE_DEFAULTS(1'b0)) u_check (
    .done, .checks, .failures
  );

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
