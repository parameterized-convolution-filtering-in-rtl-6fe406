// tb_conv_copier_page: the pipeline generated for 3000-pixel lines filters a complete
// 3000x4000 page, the size a copier or printer scans, with the checks of conv_check on
// every output whose window lies on the page (12 million pixels, 192 million clocks).
module tb_conv_copier_page;
  bit          done;
  int unsigned checks, failures;

  conv_check #(.M(3), .L(3000), .NLINES(4000), .USE_DEFAULTS(1'b0)) u_check (
    .done, .checks, .failures
  );

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
