// tb_conv_frame_vga: filters one complete 640x480 video frame through the pipeline at
// its default size (3x3 kernel, 640-pixel lines), 307200 pixels at one pixel per 16
// clocks, with the checks of conv_check on every output whose window lies in the frame.
module tb_conv_frame_vga;
  bit          done;
  int unsigned checks, failures;

  conv_check #(.M(3), .L(640), .NLINES(480), .USE_DEFAULTS(1'b1)) u_check (
    .done, .checks, .failures
  );

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
