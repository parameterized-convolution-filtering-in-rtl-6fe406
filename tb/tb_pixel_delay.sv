// tb_pixel_delay: drives a random bit stream into the one-pixel delay and checks that
// every output bit equals the input bit exactly 16 clocks earlier (zero before that).
module tb_pixel_delay;
  logic clk = 1'b0, rst_n = 1'b0;
  logic d = 1'b0, q;
  logic hist [$];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  pixel_delay dut (.clk, .rst_n, .d, .q);

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 500; c++) begin
      d = 1'($urandom);
      hist.push_back(d);
      @(posedge clk);
      #1;
      checks++;
      if (q !== ((c >= 15) ? hist[c - 15] : 1'b0)) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d", c, q);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
