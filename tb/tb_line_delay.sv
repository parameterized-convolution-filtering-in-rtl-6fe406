// tb_line_delay: drives random bits, framed into 16-bit words by `first`, into the
// circular-buffer line delay at its default length (640-3 = 637 words) and at a short
// length of 5 words, and checks that once the buffer has filled every output bit is the
// input bit of exactly WORDS*16 clocks earlier. In the last part of the test the word
// framing is restarted at a different phase, and the delay must hold again after refill.
module tb_line_delay;
  localparam int W  = 16;
  localparam int N0 = 640 - 3;
  localparam int N1 = 5;
  localparam int D0 = N0 * W;
  localparam int D1 = N1 * W;
  localparam int CYCLES = 3 * D0;
  localparam int SHIFT_AT = 2 * D0 + 7;   // framing restarts 7 clocks into a word
  logic clk = 1'b0, rst_n = 1'b0;
  logic d = 1'b0, first = 1'b0, q0, q1;
  logic hist [$];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  line_delay dut0 (.clk, .rst_n, .first, .d, .q(q0));
  line_delay #(.WORDS(N1), .WORD_W(W)) dut1 (.clk, .rst_n, .first, .d, .q(q1));

  initial begin
    int phase;
    phase = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      if (c == SHIFT_AT) phase = 0;
      first = (phase == 0);
      phase = (phase + 1) % W;
      d = 1'($urandom);
      hist.push_back(d);
      @(posedge clk);
      #1;
      // after the edge of cycle c, q shows the bit that entered in cycle c+1-DELAY
      if (c + 1 >= D0 && (c < SHIFT_AT || c + 1 >= SHIFT_AT + D0)) begin
        checks++;
        if (q0 !== hist[c + 1 - D0]) begin
          failures++;
          if (failures < 10) $display("FAIL long delay cycle %0d", c);
        end
      end
      if (c + 1 >= D1 && (c < SHIFT_AT || c + 1 >= SHIFT_AT + D1)) begin
        checks++;
        if (q1 !== hist[c + 1 - D1]) begin
          failures++;
          if (failures < 10) $display("FAIL short delay cycle %0d", c);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * D0) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
