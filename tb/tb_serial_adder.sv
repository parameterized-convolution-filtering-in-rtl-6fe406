// tb_serial_adder: feeds back-to-back pairs of random 16-bit words lsb first and checks
// that the serial output, in the same clock as its inputs, spells a + b modulo 2^16 for
// every word, i.e. that the carry propagates inside a word and is dropped between words.
module tb_serial_adder;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic first = 1'b0, a = 1'b0, b = 1'b0, s;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_adder dut (.clk, .rst_n, .first, .a, .b, .s);

  initial begin
    logic [W-1:0] aw, bw, got;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 300; w++) begin
      aw = W'($urandom);
      bw = W'($urandom);
      if (w % 4 == 0) begin aw = '1; bw = W'(1); end  // carry through all bits and out
      for (int k = 0; k < W; k++) begin
        @(negedge clk);
        first = (k == 0); a = aw[k]; b = bw[k];
        #1 got[k] = s;
      end
      checks++;
      if (got !== W'(aw + bw)) begin
        failures++;
        $display("FAIL %h + %h: got %h", aw, bw, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
