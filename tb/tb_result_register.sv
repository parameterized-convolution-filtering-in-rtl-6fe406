// tb_result_register: streams random 16-bit sums lsb first with `last` on the top bit and
// checks that, one clock after each word, valid is high, sum_out holds the whole word and
// pix_out its bits [15:8], and that valid is low in every other clock.
module tb_result_register;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_in = 1'b0, last = 1'b0, valid;
  logic [W-1:0] sum_out;
  logic [7:0]   pix_out;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  result_register dut (.clk, .rst_n, .s_in, .last, .sum_out, .pix_out, .valid);

  initial begin
    logic [W-1:0] word, prev;
    bit have_prev = 1'b0;
    prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      word = W'($urandom);
      for (int k = 0; k < W; k++) begin
        @(negedge clk);
        checks++;
        if (valid !== (have_prev && k == 0)) begin
          failures++;
          $display("FAIL valid=%0d in bit time %0d", valid, k);
        end
        if (have_prev && k == 0) begin
          checks += 2;
          if (sum_out !== prev) begin
            failures++;
            $display("FAIL sum_out %h expected %h", sum_out, prev);
          end
          if (pix_out !== prev[15:8]) begin
            failures++;
            $display("FAIL pix_out %h expected %h", pix_out, prev[15:8]);
          end
        end
        s_in = word[k];
        last = (k == W - 1);
      end
      prev = word;
      have_prev = 1'b1;
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
