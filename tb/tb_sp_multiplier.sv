// tb_sp_multiplier: checks the stacked serial-parallel multiplier. For each of a set of
// coefficients (random and the corner values -128, -1, 0, 1, 127) loaded through the
// parallel bus, random 8-bit pixels, padded to 16-bit words, are fed lsb first on y. The
// 16-bit product must equal signed coefficient times unsigned pixel modulo 2^16, with
// bit k on p exactly one clock after bit k of the pixel was on y. Words follow each other
// without gaps, so leftover state between words is caught too.
module tb_sp_multiplier;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] x = '0, coef;
  logic       ldc = 1'b0, y = 1'b0, first = 1'b0, p;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  sp_multiplier dut (.clk, .rst_n, .x, .ldc, .y, .first, .p, .coef);

  initial begin
    int cv;
    logic [7:0]   pix;
    logic [W-1:0] got, expv;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      case (k)
        0: cv = -128;  1: cv = -1;  2: cv = 0;  3: cv = 1;  4: cv = 127;
        default: cv = int'($urandom_range(0, 255)) - 128;
      endcase
      @(negedge clk);
      x = 8'(cv); ldc = 1'b1; first = 1'b0; y = 1'b0;
      @(negedge clk);
      ldc = 1'b0;
      checks++;
      if (coef !== 8'(cv)) begin
        failures++;
        $display("FAIL coefficient register holds %h, loaded %h", coef, 8'(cv));
      end
      for (int w = 0; w < 12; w++) begin
        pix = 8'($urandom);
        if (w == 0) pix = 8'hff;
        if (w == 1) pix = 8'h00;
        expv = W'(cv * int'(pix));
        for (int b = 0; b < W; b++) begin
          first = (b == 0);
          y = (b < 8) ? pix[b] : 1'b0;
          @(posedge clk);
          #1 got[b] = p;
          @(negedge clk);
        end
        checks++;
        if (got !== expv) begin
          failures++;
          $display("FAIL %0d * %0d: got %h expected %h", cv, pix, got, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
