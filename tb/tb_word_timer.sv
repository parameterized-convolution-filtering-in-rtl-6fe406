// tb_word_timer: checks that the bit-time counter starts at slot 0 after reset, counts
// 0..WORD_W-1 and wraps, with `first` and `last` high in exactly slots 0 and WORD_W-1,
// for the default 16-bit word and for a 5-bit word.
module tb_word_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] slot;
  logic       first, last;
  logic [2:0] slot5;
  logic       first5, last5;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  word_timer dut (.clk, .rst_n, .slot, .first, .last);
  word_timer #(.WORD_W(5)) dut5 (.clk, .rst_n, .slot(slot5), .first(first5), .last(last5));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      check(slot == 4'(c % 16), $sformatf("slot %0d at cycle %0d", slot, c));
      check(first == (c % 16 == 0), "first");
      check(last == (c % 16 == 15), "last");
      check(slot5 == 3'(c % 5), $sformatf("slot5 %0d at cycle %0d", slot5, c));
      check(first5 == (c % 5 == 0) && last5 == (c % 5 == 4), "first5/last5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
