// tb_sp_mult_stage: checks one multiplier bit-slice on its own, as an arithmetic unit.
// Fed with a serial word Y on y and a serial word P on p_in (both lsb first, 16 bits,
// word start marked by `first`), a stage holding coefficient bit c must emit, one clock
// later, P + c*Y modulo 2^16 on p_out, and the sign-bit stage P - c*Y. Both kinds of
// stage are tested with random words and both coefficient values, loaded through ldc.
// In a word's first bit time the stage must ignore p_in (in a stack it still carries the
// previous word), so P is taken with its bit 0 cleared while p_in is driven randomly.
module tb_sp_mult_stage;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic x_i = 1'b0, ldc = 1'b0, y = 1'b0, first = 1'b0, p_in = 1'b0;
  logic p_out_u, p_out_s, c_u, c_s;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  sp_mult_stage #(.SIGN_STAGE(1'b0)) dut_u (
    .clk, .rst_n, .x_i, .ldc, .y, .first, .p_in, .p_out(p_out_u), .c_bit(c_u)
  );
  sp_mult_stage #(.SIGN_STAGE(1'b1)) dut_s (
    .clk, .rst_n, .x_i, .ldc, .y, .first, .p_in, .p_out(p_out_s), .c_bit(c_s)
  );

  initial begin
    logic [W-1:0] yw, pw, got_u, got_s, exp_u, exp_s;
    bit cval;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      // load a new coefficient bit every 8 words
      if (w % 8 == 0) begin
        cval = (w / 8) % 2 == 1;
        @(negedge clk);
        x_i = cval; ldc = 1'b1;
        @(negedge clk);
        ldc = 1'b0;
        checks++;
        if (c_u !== cval || c_s !== cval) begin
          failures++;
          $display("FAIL coefficient bit not loaded");
        end
        // one idle word so the load does not disturb a checked product
        for (int b = 0; b < W; b++) begin
          first = (b == 0); y = 1'b0; p_in = 1'b0;
          @(negedge clk);
        end
      end
      yw = W'($urandom);
      pw = W'($urandom);
      if (w % 5 == 0) yw = '1;
      exp_u = {pw[W-1:1], 1'b0} + (cval ? yw : '0);
      exp_s = {pw[W-1:1], 1'b0} - (cval ? yw : '0);
      for (int b = 0; b < W; b++) begin
        first = (b == 0); y = yw[b]; p_in = pw[b];
        @(posedge clk);
        #1;
        // p_out now shows bit b of the current word
        got_u[b] = p_out_u;
        got_s[b] = p_out_s;
        @(negedge clk);
      end
      checks += 2;
      if (got_u !== exp_u) begin
        failures++;
        $display("FAIL plain stage c=%0d Y=%h P=%h: got %h expected %h", cval, yw, pw, got_u, exp_u);
      end
      if (got_s !== exp_s) begin
        failures++;
        $display("FAIL sign stage c=%0d Y=%h P=%h: got %h expected %h", cval, yw, pw, got_s, exp_s);
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
