// conv_check: end-to-end test harness for conv_pipeline, shared by the top-level
// testbenches (they differ only in the kernel size and line length they pass in).
//
// It streams NLINES lines of random pixels through the pipeline, one pixel per WORD_W
// clocks, and compares every output whose window lies inside the image with a reference
// computed here from the pixel and coefficient arrays: 2^(FRAC_BITS-1) plus the sum of
// coefficient times pixel over the window, modulo 2^WORD_W, and its PIX_W-bit truncation.
// Two coefficient sets are used: set A is loaded in word 0 and set B in word RELOAD, both
// while the pixel on the serial line is zero, so that the change cannot disturb a
// product. It also checks that outputs come exactly one per WORD_W clocks and counts how
// often each mechanism happened: coefficient loads, windows that mix rows through the
// line delays, negative coefficient products, round-up by the initial one half, windows
// computed with each coefficient set, and sums that wrapped; one that never happened is a
// failure. When USE_DEFAULTS is set the pipeline is instantiated with its own defaults.
// The harness raises `done` at the end (or when its watchdog fires); the testbench that
// instantiates it prints the result and ends the simulation.
module conv_check #(
  parameter int unsigned M            = 3,
  parameter int unsigned L            = 640,
  parameter int unsigned NLINES       = 7,
  parameter bit          USE_DEFAULTS = 1'b1
) (
  output bit          done,      // set when the test has ended, with or without failures
  output int unsigned checks,
  output int unsigned failures
);
  import conv_pkg::*;

  localparam int unsigned NTAP   = M * M;
  localparam int unsigned NW     = NLINES * L;       // words streamed
  localparam int unsigned RELOAD = M * L + 5;        // word in which set B is loaded
  localparam int unsigned FIRST_OK = (M - 1) * L + (M - 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [COEF_W-1:0] coef_x = '0;
  logic [NTAP-1:0]   ldc = '0;
  logic              y = 1'b0;
  logic              word_start, sum_serial, pix_valid;
  logic [WORD_W-1:0] sum_out;
  logic [PIX_W-1:0]  pix_out;

  always #5 clk = ~clk;

  if (USE_DEFAULTS) begin : g_dut_default
    conv_pipeline dut (
      .clk, .rst_n, .coef_x, .ldc, .y, .word_start, .sum_serial, .sum_out, .pix_out, .pix_valid
    );
  end else begin : g_dut_param
    conv_pipeline #(.KERNEL_M(M), .LINE_LEN(L)) dut (
      .clk, .rst_n, .coef_x, .ldc, .y, .word_start, .sum_serial, .sum_out, .pix_out, .pix_valid
    );
  end

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end
  byte unsigned pix [NW];
  int           coef_a [NTAP], coef_b [NTAP];
  int           word_idx = -1;   // word currently on the y line
  int           bit_idx  = 0;
  int           load_tap = -1;   // tap being loaded, -1 when idle
  int           load_set = 0;
  longint       cycle = 0, last_valid_cycle = -1;

  // mechanism counters
  int n_loads = 0, n_rows = 0, n_neg = 0, n_round = 0, n_set_a = 0, n_set_b = 0, n_wrap = 0;
  int n_windows = 0;

  function automatic int coef_of(int m, int tap);
    return (m < int'(RELOAD)) ? coef_a[tap] : coef_b[tap];
  endfunction

  initial begin
    for (int i = 0; i < int'(NW); i++) pix[i] = byte'($urandom_range(0, 255));
    // every fifth line saturated, so large sums (and wrap-around) happen
    for (int i = 0; i < int'(NW); i++) if ((i / int'(L)) % 5 == 4) pix[i] = 8'd255;
    // loading takes NTAP clocks: keep the pixels of those words zero
    for (int i = 0; i <= (int'(NTAP) - 1) / int'(WORD_W); i++) begin
      pix[i] = 8'd0;
      pix[int'(RELOAD) + i] = 8'd0;
    end
    for (int t = 0; t < int'(NTAP); t++) begin
      coef_a[t] = int'($urandom_range(0, 80)) - 24;   // mostly smoothing, some negative
      coef_b[t] = int'($urandom_range(0, 255)) - 128; // full signed range
    end
    coef_a[0] = -17;
    coef_b[NTAP-1] = 127;
    coef_b[0] = -128;
  end

  // Drive the serial pixel line and the coefficient bus between clock edges.
  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      if (word_start) begin
        word_idx++;
        bit_idx = 0;
        if (word_idx == 0)             begin load_tap = 0; load_set = 0; end
        if (word_idx == int'(RELOAD))  begin load_tap = 0; load_set = 1; end
      end else begin
        bit_idx++;
      end
      if (word_idx >= 0 && word_idx < int'(NW) && bit_idx < int'(PIX_W))
        y = pix[word_idx][bit_idx];
      else
        y = 1'b0;
      ldc = '0;
      if (load_tap >= 0) begin
        coef_x = COEF_W'(load_set == 0 ? coef_a[load_tap] : coef_b[load_tap]);
        ldc[load_tap] = 1'b1;
        n_loads++;
        load_tap = (load_tap == int'(NTAP) - 1) ? -1 : load_tap + 1;
      end
    end
  end

  // Check each output against the reference.
  always @(negedge clk) begin
    if (rst_n && pix_valid) begin
      automatic int     n = word_idx - 1;   // newest pixel of this window
      automatic longint acc = 0;
      automatic bit     rows_used = 1'b0, neg = 1'b0, uses_b = 1'b0, uses_a = 1'b0;
      automatic logic [WORD_W-1:0] exp_sum;
      if (last_valid_cycle >= 0) begin
        checks++;
        if (cycle - last_valid_cycle != longint'(WORD_W)) begin
          failures++;
          $display("FAIL rate: outputs %0d cycles apart", cycle - last_valid_cycle);
        end
      end
      last_valid_cycle = cycle;
      if (n >= int'(FIRST_OK) && n < int'(NW)) begin
        for (int r = 0; r < int'(M); r++)
          for (int c = 0; c < int'(M); c++) begin
            automatic int m   = n - (int'(M) - 1 - r) * int'(L) - (int'(M) - 1 - c);
            automatic int tap = r * int'(M) + c;
            automatic int prod = coef_of(m, tap) * int'(pix[m]);
            acc += longint'(prod);
            if (prod < 0) neg = 1'b1;
            if (r < int'(M) - 1 && prod != 0) rows_used = 1'b1;
            if (m < int'(RELOAD)) uses_a = 1'b1; else uses_b = 1'b1;
          end
        if (acc < 0 || acc > longint'((1 << WORD_W) - 1 - (1 << (FRAC_BITS - 1)))) n_wrap++;
        if (((acc & ((1 << FRAC_BITS) - 1)) >= (1 << (FRAC_BITS - 1)))) n_round++;
        if (neg) n_neg++;
        if (rows_used) n_rows++;
        if (uses_a && !uses_b) n_set_a++;
        if (uses_b && !uses_a) n_set_b++;
        n_windows++;
        exp_sum = WORD_W'(acc + (1 << (FRAC_BITS - 1)));
        checks += 2;
        if (sum_out !== exp_sum) begin
          failures++;
          if (failures < 10) $display("FAIL window %0d: sum %h expected %h", n, sum_out, exp_sum);
        end
        if (pix_out !== exp_sum[FRAC_BITS +: PIX_W]) begin
          failures++;
          if (failures < 10) $display("FAIL window %0d: pixel %h expected %h", n, pix_out,
                                      exp_sum[FRAC_BITS +: PIX_W]);
        end
      end
      if (n == int'(NW) - 1) finish_test();
    end
  end

  task automatic expect_seen(string what, int count);
    checks++;
    $display("mechanism %-28s happened %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  task automatic finish_test();
    expect_seen("coefficient load", n_loads);
    expect_seen("row alignment by line delay", n_rows);
    expect_seen("negative coefficient product", n_neg);
    expect_seen("round-up by initial half", n_round);
    expect_seen("windows of coefficient set A", n_set_a);
    expect_seen("windows of coefficient set B", n_set_b);
    expect_seen("sum wrapped modulo 2^16", n_wrap);
    checks++;
    if (n_windows != int'(NW) - int'(FIRST_OK)) begin
      failures++;
      $display("FAIL checked %0d windows, expected %0d", n_windows, NW - FIRST_OK);
    end
    done = 1'b1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat ((NW + 8) * WORD_W + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog: test did not end");
    done = 1'b1;
  end
endmodule
