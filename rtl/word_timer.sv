// word_timer: bit-time counter of the bit-serial pipeline.
//
// Every pixel occupies WORD_W consecutive clock cycles ("bit times"). This counter runs
// freely from reset, and marks slot 0 (first) and slot WORD_W-1 (last) of each word. The
// pixel source must present bit 0 of a pixel on the serial line in the cycle where
// `first` is high; every stage uses `first` (or a copy delayed to match its own latency)
// to clear its carry and feedback state between words. The document only mentions
// common clock and reset lines; the counter is this design's way of providing them.
//
// Interface: clk, rst_n (asynchronous, active low). slot is the index of the current bit
// time, first = (slot == 0), last = (slot == WORD_W-1). All outputs come from a register.
module word_timer #(
  parameter int unsigned WORD_W = conv_pkg::WORD_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic [$clog2(WORD_W)-1:0] slot,
  output logic                      first,
  output logic                      last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           slot <= '0;
    else if (slot == $bits(slot)'(WORD_W - 1)) slot <= '0;
    else                                  slot <= slot + 1'b1;
  end

  assign first = (slot == '0);
  assign last  = (slot == $bits(slot)'(WORD_W - 1));
endmodule
