// line_delay: the long delay between two rows of the kernel, as a circular buffer in a
// single-port RAM.
//
// The serial partial sum enters lsb first, word-aligned: `first` marks the bit time in
// which bit 0 of a word is on d. An input shift register gathers each WORD_W-bit word,
// and in the word's last bit time the complete word is written to the RAM at the write
// address, which then steps to the next location (modulo 2**AW). Reads and writes take
// turns on the one RAM port: in bit time READ_SLOT of every word, the word written
// WORDS-1 words earlier is read from the address WORDS-1 behind the write address into
// a holding register. At the word boundary it moves into an output shift register, which
// sends it out lsb first. Each word therefore leaves exactly WORDS word times
// (WORDS*WORD_W clocks) after it entered, with the same alignment to `first`.
//
// In the pipeline WORDS = LINE_LEN - KERNEL_M. Together with the one-pixel delay in front
// of it, this lines up the rows of the window. The RAM holds 2**AW words of WORD_W bits,
// the smallest power of two not below WORDS.
//
// The circular buffer in RAM, with interleaved writes and reads at addresses a fixed
// offset apart, follows the document. The word width, the bit times chosen for the
// write and the read, and the holding register are this design's choices. The RAM is not
// reset: until WORDS words have passed, q carries whatever it held.
module line_delay #(
  parameter int unsigned WORDS  = conv_pkg::LINE_LEN - conv_pkg::KERNEL_M,
  parameter int unsigned WORD_W = conv_pkg::WORD_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic first,  // bit 0 of a word is on d in this cycle
  input  logic d,
  output logic q
);
  localparam int unsigned AW        = (WORDS > 2) ? $clog2(WORDS) : 1;
  localparam int unsigned SW        = $clog2(WORD_W);
  localparam int unsigned READ_SLOT = WORD_W / 2;

  logic [WORD_W-1:0] mem [2**AW];
  logic [WORD_W-2:0] in_sr;
  logic [WORD_W-1:0] wword, hold, out_sr;
  logic [AW-1:0]     waddr, raddr, addr;
  logic [SW-1:0]     slot;
  logic              we, re;

  initial assert (WORDS >= 2) else $error("line_delay: WORDS must be at least 2");

  // bit time within the word, locked to `first`
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     slot <= '0;
    else if (first) slot <= SW'(1);
    else            slot <= slot + 1'b1;
  end

  assign wword = {d, in_sr};
  assign we    = !first && (slot == SW'(WORD_W - 1));
  assign re    = !first && (slot == SW'(READ_SLOT));
  assign raddr = waddr - AW'(WORDS - 1);
  assign addr  = we ? waddr : raddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sr  <= '0;
      waddr  <= '0;
      out_sr <= '0;
    end else begin
      in_sr <= wword[WORD_W-1:1];
      if (we) begin
        waddr  <= waddr + 1'b1;
        out_sr <= hold;
      end else begin
        out_sr <= {1'b0, out_sr[WORD_W-1:1]};
      end
    end
  end

  // the single RAM port: a write in the last bit time, a read in READ_SLOT
  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wword;
    else if (re) hold      <= mem[addr];
  end

  assign q = out_sr[0];
endmodule
