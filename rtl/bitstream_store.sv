// bitstream_store: memory holding one partial bitstream per reconfiguration
// candidate of the DSP unit.
//
// Candidate c's partial bitstream occupies words c*BS_WORDS ..
// c*BS_WORDS + BS_WORDS - 1: a header word followed by the 1968 words
// (3 columns x 16 frames x 41 words of 32 bits = 62976 bits) of the region's
// configuration frames. It is filled through the write port when the system
// is loaded and read by the reconfiguration controller.
//
// Interface: one write port (we, waddr, wdata) and one read port (re, raddr,
// rdata). Reads are synchronous: rdata holds the word addressed in the cycle
// re was high, from the next cycle on, until the next read. A plain array,
// so synthesis can map it to block RAM. The memory organisation (one
// contiguous array, 32-bit words, synchronous read) is this design's choice.
module bitstream_store
  import rtr_pkg::*;
#(
  parameter int unsigned WORDS  = NUM_CANDIDATES * BS_WORDS,
  parameter int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  cfg_word_t         wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output cfg_word_t         rdata
);

  cfg_word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < WORDS)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= (32'(raddr) < WORDS) ? mem[raddr] : '0;
  end

endmodule
