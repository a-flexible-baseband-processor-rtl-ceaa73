// dp_sram -- dual-port partial-sum SRAM of one DA block.
//
// Each DA block (feedback or feed-forward) of a band-pass filter keeps the
// 2^TAPS partial sums of its five coefficients in one memory. Two bit planes
// of the filter state are processed per clock, so the memory is dual-ported:
// port A reads the partial sum addressed by the odd bit plane and port B the
// one addressed by the even bit plane in the same cycle. Rewriting the memory
// retunes the filter (centre frequency and bandwidth), so port A also writes.
//
// Interface and timing: both ports are synchronous; the word addressed in
// cycle n appears on a_rdata / b_rdata in cycle n+1. A write on port A
// (a_we = 1) stores a_wdata at a_addr at the clock edge; a read of the same
// word in that cycle, on either port, returns the old contents. The contents
// are not reset, as in a real SRAM: every word must be written before it is
// read. The two-port organisation is the design's; the write-on-port-A choice
// and the read-first behaviour are this implementation's.
module dp_sram #(
  parameter int unsigned ADDR_W = 5,
  parameter int unsigned DATA_W = 19
) (
  input  logic              clk,
  // port A: read / write
  input  logic [ADDR_W-1:0] a_addr,
  input  logic              a_we,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B: read
  input  logic [ADDR_W-1:0] b_addr,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [1<<ADDR_W];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
