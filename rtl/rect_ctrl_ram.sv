// rect_ctrl_ram: the RAM that holds the rectangular control words.
//
// One control word per rectangle. The controller writes it word by word, either
// all clusters before the test session or one cluster at the start of each new
// cluster. Writes are synchronous (one port); the read port is combinational, as
// in a small register file, so the control register can take the next word in
// the same cycle the current rectangle ends and decoding never stalls between
// rectangles. The combinational read is this design's choice; a synchronous
// functional RAM reused for the purpose would need one word of prefetch.
// Contents are not reset: only words that were written are read.
module rect_ctrl_ram #(
  parameter int unsigned DEPTH  = rect_pkg::DEPTH_D,
  parameter int unsigned WORD_W = rect_pkg::word_bits(rect_pkg::N_CHAINS_D,
                                                      rect_pkg::K_SHARE_D, rect_pkg::W_BITS_D),
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
