// dp_sram: simple dual-port synchronous RAM, one write port and one read port.
//
// One row of the stripe buffer is held in such a RAM so that the word leaving
// the row and the word entering it can be moved in the same clock cycle.
// Write: mem[waddr] <= wdata when we. Read: rdata <= mem[raddr] when re, a
// registered read with one cycle of latency; when both ports address the same
// word in one cycle the read returns the old contents (read-before-write).
// The contents are not reset. Width and depth are parameters; the defaults
// are one 12-bit coded pixel per word and W - K = 637 words for a 640-pixel
// row and a 3x3 kernel.
module dp_sram #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 637,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
