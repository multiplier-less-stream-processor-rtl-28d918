// stripe_buffer: serial-in / parallel-out stripe buffer of K image rows.
//
// Conceptually a K x W shift register folded into K rows: every accepted word
// shifts the whole stripe by one position, so the K x K words to be filtered
// always sit in the K right-most columns and no row shuffling is needed.
// Each row is built from K registers (the window taps) and, between rows, a
// dual-port RAM of W - K words that replaces the long middle of the row. The
// RAM is addressed as a circular buffer: a single pointer, advanced on every
// shift, is both the write and the read address, so the word read out is the
// one written W - K shifts earlier and the RAM behaves like a shift register.
// The RAM's registered read port counts as one stage, so the path from the
// last tap of one row to the first tap of the next is W - K + 1 stages and a
// whole row is exactly W stages.
//
// Only K - 1 RAMs are needed: the row that receives the input consists of its
// K taps only, since words leaving the oldest row are never read again (this
// design's reading of the K x W stripe).
//
// Interface: `shift` accepts `din` (one coded pixel). `win[r][c]` is the
// window after the last shift, r = 0 the oldest row (top), c = 0 the oldest
// column (left); win[K-1][K-1] is the newest word. Nothing is valid until
// (K-1)*W + K words have been shifted in; tracking that is the caller's job.
module stripe_buffer #(
  parameter int unsigned LC = 12,
  parameter int unsigned K  = 3,
  parameter int unsigned W  = 640
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       shift,
  input  logic [LC-1:0]              din,
  output logic [K-1:0][K-1:0][LC-1:0] win
);

  localparam int unsigned D  = W - K;
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1;

  // tap[ri][k]: ri = 0 is the newest row, k = 0 the newest column.
  logic [K-1:0][K-1:0][LC-1:0] tap;
  logic [AW-1:0] ptr;

  initial begin
    assert (W > K && K >= 2) else $error("stripe_buffer: need W > K >= 2");
  end

  // Shared circular-buffer pointer of the row RAMs.
  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (shift) ptr <= (ptr == AW'(D - 1)) ? '0 : ptr + 1'b1;
  end

  // Input row: K taps only.
  logic [K-1:0][LC-1:0] row0;
  always_ff @(posedge clk) begin
    if (shift) begin
      row0[0] <= din;
      for (int k = 1; k < K; k++) row0[k] <= row0[k-1];
    end
  end
  assign tap[0] = row0;

  for (genvar ri = 1; ri < K; ri++) begin : g_row
    logic [LC-1:0]        q;    // RAM read register = tap 0 of this row
    logic [K-1:1][LC-1:0] regs; // taps 1..K-1 of this row

    // RAM between row ri-1 and row ri.
    dp_sram #(.WIDTH(LC), .DEPTH(D), .AW(AW)) u_row (
      .clk   (clk),
      .we    (shift),
      .waddr (ptr),
      .wdata (tap[ri-1][K-1]),
      .re    (shift),
      .raddr (ptr),
      .rdata (q)
    );

    always_ff @(posedge clk) begin
      if (shift) begin
        regs[1] <= q;
        for (int k = 2; k < K; k++) regs[k] <= regs[k-1];
      end
    end
    assign tap[ri] = {regs, q};
  end

  // Present the window in image orientation.
  always_comb begin
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++)
        win[r][c] = tap[K-1-r][K-1-c];
  end

endmodule
