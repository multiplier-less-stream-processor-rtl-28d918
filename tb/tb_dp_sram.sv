// tb_dp_sram: writes and reads a small dual-port RAM against an array model,
// with random simultaneous read and write, checking the one-cycle read
// latency and that a read of the word being written returns the old word.
module tb_dp_sram;
  localparam int WIDTH = 12, DEPTH = 13, AW = 4;
  logic clk = 1'b0;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  dp_sram #(.WIDTH(WIDTH), .DEPTH(DEPTH), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expect_q;
    logic             pend;
    int               same = 0;
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    // Fill every word.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = WIDTH'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    pend = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("FAIL t=%0d rdata=%h expected %h", t, rdata, expect_q);
        end
      end
      we = 1'($urandom);
      re = 1'($urandom);
      waddr = AW'($urandom % DEPTH);
      raddr = ($urandom % 4 == 0) ? waddr : AW'($urandom % DEPTH);
      wdata = WIDTH'($urandom);
      pend = re;
      if (re) expect_q = model[raddr];
      if (re && we && raddr == waddr) same++;
      if (we) model[waddr] = wdata;
    end
    checks++;
    if (same == 0) begin
      failures++;
      $display("FAIL: no read-during-write case");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
