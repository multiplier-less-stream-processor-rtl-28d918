// tb_fp32_normalizer: random signed fixed-point sums (of every magnitude,
// plus zero and exact ties) are converted with two LSB weights; the result
// must equal an independent round-to-nearest conversion of acc * 2^Q, and
// appear one cycle after the input. A half-precision (5/10) instance is
// checked the same way.
module tb_fp32_normalizer;
  import tb_util_pkg::*;
  localparam int AW = 50;
  localparam int QA = -35, QB = 3;

  logic clk = 1'b0;
  logic rst_n, in_valid;
  logic signed [AW-1:0] in_acc;
  logic va, vb;
  logic [31:0] fa, fb;
  int checks = 0, failures = 0;

  fp32_normalizer #(.AW(AW), .Q(QA)) dut_a (.clk, .rst_n, .in_valid, .in_acc,
                                             .out_valid(va), .out_fp(fa));
  fp32_normalizer #(.AW(AW), .Q(QB)) dut_b (.clk, .rst_n, .in_valid, .in_acc,
                                             .out_valid(vb), .out_fp(fb));
  // half-precision variant, LSB weight 2^-30 so that results span its range
  logic vh;
  logic [15:0] fh;
  fp32_normalizer #(.AW(AW), .Q(-30), .EW(5), .FW(10)) dut_h (
    .clk, .rst_n, .in_valid, .in_acc, .out_valid(vh), .out_fp(fh));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_fp(input logic signed [AW-1:0] a, input int q);
    return r2f(real'(longint'(a)) * pow2(q));
  endfunction

  initial begin
    logic signed [AW-1:0] a;
    rst_n = 1'b0; in_valid = 1'b0; in_acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int sh;
      sh = int'($urandom % (AW - 1));
      a = AW'({$urandom, $urandom}) >>> sh;
      if (t % 50 == 0) a = '0;
      if (t % 50 == 1) a = AW'(64'h0000_0000_1000_0008);   // tie, even: round down
      if (t % 50 == 2) a = AW'(64'h0000_0000_1000_0018);   // tie, odd: round up
      if (t % 50 == 3) a = -AW'(64'h0000_0000_1fff_fff8);  // carry into exponent
      in_acc = a;
      in_valid = 1'b1;
      @(negedge clk);
      checks += 3;
      if (!(va && vb)) begin failures++; $display("FAIL valid latency"); end
      if (fa !== ref_fp(a, QA)) begin
        failures++; $display("FAIL A acc=%0d got %h exp %h", a, fa, ref_fp(a, QA));
      end
      checks++;
      if (!vh || {16'd0, fh} !== r2fp(real'(longint'(a)) * pow2(-30), 5, 10)) begin
        failures++; $display("FAIL H acc=%0d got %h exp %h", a, fh, r2fp(real'(longint'(a)) * pow2(-30), 5, 10));
      end
      if (fb !== ref_fp(a, QB)) begin
        failures++; $display("FAIL B acc=%0d got %h exp %h", a, fb, ref_fp(a, QB));
      end
    end
    in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (va) begin failures++; $display("FAIL valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
