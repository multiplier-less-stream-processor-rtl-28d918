// tb_coeff_gen: checks the pixel-to-ternary ROM for every 8-bit pixel.
// Each code must decode to its pixel, use only legal digits and match the
// reference coding; several rows of the partition table are also checked
// literally. The valid/sof flags must follow the input one cycle later.
module tb_coeff_gen;
  import tb_util_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid, in_sof;
  logic [7:0] in_pix;
  logic       out_valid, out_sof;
  logic [11:0] out_code;
  int checks = 0, failures = 0;

  coeff_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Literal rows of the partition table: {C5..C0}.
  function automatic logic [11:0] row(input int c0, c1, c2, c3, c4, c5);
    logic [11:0] c;
    int d [6];
    d = '{c0, c1, c2, c3, c4, c5};
    for (int i = 0; i < 6; i++) c[2*i +: 2] = 2'(d[i]);
    return c;
  endfunction

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_sof = 1'b0; in_pix = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(out_valid == 1'b0, "valid low after reset");
    for (int q = 0; q < 256; q++) begin
      in_valid <= 1'b1;
      in_sof   <= (q == 0);
      in_pix   <= 8'(q);
      @(posedge clk);
      in_valid <= 1'b0;
      in_sof   <= 1'b0;
      #1;
      check(out_valid == 1'b1, $sformatf("valid for %0d", q));
      check(out_sof == (q == 0), $sformatf("sof for %0d", q));
      check(decode(out_code) == q, $sformatf("decode %0d got %0d", q, decode(out_code)));
      check(out_code == ref_code(q), $sformatf("code %0d: %03h vs %03h", q, out_code, ref_code(q)));
      case (q)
        0:   check(out_code == row(0, 0, 0, 0, 0, 0), "row 0");
        1:   check(out_code == row(1, 0, 0, 0, 0, 0), "row 1");
        2:   check(out_code == row(-1, 1, 0, 0, 0, 0), "row 2");
        3:   check(out_code == row(0, 1, 0, 0, 0, 0), "row 3");
        4:   check(out_code == row(1, 1, 0, 0, 0, 0), "row 4");
        5:   check(out_code == row(-1, -1, 1, 0, 0, 0), "row 5");
        23:  check(out_code == row(-1, -1, 0, 1, 0, 0), "row 23");
        255: check(out_code == row(1, 1, 1, 1, 1, 1), "row 255");
        default: ;
      endcase
      @(posedge clk);
      #1;
      check(out_valid == 1'b0, "valid drops with input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
