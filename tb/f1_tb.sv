// f1_tb -- self-checking test of f1: e = b^2*lambda + b*c + c^2 in GF(2^4).
//
// All 256 (b, c) pairs are compared with reference GF(2^4) arithmetic, plus the
// worked example b = 4h, c = 1h -> e = Ch.
module f1_tb;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0] b, c, e;

  f1 dut (.b(b), .c(c), .e(e));

  // Watchdog: a stuck run counts as a failure
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    for (int i = 0; i < 256; i++) begin
      b = 4'(i >> 4);
      c = 4'(i);
      #1;
      exp = gf16_mul(gf16_mul(b, b), LAMBDA) ^ gf16_mul(b, c) ^ gf16_mul(c, c);
      checks++;
      if (e !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL b=%h c=%h: e=%h expected %h", b, c, e, exp);
      end
    end
    b = 4'h4; c = 4'h1; #1;
    checks++;
    if (e !== 4'hC) begin failures++; $display("FAIL worked example: e=%h", e); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
