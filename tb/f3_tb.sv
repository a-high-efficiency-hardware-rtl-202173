// f3_tb -- self-checking test of f3: q_inv = {b*y, (b + c)*y}.
//
// All 4096 (b, c, y) combinations against reference GF(2^4) multiplication,
// plus the worked example b = 4h, c = 1h, y = 5h -> 27h.
module f3_tb;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0] b, c, y;
  logic [7:0] q_inv;

  f3 dut (.b(b), .c(c), .y(y), .q_inv(q_inv));

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
    logic [7:0] exp;
    for (int i = 0; i < 4096; i++) begin
      b = 4'(i >> 8);
      c = 4'(i >> 4);
      y = 4'(i);
      #1;
      exp = {gf16_mul(b, y), gf16_mul(b ^ c, y)};
      checks++;
      if (q_inv !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL b=%h c=%h y=%h: %02h expected %02h", b, c, y, q_inv, exp);
      end
    end
    b = 4'h4; c = 4'h1; y = 4'h5; #1;
    checks++;
    if (q_inv !== 8'h27) begin failures++; $display("FAIL worked example: %02h", q_inv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
