// f2_tb -- self-checking test of f2, the GF(2^4) inverse.
//
// For all 16 inputs: e * y = 1 in reference GF(2^4) arithmetic for e != 0,
// y = 0 for e = 0, and y equals an exhaustive-search inverse. Also the worked
// example e = Ch -> y = 5h.
module f2_tb;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0] e, y;

  f2 dut (.e(e), .y(y));

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
    for (int i = 0; i < 16; i++) begin
      e = 4'(i);
      #1;
      checks++;
      if (i == 0 ? (y !== 4'h0) : (gf16_mul(e, y) !== 4'h1)) begin
        failures++;
        $display("FAIL e=%h: y=%h is not its inverse", e, y);
      end
      checks++;
      if (y !== gf16_inv(e)) begin
        failures++;
        $display("FAIL e=%h: y=%h expected %h", e, y, gf16_inv(e));
      end
    end
    e = 4'hC; #1;
    checks++;
    if (y !== 4'h5) begin failures++; $display("FAIL worked example: y=%h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
