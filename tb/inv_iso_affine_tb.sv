// inv_iso_affine_tb -- self-checking test of the merged back-mapping and affine.
//
// For every composite-field value v the expected output is the AES affine
// transform (rotation form, plus 63h) of the GF(2^8) element that the
// isomorphism maps onto v, found by search. Also the worked example 27h -> 8Ch
// and the zero case 00h -> 63h.
module inv_iso_affine_tb;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] q_inv, a;

  inv_iso_affine dut (.q_inv(q_inv), .a(a));

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
    for (int i = 0; i < 256; i++) begin
      q_inv = 8'(i);
      #1;
      exp = aes_affine(delta_unmap(q_inv));
      checks++;
      if (a !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %02h: a=%02h expected %02h", q_inv, a, exp);
      end
    end
    q_inv = 8'h27; #1;
    checks++;
    if (a !== 8'h8C) begin failures++; $display("FAIL worked example: %02h", a); end
    q_inv = 8'h00; #1;
    checks++;
    if (a !== 8'h63) begin failures++; $display("FAIL zero: %02h", a); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
