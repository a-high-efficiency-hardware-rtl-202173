// comp_inv_tb -- self-checking test of the GF((2^4)^2) inverse.
//
// For all 256 inputs: q' * q'^-1 = 1 in reference composite-field arithmetic
// (0 -> 0), and the result equals an exhaustive-search inverse. Also the
// worked example 41h -> 27h.
module comp_inv_tb;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  sbox_pkg::comp_t q_c;
  logic [7:0] q_inv;

  comp_inv dut (.q_c(q_c), .q_inv(q_inv));

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
    for (int i = 0; i < 256; i++) begin
      q_c = 8'(i);
      #1;
      checks++;
      if (i == 0 ? (q_inv !== 8'h00) : (gfc_mul(q_c, q_inv) !== 8'h01)) begin
        failures++;
        if (failures < 10) $display("FAIL %02h: %02h is not its inverse", q_c, q_inv);
      end
      checks++;
      if (q_inv !== gfc_inv(q_c)) begin
        failures++;
        if (failures < 10) $display("FAIL %02h: %02h expected %02h", q_c, q_inv, gfc_inv(q_c));
      end
    end
    q_c = 8'h41; #1;
    checks++;
    if (q_inv !== 8'h27) begin failures++; $display("FAIL worked example: %02h", q_inv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
