// iso_map_tb -- self-checking test of the GF(2^8) -> GF((2^4)^2) mapping.
//
// Checks that the block is a field isomorphism: it is additive, maps 1 to 1,
// is one-to-one, and turns every AES-field product into the composite-field
// product (all 65536 pairs, reference arithmetic from gf_ref_pkg). Because
// several isomorphisms exist, it also pins the particular one with known
// {b, c} values for the inputs 00h..08h and F0h -> 41h.
module iso_map_tb;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] q;
  sbox_pkg::comp_t q_c;

  iso_map dut (.q(q), .q_c(q_c));

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

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  logic [7:0] img [256];
  logic [255:0] seen;

  // Known images: {b, c} for inputs 00h..08h
  localparam logic [7:0] KNOWN [9] = '{8'h00, 8'h01, 8'h5F, 8'h5E, 8'h7C, 8'h7D, 8'h23, 8'h22, 8'h74};

  initial begin
    for (int i = 0; i < 256; i++) begin
      q = 8'(i);
      #1;
      img[i] = q_c;
    end
    seen = '0;
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (seen[img[i]]) begin
        failures++;
        $display("FAIL image %02h repeated", img[i]);
      end
      seen[img[i]] = 1'b1;
    end
    check("delta(1)", img[1], 8'h01);
    for (int i = 0; i < 9; i++) check($sformatf("delta(%02h)", i), img[i], KNOWN[i]);
    check("delta(F0)", img[8'hF0], 8'h41);
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        check("additive", img[x ^ y], img[x] ^ img[y]);
        check("multiplicative", img[aes_mul(8'(x), 8'(y))], gfc_mul(img[x], img[y]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
