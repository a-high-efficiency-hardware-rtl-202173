// sbox_tb -- end-to-end test of the composite-field AES S-box.
//
// Runs the whole design at its only configuration. Reference values come from
// textbook GF(2^8) arithmetic (inverse by search, affine by rotations) in
// gf_ref_pkg, not from the tower-field equations.
//   1. Exhaustive: all 256 inputs, one per clock cycle. The input changes on
//      the falling edge and the output is checked on the next rising edge, so a
//      result is due within the same cycle (one byte per cycle, no pipeline).
//      It is also checked 1 time unit after the input changes, with no clock
//      edge in between: the path is combinational, latency zero.
//   2. The worked example F0h: intermediate q' = 41h, e = Ch, y = 5h,
//      q'^-1 = 27h, output 8Ch.
//   3. Inputs 00h..08h with their intermediate b, c, e, y values.
//   4. 20000 random bytes, one per cycle.
// Mechanisms counted (each must occur): the zero input, whose inverse is
// defined as zero; every one of the 16 GF(2^4) values reaching f2; both values
// of q'^-1[7], which carries the folded affine constant.
module sbox_tb;
  import gf_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  // Watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] q = 8'h00;
  logic [7:0] a;

  sbox dut (.q(q), .a(a));

  logic [7:0] ref_sbox [256];

  // Mechanism counters
  int n_zero = 0;
  int n_q7_one = 0;
  int n_q7_zero = 0;
  logic [15:0] e_seen = '0;

  task automatic check8(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  task automatic observe();
    if (q == 8'h00) n_zero++;
    if (dut.q_inv[7]) n_q7_one++; else n_q7_zero++;
    e_seen[dut.u_comp_inv.e] = 1'b1;
  endtask

  // Apply one byte: change on the falling edge, check before and at the next
  // rising edge.
  task automatic apply(logic [7:0] v);
    @(negedge clk);
    q = v;
    #1;
    check8($sformatf("S(%02h) combinational", v), a, ref_sbox[v]);
    observe();
    @(posedge clk);
    check8($sformatf("S(%02h) at clock edge", v), a, ref_sbox[v]);
  endtask

  localparam logic [3:0] FIG_B [9] = '{4'h0, 4'h0, 4'h5, 4'h5, 4'h7, 4'h7, 4'h2, 4'h2, 4'h7};
  localparam logic [3:0] FIG_C [9] = '{4'h0, 4'h1, 4'hF, 4'hE, 4'hC, 4'hD, 4'h3, 4'h2, 4'h4};
  localparam logic [3:0] FIG_E [9] = '{4'h0, 4'h1, 4'h2, 4'h6, 4'h3, 4'h5, 4'hB, 4'h8, 4'h1};
  localparam logic [3:0] FIG_Y [9] = '{4'h0, 4'h1, 4'h3, 4'h9, 4'h2, 4'hC, 4'h7, 4'hA, 4'h1};
  localparam logic [7:0] FIG_A [9] = '{8'h63, 8'h7C, 8'h77, 8'h7B, 8'hF2, 8'h6B, 8'h6F, 8'hC5, 8'h30};

  int cycles;

  initial begin
    for (int i = 0; i < 256; i++) ref_sbox[i] = aes_sbox(8'(i));
    // Independent spot values of the standard table
    check8("ref S(00)", ref_sbox[8'h00], 8'h63);
    check8("ref S(53)", ref_sbox[8'h53], 8'hED);
    check8("ref S(FF)", ref_sbox[8'hFF], 8'h16);

    // 1. exhaustive, one byte per cycle
    cycles = 0;
    for (int i = 0; i < 256; i++) begin
      apply(8'(i));
      cycles++;
    end
    checks++;
    if (cycles != 256) begin failures++; $display("FAIL throughput: %0d cycles", cycles); end

    // 2. worked example
    @(negedge clk);
    q = 8'hF0;
    #1;
    check8("F0: q'", dut.q_c, 8'h41);
    check8("F0: e", 8'(dut.u_comp_inv.e), 8'h0C);
    check8("F0: y", 8'(dut.u_comp_inv.y), 8'h05);
    check8("F0: q'^-1", dut.q_inv, 8'h27);
    check8("F0: a", a, 8'h8C);

    // 3. inputs 00h..08h with intermediate values
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      q = 8'(i);
      #1;
      check8($sformatf("%02h: b", i), 8'(dut.q_c.b), 8'(FIG_B[i]));
      check8($sformatf("%02h: c", i), 8'(dut.q_c.c), 8'(FIG_C[i]));
      check8($sformatf("%02h: e", i), 8'(dut.u_comp_inv.e), 8'(FIG_E[i]));
      check8($sformatf("%02h: y", i), 8'(dut.u_comp_inv.y), 8'(FIG_Y[i]));
      check8($sformatf("%02h: a", i), a, FIG_A[i]);
    end

    // 4. random stream
    for (int i = 0; i < 20000; i++) apply(8'($urandom));

    // Mechanism coverage
    $display("mechanisms: zero-input=%0d q_inv7=1:%0d q_inv7=0:%0d f2-inputs-seen=%0d/16",
             n_zero, n_q7_one, n_q7_zero, $countones(e_seen));
    checks++;
    if (n_zero == 0) begin failures++; $display("FAIL zero input never applied"); end
    checks++;
    if (n_q7_one == 0 || n_q7_zero == 0) begin failures++; $display("FAIL q_inv[7] not toggled"); end
    checks++;
    if (e_seen != 16'hFFFF) begin failures++; $display("FAIL f2 input coverage %04h", e_seen); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
