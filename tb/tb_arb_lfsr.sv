// tb_arb_lfsr: self-checking testbench of the arbitration bit generator.
//
// Two generators are checked: one giving 1 bit and one giving 4 bits per
// cycle. Their outputs are compared each cycle with a software model of the
// x^16 + x^14 + x^13 + x^11 + 1 shift register; the 1-bit stream is checked to
// have the full period 65535 (and none of its proper divisors), and the
// 4-bit outputs are checked to be close to balanced (each bit about half
// ones), as fair arbitration needs.
module tb_arb_lfsr;

  localparam logic [15:0] SEED = 16'h1D2B;
  localparam int unsigned PERIOD = 65535;
  localparam int unsigned RUN = PERIOD + 200;

  logic clk = 1'b0;
  logic rst_n;
  logic [0:0] rnd1;
  logic [3:0] rnd4;

  arb_lfsr #(.SEED(SEED), .OUT_W(1)) dut1 (.clk(clk), .rst_n(rst_n), .rnd(rnd1));
  arb_lfsr #(.SEED(SEED), .OUT_W(4)) dut4 (.clk(clk), .rst_n(rst_n), .rnd(rnd4));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit stream [RUN];
  int ones [4];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [15:0] step(logic [15:0] s);
    logic fb;
    fb = s[15] ^ s[13] ^ s[12] ^ s[10];
    return {s[14:0], fb};
  endfunction

  initial begin
    logic [15:0] m1, m4;
    int mism1, mism4, same;
    rst_n = 1'b0;
    @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    m1 = SEED;
    m4 = SEED;
    mism1 = 0;
    mism4 = 0;
    for (int c = 0; c < RUN; c++) begin
      if (rnd1 != m1[0]) mism1++;
      if (rnd4 != m4[3:0]) mism4++;
      stream[c] = rnd1[0];
      if (c < 4000) for (int b = 0; b < 4; b++) ones[b] += int'(rnd4[b]);
      @(negedge clk);
      m1 = step(m1);
      repeat (4) m4 = step(m4);
    end
    check(mism1 == 0, $sformatf("1-bit output differs from model in %0d cycles", mism1));
    check(mism4 == 0, $sformatf("4-bit output differs from model in %0d cycles", mism4));
    // full period
    same = 0;
    for (int c = 0; c < 200; c++) same += int'(stream[c] == stream[c + PERIOD]);
    check(same == 200, "sequence does not repeat after 65535 cycles");
    for (int k = 0; k < 4; k++) begin
      int p, diff;
      p = (k == 0) ? PERIOD / 3 : (k == 1) ? PERIOD / 5 : (k == 2) ? PERIOD / 17 : PERIOD / 257;
      diff = 0;
      for (int c = 0; c < 200; c++) diff += int'(stream[c] != stream[c + p]);
      check(diff > 0, $sformatf("sequence repeats after %0d cycles", p));
    end
    for (int b = 0; b < 4; b++)
      check(ones[b] > 1800 && ones[b] < 2200, $sformatf("bit %0d unbalanced: %0d of 4000", b, ones[b]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
