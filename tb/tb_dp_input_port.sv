// tb_dp_input_port: self-checking testbench of one system input port.
//
// Random arrivals of both classes and random network acceptance are applied.
// The testbench keeps its own two queues and, every cycle, works out which
// packet must enter the network (high priority first; low priority only when
// no high priority packet can enter) and whether an arrival is accepted, and
// compares that with the port. It counts high priority packets admitted
// while low priority ones wait, low priority packets admitted while a high
// priority packet waits but cannot enter, and arrivals refused by a full
// FIFO, and fails if any of these never happened.
module tb_dp_input_port;
  import min_pkg::*;

  localparam int unsigned PKT_W  = 10;
  localparam int unsigned DEPTH  = 4;
  localparam int unsigned CYCLES = 20000;

  logic clk = 1'b0;
  logic rst_n;
  logic arr_valid, arr_ready, min_valid, min_ready_h, min_ready_l;
  prio_e arr_prio, min_prio;
  logic [PKT_W-1:0] arr_pkt, min_pkt;
  logic [$clog2(DEPTH+1)-1:0] hq_count, lq_count;

  dp_input_port #(.PKT_W(PKT_W), .FIFO_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_hfirst = 0, n_lpass = 0, n_refused = 0, n_h = 0, n_l = 0;
  logic [PKT_W-1:0] hq[$], lq[$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    bit e_h, e_l, e_acc;
    int seq = 0;
    rst_n = 1'b0; arr_valid = 0; arr_prio = PRIO_LOW; arr_pkt = '0;
    min_ready_h = 0; min_ready_l = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      arr_valid   = $urandom_range(0, 9) < 7;
      arr_prio    = ($urandom_range(0, 2) == 0) ? PRIO_HIGH : PRIO_LOW;
      arr_pkt     = PKT_W'(seq++);
      min_ready_h = $urandom_range(0, 3) != 0;
      min_ready_l = $urandom_range(0, 2) != 0;
      e_h   = hq.size() > 0 && min_ready_h;
      e_l   = !e_h && lq.size() > 0 && min_ready_l;
      e_acc = (arr_prio == PRIO_HIGH) ? hq.size() < DEPTH : lq.size() < DEPTH;
      #1;
      check(arr_ready == e_acc, "arr_ready");
      check(min_valid == (e_h || e_l), "min_valid");
      check(hq_count == hq.size() && lq_count == lq.size(), "fifo counts");
      if (e_h) begin
        check(min_prio == PRIO_HIGH && min_pkt == hq[0], "high priority packet admitted");
        if (lq.size() > 0 && min_ready_l) n_hfirst++;
        n_h++;
      end
      if (e_l) begin
        check(min_prio == PRIO_LOW && min_pkt == lq[0], "low priority packet admitted");
        if (hq.size() > 0) n_lpass++;
        n_l++;
      end
      if (arr_valid && !e_acc) n_refused++;
      @(posedge clk);
      if (e_h) void'(hq.pop_front());
      if (e_l) void'(lq.pop_front());
      if (arr_valid && e_acc) begin
        if (arr_prio == PRIO_HIGH) hq.push_back(arr_pkt);
        else                       lq.push_back(arr_pkt);
      end
      @(negedge clk);
    end
    $display("mechanisms: high_first=%0d low_past_blocked_high=%0d refused=%0d admitted_h=%0d admitted_l=%0d",
             n_hfirst, n_lpass, n_refused, n_h, n_l);
    check(n_hfirst > 0,  "high priority never preferred over a waiting low priority packet");
    check(n_lpass > 0,   "low priority never admitted past a blocked high priority packet");
    check(n_refused > 0, "no arrival refused by a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
