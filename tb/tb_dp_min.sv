// tb_dp_min: end-to-end testbench of the dual priority delta-2 MIN (16x16).
//
// Each input has unbounded testbench-side high and low priority source
// queues; a source offers its high priority head when the network accepts
// high priority packets at that input, otherwise its low priority head.
// Every packet carries a unique sequence number. A scoreboard checks that
// each packet leaves exactly once, on the output named by its address, with
// its class unchanged, and that packets of one source, class and destination
// stay in order. Three phases:
//   A. isolated packets: the transit time must be exactly N_STAGES cycles;
//   B. hot spot: all inputs send to output 0, input 0 high priority, the
//      others low priority; input 0 offers load 0.5, the others full load.
//      The high priority throughput must equal its offered load (it is
//      immune to the low priority load) and low priority gets the rest;
//   C. uniform random traffic of both classes, then the network is drained.
// Counted inside the SEs: high and low priority conflicts, packets held by
// backpressure, low priority packets passing a blocked high priority
// packet, buffers sending two packets at once; each must occur.
module tb_dp_min;
  import min_pkg::*;

  localparam int unsigned NS     = 4;
  localparam int unsigned DW     = 16;
  localparam int unsigned N      = 2 ** NS;
  localparam int unsigned PW     = NS + DW;
  localparam int unsigned HOT    = 3000;
  localparam int unsigned UNI    = 4000;

  logic clk = 1'b0;
  logic rst_n;
  logic  [N-1:0]         in_valid, in_ready_h, in_ready_l, out_valid;
  prio_e [N-1:0]         in_prio, out_prio;
  logic  [N-1:0][PW-1:0] in_pkt, out_pkt;

  dp_min #(.N_STAGES(NS), .DATA_W(DW), .SEED(16'h5EED)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // source queues: entries are {dest, seq}
  typedef struct packed { logic [NS-1:0] dest; logic [DW-1:0] seq; } ent_t;
  ent_t srcq_h [N][$];
  ent_t srcq_l [N][$];

  // scoreboard
  typedef struct { int src; int dest; bit high; longint t_in; } info_t;
  info_t inflight [int];
  int last_seq [N][N][2];
  int n_in = 0, n_out = 0, n_out_h0 = 0, n_out_l0 = 0;
  bit phase_a = 0;
  int seq = 0;

  // mechanism counters (inside every SE)
  int n_hconf = 0, n_lconf = 0, n_stall = 0, n_bypass = 0, n_dual = 0;
  for (genvar k = 0; k < NS; k++) begin : g_mk
    for (genvar j = 0; j < N / 2; j++) begin : g_mj
      always @(posedge clk) if (rst_n) begin
        for (int o = 0; o < 2; o++) begin
          int hr, lr;
          hr = 0; lr = 0;
          for (int i = 0; i < 2; i++) begin
            if (dut.g_stage[k].g_se[j].u_se.hq_valid[i] &&
                dut.g_stage[k].g_se[j].u_se.hq_pkt[i][DW + NS - 1 - k] == o[0]) hr++;
            if (dut.g_stage[k].g_se[j].u_se.lq_valid[i] &&
                dut.g_stage[k].g_se[j].u_se.lq_pkt[i][DW + NS - 1 - k] == o[0]) lr++;
          end
          if (hr == 2) n_hconf++;
          if (lr == 2) n_lconf++;
          if (hr > 0 && dut.g_stage[k].g_se[j].u_se.l_go[o]) n_bypass++;
        end
        for (int i = 0; i < 2; i++) begin
          if (dut.g_stage[k].g_se[j].u_se.hq_valid[i] && !dut.g_stage[k].g_se[j].u_se.h_leave[i]) n_stall++;
          if (dut.g_stage[k].g_se[j].u_se.h_leave[i] && dut.g_stage[k].g_se[j].u_se.l_leave[i]) n_dual++;
        end
      end
    end
  end

  // drive the sources (after the falling edge)
  always @(negedge clk) begin
    #1;
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 1'b0;
      in_prio[i]  = PRIO_LOW;
      in_pkt[i]   = '0;
      if (rst_n && srcq_h[i].size() > 0 && in_ready_h[i]) begin
        in_valid[i] = 1'b1; in_prio[i] = PRIO_HIGH; in_pkt[i] = srcq_h[i][0];
      end else if (rst_n && srcq_l[i].size() > 0 && in_ready_l[i]) begin
        in_valid[i] = 1'b1; in_prio[i] = PRIO_LOW; in_pkt[i] = srcq_l[i][0];
      end
    end
  end

  // monitor at the rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) if (in_valid[i]) begin
        ent_t e;
        e = in_pkt[i];
        inflight[int'(e.seq)] = '{src: i, dest: int'(e.dest), high: in_prio[i] == PRIO_HIGH, t_in: cyc};
        if (in_prio[i] == PRIO_HIGH) void'(srcq_h[i].pop_front());
        else                         void'(srcq_l[i].pop_front());
        n_in++;
      end
      for (int o = 0; o < N; o++) if (out_valid[o]) begin
        ent_t e;
        int s;
        e = out_pkt[o];
        s = int'(e.seq);
        n_out++;
        if (!inflight.exists(s)) begin
          check(0, $sformatf("unknown or duplicated packet %0d at output %0d", s, o));
        end else begin
          check(int'(e.dest) == o && inflight[s].dest == o, $sformatf("packet %0d at output %0d", s, o));
          check(inflight[s].high == (out_prio[o] == PRIO_HIGH), "class changed");
          check(s > last_seq[inflight[s].src][o][inflight[s].high], "order within source/class/destination");
          last_seq[inflight[s].src][o][inflight[s].high] = s;
          if (phase_a) check(cyc - inflight[s].t_in == NS,
                             $sformatf("transit %0d cycles, expected %0d", cyc - inflight[s].t_in, NS));
          if (o == 0 && out_prio[o] == PRIO_HIGH) n_out_h0++;
          if (o == 0 && out_prio[o] == PRIO_LOW)  n_out_l0++;
          inflight.delete(s);
        end
      end
      cyc++;
    end
  end

  task automatic add(int src, int dest, bit high);
    ent_t e;
    e.dest = NS'(dest);
    e.seq  = DW'(seq++);
    if (high) srcq_h[src].push_back(e);
    else      srcq_l[src].push_back(e);
  endtask

  task automatic wait_drained(int limit);
    int w = 0;
    while ((n_in != seq || inflight.size() != 0) && w < limit) begin
      @(posedge clk);
      w++;
    end
    check(n_in == seq && inflight.size() == 0, "network did not drain");
  endtask

  initial begin
    int h0, l0;
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) begin
      last_seq[a][b][0] = -1; last_seq[a][b][1] = -1;
    end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // A: isolated packets, exact transit time
    phase_a = 1;
    for (int p = 0; p < 64; p++) begin
      @(negedge clk);
      add($urandom_range(0, N - 1), $urandom_range(0, N - 1), p[0]);
      repeat (NS + 3) @(posedge clk);
    end
    wait_drained(100);
    phase_a = 0;

    // B: hot spot at output 0
    h0 = n_out_h0; l0 = n_out_l0;
    for (int t = 0; t < HOT; t++) begin
      @(negedge clk);
      if ($urandom_range(0, 1) == 0) add(0, 0, 1);
      for (int i = 1; i < N; i++) if (srcq_l[i].size() < 4) add(i, 0, 0);
    end
    begin
      int hh, ll;
      hh = n_out_h0 - h0; ll = n_out_l0 - l0;
      $display("hot spot: high priority out %0d, low priority out %0d in %0d cycles", hh, ll, HOT);
      // high priority throughput equals its offered load (0.5), low priority
      // traffic fills the remaining capacity of output 0
      check(hh > HOT * 45 / 100 && hh < HOT * 55 / 100,
            $sformatf("hot spot high priority throughput %0d/%0d", hh, HOT));
      check(hh + ll > HOT * 95 / 100, $sformatf("hot spot total throughput %0d/%0d", hh + ll, HOT));
      check(hh + ll <= HOT, "output 0 carried more than one packet per cycle");
    end
    wait_drained(20000);

    // C: uniform random traffic, both classes
    for (int t = 0; t < UNI; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if ($urandom_range(0, 99) < 15 && srcq_h[i].size() < 8) add(i, $urandom_range(0, N - 1), 1);
        if ($urandom_range(0, 99) < 60 && srcq_l[i].size() < 8) add(i, $urandom_range(0, N - 1), 0);
      end
    end
    wait_drained(20000);

    $display("mechanisms: hp_conflict=%0d lp_conflict=%0d hp_stall=%0d lp_bypass=%0d dual_send=%0d packets=%0d",
             n_hconf, n_lconf, n_stall, n_bypass, n_dual, n_out);
    check(n_out == seq, "every packet delivered");
    check(n_hconf > 0,  "no high priority conflict");
    check(n_lconf > 0,  "no low priority conflict");
    check(n_stall > 0,  "no high priority backpressure stall");
    check(n_bypass > 0, "no low priority bypass");
    check(n_dual > 0,   "no dual send");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
