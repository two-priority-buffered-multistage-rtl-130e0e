// tb_dp_system: end-to-end testbench of the 64x64 dual priority system at its
// default parameters.
//
// Each system input receives at most one packet per cycle; a packet refused
// because the FIFO of its class is full is counted and dropped by the source.
// Every accepted packet carries {source, per-source sequence number} as its
// payload. A scoreboard checks that each accepted packet leaves exactly once,
// on the output given by its address, with its class, and records its total
// delay (arrival at the system input to departure from the network).
// Phases:
//   A. isolated packets: total delay must be exactly N_STAGES+1 cycles
//      (one cycle in the input FIFO, one per stage);
//   B. hot spot: every input sends to output 0 at load 0.5; input 0 sends
//      high priority, all others low priority. High priority throughput must
//      equal its offered load 0.5 and output 0 must stay busy (low priority
//      takes the rest).
//   C. uniform traffic, high priority load 0.1. Run C1 has no low priority
//      traffic; after a reset run C2 repeats exactly the same high priority
//      arrivals together with low priority load 0.5 (total load above the
//      network's saturation throughput). Every high priority packet must see
//      the same delay in both runs: high priority traffic is unaffected by
//      low priority traffic.
// Mechanisms counted (each must occur): same-priority conflicts in SEs,
// backpressure stalls, low priority packets passing a blocked high priority
// one in an SE and at an input port, buffers sending two packets at once,
// high priority admitted ahead of waiting low priority, full input FIFOs.
module tb_dp_system;
  import min_pkg::*;

  localparam int unsigned NS  = 6;      // defaults of dp_system
  localparam int unsigned DW  = 16;
  localparam int unsigned N   = 2 ** NS;
  localparam int unsigned HOT = 3000;
  localparam int unsigned UNI = 2500;

  logic clk = 1'b0;
  logic rst_n;
  logic          in_valid [N];
  prio_e         in_prio  [N];
  logic [NS-1:0] in_dest  [N];
  logic [DW-1:0] in_data  [N];
  logic          in_ready [N];
  logic          out_valid [N];
  prio_e         out_prio  [N];
  logic [NS-1:0] out_dest  [N];
  logic [DW-1:0] out_data  [N];

  dp_system dut (.*);

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

  // ---------------------------------------------------------------- sources
  typedef enum int { M_IDLE, M_ISO, M_HOT, M_UNI } mode_e;
  mode_e mode = M_IDLE;
  int    lp_pct = 0;          // low priority load in percent (uniform mode)
  int    iso_src = -1, iso_dst = 0;
  bit    iso_high = 0;
  int    seqno [N];
  int    hp_idx [N];          // index of accepted high priority packets per source
  bit    hot_hit;

  function automatic int unsigned mix(int unsigned x);
    x ^= x >> 16; x *= 32'h7feb352d;
    x ^= x >> 15; x *= 32'h846ca68b;
    x ^= x >> 16;
    return x;
  endfunction

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 1'b0;
      in_prio[i]  = PRIO_LOW;
      in_dest[i]  = '0;
      in_data[i]  = {NS'(i), 10'(seqno[i])};
      case (mode)
        M_ISO: if (i == iso_src) begin
          in_valid[i] = 1'b1; in_prio[i] = iso_high ? PRIO_HIGH : PRIO_LOW; in_dest[i] = NS'(iso_dst);
        end
        M_HOT: if ($urandom_range(0, 1) == 0) begin
          in_valid[i] = 1'b1; in_prio[i] = (i == 0) ? PRIO_HIGH : PRIO_LOW; in_dest[i] = '0;
        end
        M_UNI: begin
          // high priority arrivals are a fixed function of (cycle, input)
          int unsigned h;
          h = mix(32'(cyc) * 32'd977 + 32'(i) * 32'd65537 + 32'h1234567);
          if (h % 1000 < 100) begin
            in_valid[i] = 1'b1; in_prio[i] = PRIO_HIGH; in_dest[i] = NS'(mix(h) % N);
          end else if ($urandom_range(0, 99) < lp_pct) begin
            in_valid[i] = 1'b1; in_prio[i] = PRIO_LOW; in_dest[i] = NS'($urandom_range(0, N - 1));
          end
        end
        default: ;
      endcase
    end
  end
  always @(negedge clk) if (mode == M_ISO) iso_src <= -1;

  // ------------------------------------------------------------- scoreboard
  typedef struct { int dest; bit high; longint t_in; int hp_k; } info_t;
  info_t inflight [int];
  int n_acc = 0, n_out = 0, n_ref_h = 0, n_ref_l = 0;
  int n_out0_h = 0, n_out0_l = 0;
  longint delay_sum_h = 0; int delay_cnt_h = 0;
  bit check_iso = 0;
  bit rec_run = 0, cmp_run = 0;
  longint hp_delay [int];
  int n_cmp = 0, n_cmp_bad = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) if (in_valid[i]) begin
        if (in_ready[i]) begin
          int key;
          key = int'({in_data[i]});
          check(!inflight.exists(key), "payload key reused while in flight");
          inflight[key] = '{dest: int'(in_dest[i]), high: in_prio[i] == PRIO_HIGH, t_in: cyc,
                            hp_k: (in_prio[i] == PRIO_HIGH) ? i * 100000 + hp_idx[i] : -1};
          if (in_prio[i] == PRIO_HIGH) hp_idx[i]++;
          seqno[i]++;
          n_acc++;
        end else if (in_prio[i] == PRIO_HIGH) n_ref_h++;
        else n_ref_l++;
      end
      for (int o = 0; o < N; o++) if (out_valid[o]) begin
        int key;
        key = int'(out_data[o]);
        n_out++;
        if (!inflight.exists(key)) check(0, $sformatf("unknown or duplicated packet %h at output %0d", key, o));
        else begin
          longint d;
          d = cyc - inflight[key].t_in;
          check(int'(out_dest[o]) == o && inflight[key].dest == o, $sformatf("packet %h left at output %0d", key, o));
          check(inflight[key].high == (out_prio[o] == PRIO_HIGH), "class changed");
          if (check_iso) check(d == NS + 1, $sformatf("isolated packet delay %0d, expected %0d", d, NS + 1));
          if (inflight[key].high) begin
            delay_sum_h += d; delay_cnt_h++;
            if (rec_run) hp_delay[inflight[key].hp_k] = d;
            if (cmp_run) begin
              n_cmp++;
              if (!hp_delay.exists(inflight[key].hp_k) || hp_delay[inflight[key].hp_k] != d) n_cmp_bad++;
            end
          end
          if (o == 0) begin
            if (out_prio[o] == PRIO_HIGH) n_out0_h++; else n_out0_l++;
          end
          inflight.delete(key);
        end
      end
      cyc++;
    end
  end

  // ------------------------------------------------------------ mechanisms
  int n_hconf = 0, n_lconf = 0, n_stall = 0, n_bypass = 0, n_dual = 0;
  int n_adm_hfirst = 0, n_adm_lpass = 0;
  for (genvar k = 0; k < NS; k++) begin : g_mk
    for (genvar j = 0; j < N / 2; j++) begin : g_mj
      always @(posedge clk) if (rst_n) begin
        for (int o = 0; o < 2; o++) begin
          int hr, lr;
          hr = 0; lr = 0;
          for (int i = 0; i < 2; i++) begin
            if (dut.u_min.g_stage[k].g_se[j].u_se.hq_valid[i] &&
                dut.u_min.g_stage[k].g_se[j].u_se.hq_pkt[i][DW + NS - 1 - k] == o[0]) hr++;
            if (dut.u_min.g_stage[k].g_se[j].u_se.lq_valid[i] &&
                dut.u_min.g_stage[k].g_se[j].u_se.lq_pkt[i][DW + NS - 1 - k] == o[0]) lr++;
          end
          if (hr == 2) n_hconf++;
          if (lr == 2) n_lconf++;
          if (hr > 0 && dut.u_min.g_stage[k].g_se[j].u_se.l_go[o]) n_bypass++;
        end
        for (int i = 0; i < 2; i++) begin
          if (dut.u_min.g_stage[k].g_se[j].u_se.hq_valid[i] && !dut.u_min.g_stage[k].g_se[j].u_se.h_leave[i]) n_stall++;
          if (dut.u_min.g_stage[k].g_se[j].u_se.h_leave[i] && dut.u_min.g_stage[k].g_se[j].u_se.l_leave[i]) n_dual++;
        end
      end
    end
  end
  for (genvar i = 0; i < N; i++) begin : g_mp
    always @(posedge clk) if (rst_n) begin
      if (dut.g_port[i].u_port.h_send && !dut.g_port[i].u_port.l_empty) n_adm_hfirst++;
      if (dut.g_port[i].u_port.l_send && !dut.g_port[i].u_port.h_empty) n_adm_lpass++;
    end
  end

  // ------------------------------------------------------------------ phases
  task automatic do_reset();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    #2;
    rst_n = 1'b1;
  endtask

  task automatic drain(int limit);
    int w = 0;
    mode = M_IDLE;
    while (inflight.size() != 0 && w < limit) begin
      @(posedge clk);
      w++;
    end
    check(inflight.size() == 0, $sformatf("%0d packets not delivered", inflight.size()));
  endtask

  initial begin
    int h0, l0, acc0, out0;
    for (int i = 0; i < N; i++) begin seqno[i] = 0; hp_idx[i] = 0; end
    do_reset();

    // A: isolated packets
    check_iso = 1;
    for (int p = 0; p < 40; p++) begin
      @(negedge clk);
      iso_src = $urandom_range(0, N - 1); iso_dst = $urandom_range(0, N - 1); iso_high = p[0];
      mode = M_ISO;
      @(posedge clk);
      #1 mode = M_IDLE;
      repeat (NS + 4) @(posedge clk);
    end
    drain(100);
    check_iso = 0;

    // B: hot spot
    h0 = n_out0_h; l0 = n_out0_l;
    @(negedge clk);
    mode = M_HOT;
    repeat (HOT) @(posedge clk);
    begin
      int hh, ll;
      hh = n_out0_h - h0; ll = n_out0_l - l0;
      $display("hot spot: output 0 carried %0d high and %0d low priority packets in %0d cycles", hh, ll, HOT);
      check(hh > HOT * 45 / 100 && hh < HOT * 55 / 100, $sformatf("high priority throughput %0d/%0d", hh, HOT));
      check(hh + ll > HOT * 95 / 100, $sformatf("output 0 throughput %0d/%0d", hh + ll, HOT));
      check(n_ref_h == 0, "high priority arrival refused in hot spot");
    end
    drain(5000);

    // C1: uniform, high priority only
    do_reset();
    for (int i = 0; i < N; i++) hp_idx[i] = 0;
    cyc = 0;
    rec_run = 1; lp_pct = 0;
    delay_sum_h = 0; delay_cnt_h = 0;
    @(negedge clk);
    mode = M_UNI;
    repeat (UNI) @(posedge clk);
    drain(5000);
    rec_run = 0;
    $display("uniform G_h=0.1 G_l=0:   %0d high priority packets, mean delay %0.3f",
             delay_cnt_h, real'(delay_sum_h) / real'(delay_cnt_h));

    // C2: same high priority arrivals plus low priority load 0.5
    do_reset();
    for (int i = 0; i < N; i++) hp_idx[i] = 0;
    cyc = 0;
    cmp_run = 1; lp_pct = 50;
    delay_sum_h = 0; delay_cnt_h = 0;
    acc0 = n_acc; out0 = n_out;
    @(negedge clk);
    mode = M_UNI;
    repeat (UNI) @(posedge clk);
    drain(20000);
    cmp_run = 0;
    $display("uniform G_h=0.1 G_l=0.5: %0d high priority packets, mean delay %0.3f, total throughput %0.3f",
             delay_cnt_h, real'(delay_sum_h) / real'(delay_cnt_h), real'(n_out - out0) / real'(UNI * N));
    check(n_cmp == hp_delay.size() && n_cmp > 0, $sformatf("high priority packets %0d vs %0d", n_cmp, hp_delay.size()));
    check(n_cmp_bad == 0, $sformatf("%0d high priority packets changed delay under low priority load", n_cmp_bad));
    check(n_ref_h == 0, "high priority arrival refused");

    $display("mechanisms: hp_conflict=%0d lp_conflict=%0d hp_stall=%0d lp_bypass_se=%0d dual_send=%0d adm_high_first=%0d adm_low_past_high=%0d refused_low=%0d",
             n_hconf, n_lconf, n_stall, n_bypass, n_dual, n_adm_hfirst, n_adm_lpass, n_ref_l);
    check(n_out == n_acc, "every accepted packet delivered");
    check(n_hconf > 0,      "no high priority conflict");
    check(n_lconf > 0,      "no low priority conflict");
    check(n_stall > 0,      "no backpressure stall");
    check(n_bypass > 0,     "no low priority bypass in an SE");
    check(n_dual > 0,       "no dual send");
    check(n_adm_hfirst > 0, "high priority never admitted ahead of low priority");
    check(n_adm_lpass > 0,  "low priority never admitted past a blocked high priority packet");
    check(n_ref_l > 0,      "no input FIFO ever full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
