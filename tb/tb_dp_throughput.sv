// tb_dp_throughput: throughput of the dual priority system (64x64
// as written; set NS to 10 for the 1024x1024 network, which takes long to build)
// under uniform traffic, mostly at full input load (one packet offered to
// every input in every cycle), for several shares of high priority traffic G_h.
//
// For each G_h the system is reset, warmed up and then measured: the total
// and per-class output throughput per output per cycle are printed. Checks:
//   * with a single class (G_h = 1 or G_h = 0) the network behaves as a
//     single priority MIN and saturates near 0.39 for 64x64 (accepted band
//     0.33-0.45; 0.27-0.38 for 1024x1024);
//   * with both classes present (G_h = 0.3 and 0.5) the total throughput
//     is clearly higher (at least 15% above the single class value), because
//     low priority packets use links that blocked high priority packets
//     leave idle;
//   * below its saturation, high priority throughput equals the high
//     priority load (G_h = 0.1: within 0.1 +- 0.015);
//   * with a total load below saturation (G_h = 0.1, G_l = 0.2) both
//     classes are carried in full;
//   * hot spot (all inputs to output 0 at the same load, input 0 high
//     priority, the others low priority) for loads 0.25 to 1: the high
//     priority throughput equals its load and output 0 is busy every cycle.
// Packets refused by a full input FIFO are dropped by the source, which does
// not change the saturation throughput.
module tb_dp_throughput;
  import min_pkg::*;

  localparam int unsigned NS     = 6;
  localparam int unsigned DW     = 16;
  localparam int unsigned N      = 2 ** NS;
  localparam int unsigned WARM   = 1000;
  localparam int unsigned MEAS   = 3000;
  // expected single class saturation band; larger networks saturate lower
  localparam real SAT_LO = (NS >= 10) ? 0.27 : (NS >= 6) ? 0.33 : 0.38;
  localparam real SAT_HI = (NS >= 10) ? 0.38 : (NS >= 6) ? 0.45 : 0.55;

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

  dp_system #(.N_STAGES(NS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int gh_pct = 0;
  int gl_pct = 100;
  bit hot = 0;                // hot spot: all to output 0, only input 0 high priority
  bit running = 0, measuring = 0;
  longint n_h = 0, n_l = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      int r;
      r = $urandom_range(0, 99);
      if (hot) begin
        in_valid[i] = running && (r < gh_pct);
        in_prio[i]  = (i == 0) ? PRIO_HIGH : PRIO_LOW;
        in_dest[i]  = '0;
      end else begin
        in_valid[i] = running && (r < gh_pct + gl_pct);
        in_prio[i]  = (r < gh_pct) ? PRIO_HIGH : PRIO_LOW;
        in_dest[i]  = NS'($urandom_range(0, N - 1));
      end
      in_data[i]  = DW'(i);
    end
  end

  always @(posedge clk) if (measuring) begin
    for (int o = 0; o < N; o++) if (out_valid[o]) begin
      if (out_prio[o] == PRIO_HIGH) n_h++; else n_l++;
      if (int'(out_dest[o]) != o) begin
        failures++;
        $display("FAIL: packet for %0d left at output %0d", out_dest[o], o);
      end
    end
  end

  task automatic run(input int pct, output real s_tot, output real s_h, input int lpct = -1);
    gh_pct = pct;
    gl_pct = (lpct < 0) ? 100 - pct : lpct;
    rst_n = 1'b0;
    running = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    running = 1;
    repeat (WARM) @(posedge clk);
    n_h = 0; n_l = 0;
    measuring = 1;
    repeat (MEAS) @(posedge clk);
    measuring = 0;
    running = 0;
    s_h   = real'(n_h) / real'(MEAS * N);
    s_tot = real'(n_h + n_l) / real'(MEAS * N);
    if (hot) begin
      s_h   = real'(n_h) / real'(MEAS);
      s_tot = real'(n_h + n_l) / real'(MEAS);
      $display("hot spot, load %0.2f per input: output 0 carries %0.4f high, %0.4f low",
               real'(gh_pct) / 100.0, s_h, s_tot - s_h);
    end else
    $display("G_h=%0.2f G_l=%0.2f: total throughput %0.4f, high %0.4f, low %0.4f",
             real'(gh_pct) / 100.0, real'(gl_pct) / 100.0, s_tot, s_h, s_tot - s_h);
  endtask

  initial begin
    real t100, h100, t0, h0, t50, h50, t30, h30, t10, h10, tlo, hlo;
    run(100, t100, h100);
    run(0,   t0,   h0);
    run(50,  t50,  h50);
    run(30,  t30,  h30);
    run(10,  t10,  h10);
    run(10,  tlo,  hlo, 20);
    check(t100 > SAT_LO && t100 < SAT_HI, "single class (high only) saturation throughput out of band");
    check(t0 > SAT_LO && t0 < SAT_HI,     "single class (low only) saturation throughput out of band");
    check(t50 > 1.15 * t100, "two classes do not raise the total throughput (G_h=0.5)");
    check(t30 > 1.15 * t100, "two classes do not raise the total throughput (G_h=0.3)");
    check(h10 > 0.085 && h10 < 0.115, "high priority throughput differs from its load (G_h=0.1)");
    check(hlo > 0.085 && hlo < 0.115 && tlo - hlo > 0.18 && tlo - hlo < 0.22,
          "below saturation (G_h=0.1, G_l=0.2) not all offered traffic is carried");
    // hot spot sweep: input 0 gets exactly its offered load, output 0 stays busy
    hot = 1;
    for (int ld = 25; ld <= 100; ld += 25) begin
      real ht, hh;
      run(ld, ht, hh);
      check(hh > real'(ld) / 100.0 - 0.03 && hh < real'(ld) / 100.0 + 0.03,
            $sformatf("hot spot load %0d%%: high priority throughput %0.3f", ld, hh));
      check(ht > 0.97, $sformatf("hot spot load %0d%%: output 0 throughput %0.3f", ld, ht));
    end
    hot = 0;
    check(h50 < t100 + 0.03, "high priority throughput above single class saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (11 * (WARM + MEAS + 10) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
