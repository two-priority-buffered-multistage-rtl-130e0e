// tb_dp_se: self-checking testbench of the dual priority 2x2 switching element.
//
// A cycle-accurate reference model of the four one-packet queues is kept in
// the testbench. Every cycle the testbench drives random downstream
// acceptance, random tie-break bits and random arrivals (only to queues the
// model says can accept), then compares every output and acceptance signal
// of the element with the model. It also counts how often the interesting
// cases occur (same-priority conflict, low priority packet overtaking a
// blocked high priority one, one buffer sending two packets, low priority
// held back by high priority) and fails if any never happened.
module tb_dp_se;
  import min_pkg::*;

  localparam int unsigned PKT_W   = 8;
  localparam int unsigned SEL_BIT = 7;
  localparam int unsigned CYCLES  = 20000;

  logic clk = 1'b0;
  logic rst_n;
  logic [1:0]            in_valid, in_ready_h, in_ready_l, out_valid;
  prio_e [1:0]           in_prio, out_prio;
  logic [1:0][PKT_W-1:0] in_pkt, out_pkt;
  logic [1:0]            out_ready_h, out_ready_l;
  logic [3:0]            rnd;

  dp_se #(.PKT_W(PKT_W), .SEL_BIT(SEL_BIT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hconf = 0, n_lconf = 0, n_bypass = 0, n_dual = 0, n_preempt = 0, n_moved = 0;

  // reference model state
  bit         mh_v[2], ml_v[2];
  bit [7:0]   mh[2], ml[2];
  // expected outputs
  bit         e_valid[2], e_high[2];
  bit [7:0]   e_pkt[2];
  bit         e_hleave[2], e_lleave[2];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic model_eval();
    int hc[$], lc[$], w;
    for (int i = 0; i < 2; i++) begin e_hleave[i] = 0; e_lleave[i] = 0; end
    for (int o = 0; o < 2; o++) begin
      hc.delete(); lc.delete();
      for (int i = 0; i < 2; i++) begin
        if (mh_v[i] && mh[i][SEL_BIT] == o[0]) hc.push_back(i);
        if (ml_v[i] && ml[i][SEL_BIT] == o[0]) lc.push_back(i);
      end
      e_valid[o] = 0; e_high[o] = 0; e_pkt[o] = '0;
      if (hc.size() > 0 && out_ready_h[o]) begin
        w = (hc.size() == 2) ? int'(rnd[o]) : hc[0];
        e_valid[o] = 1; e_high[o] = 1; e_pkt[o] = mh[w]; e_hleave[w] = 1;
        if (hc.size() == 2) n_hconf++;
        if (lc.size() > 0 && out_ready_l[o]) n_preempt++;
      end else if (lc.size() > 0 && out_ready_l[o]) begin
        w = (lc.size() == 2) ? int'(rnd[2+o]) : lc[0];
        e_valid[o] = 1; e_high[o] = 0; e_pkt[o] = ml[w]; e_lleave[w] = 1;
        if (lc.size() == 2) n_lconf++;
        if (hc.size() > 0) n_bypass++;
      end
    end
    for (int i = 0; i < 2; i++) if (e_hleave[i] && e_lleave[i]) n_dual++;
  endtask

  int seq = 0;
  initial begin
    rst_n = 1'b0;
    in_valid = '0; in_prio = '{PRIO_LOW, PRIO_LOW}; in_pkt = '0;
    out_ready_h = '0; out_ready_l = '0; rnd = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      // drive (after the falling edge)
      rnd = 4'($urandom);
      out_ready_h = 2'($urandom) | 2'($urandom);   // mostly accepting
      out_ready_l = 2'($urandom);
      model_eval();
      for (int i = 0; i < 2; i++) begin
        bit hi, ok;
        hi = $urandom_range(0, 2) == 0;
        ok = hi ? (!mh_v[i] || e_hleave[i]) : (!ml_v[i] || e_lleave[i]);
        in_valid[i] = ok && ($urandom_range(0, 3) != 0);
        in_prio[i]  = hi ? PRIO_HIGH : PRIO_LOW;
        in_pkt[i]   = {1'($urandom), 7'(seq++)};
      end
      #1;
      for (int o = 0; o < 2; o++) begin
        check(out_valid[o] == e_valid[o], $sformatf("out_valid[%0d]", o));
        if (e_valid[o]) begin
          check(out_prio[o] == (e_high[o] ? PRIO_HIGH : PRIO_LOW), $sformatf("out_prio[%0d]", o));
          check(out_pkt[o] == e_pkt[o], $sformatf("out_pkt[%0d] %h exp %h", o, out_pkt[o], e_pkt[o]));
          n_moved++;
        end
      end
      for (int i = 0; i < 2; i++) begin
        check(in_ready_h[i] == (!mh_v[i] || e_hleave[i]), $sformatf("in_ready_h[%0d]", i));
        check(in_ready_l[i] == (!ml_v[i] || e_lleave[i]), $sformatf("in_ready_l[%0d]", i));
      end
      @(posedge clk);
      // model update at the clock edge
      for (int i = 0; i < 2; i++) begin
        if (e_hleave[i]) mh_v[i] = 0;
        if (e_lleave[i]) ml_v[i] = 0;
        if (in_valid[i] && in_prio[i] == PRIO_HIGH) begin mh_v[i] = 1; mh[i] = in_pkt[i]; end
        if (in_valid[i] && in_prio[i] == PRIO_LOW)  begin ml_v[i] = 1; ml[i] = in_pkt[i]; end
      end
      @(negedge clk);
    end
    $display("mechanisms: hp_conflict=%0d lp_conflict=%0d lp_bypass=%0d dual_send=%0d lp_preempted=%0d moved=%0d",
             n_hconf, n_lconf, n_bypass, n_dual, n_preempt, n_moved);
    check(n_hconf > 0,   "no high priority conflict seen");
    check(n_lconf > 0,   "no low priority conflict seen");
    check(n_bypass > 0,  "no low priority bypass of a blocked high priority packet seen");
    check(n_dual > 0,    "no buffer sent two packets in one cycle");
    check(n_preempt > 0, "no low priority packet held back by high priority");
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
