// dp_se: 2x2 single buffered dual priority switching element.
//
// Each of the two input links has a buffer made of two one-packet queues, one
// for high priority and one for low priority packets, and a non-blocking 2x2
// switching matrix connects the four queues to the two output links. The
// routing digit of a queued packet (bit SEL_BIT of the packet word) selects
// its output link.
//
// Per output link and per clock cycle:
//   * among the high priority queues whose packet heads for this output, one
//     is chosen (at random through rnd when both do), and it is sent if the
//     downstream high priority queue can accept it (out_ready_h);
//   * only if no high priority packet is sent on this output, the same is
//     done for the low priority queues with out_ready_l.
// So high priority packets have strict priority, a low priority packet may
// use an output whose high priority contender is blocked downstream, and one
// input buffer may send two packets in one cycle (high on one output, low on
// the other). At most one packet leaves on each output link.
//
// Flow control follows the two-phase cycle of the network: within a clock
// cycle the acceptance signals travel backwards (combinationally) and the
// packets then move on the clock edge. A queue accepts a packet when it is
// empty or when its packet leaves in the same cycle:
//   in_ready_h[i] = !hq_valid[i] || high packet of input i is sent now
// (likewise in_ready_l). in_ready_* depend combinationally on out_ready_*
// and rnd, never on in_valid.
//
// Interface and timing: out_valid[o] marks a packet transferred on output o
// in this cycle; it is only raised when the matching out_ready_* is high, so
// the receiver must take it at the next rising edge. in_valid[i] must only be
// raised with the matching in_ready_* high. A packet written into a queue on
// one edge can leave on the next edge (one cycle per stage). rnd[o] breaks
// high priority ties at output o (1 = input 1 wins), rnd[2+o] low priority
// ties. Reset is synchronous, active low, and empties all queues.
//
// The queue organisation, the service rules and the acceptance rule follow the
// network's description; the packet word layout, the tie-break inputs and the
// reset are this design's choices.
module dp_se
  import min_pkg::*;
#(
  parameter int unsigned PKT_W   = 22,
  parameter int unsigned SEL_BIT = 21
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // input links (from the previous stage or the input ports)
  input  logic [1:0]            in_valid,
  input  prio_e [1:0]           in_prio,
  input  logic [1:0][PKT_W-1:0] in_pkt,
  output logic [1:0]            in_ready_h,
  output logic [1:0]            in_ready_l,
  // output links (to the next stage or the network outputs)
  output logic [1:0]            out_valid,
  output prio_e [1:0]           out_prio,
  output logic [1:0][PKT_W-1:0] out_pkt,
  input  logic [1:0]            out_ready_h,
  input  logic [1:0]            out_ready_l,
  // random tie-break bits: [1:0] high priority, [3:2] low priority
  input  logic [3:0]            rnd
);

  logic [1:0]            hq_valid, lq_valid;
  logic [1:0][PKT_W-1:0] hq_pkt, lq_pkt;

  logic [1:0] h_go, l_go;        // a high / low packet is sent on output o
  logic [1:0] h_sel, l_sel;      // which input wins output o
  logic [1:0] h_leave, l_leave;  // queue of input i is served this cycle

  always_comb begin
    logic [1:0] hreq, lreq;
    h_go    = '0;
    l_go    = '0;
    h_sel   = '0;
    l_sel   = '0;
    h_leave = '0;
    l_leave = '0;
    for (int o = 0; o < 2; o++) begin
      for (int i = 0; i < 2; i++) begin
        hreq[i] = hq_valid[i] && (hq_pkt[i][SEL_BIT] == 1'(o));
        lreq[i] = lq_valid[i] && (lq_pkt[i][SEL_BIT] == 1'(o));
      end
      h_sel[o] = (hreq == 2'b11) ? rnd[o]   : hreq[1];
      l_sel[o] = (lreq == 2'b11) ? rnd[2+o] : lreq[1];
      h_go[o]  = (hreq != 2'b00) && out_ready_h[o];
      l_go[o]  = !h_go[o] && (lreq != 2'b00) && out_ready_l[o];
      if (h_go[o]) h_leave[h_sel[o]] = 1'b1;
      if (l_go[o]) l_leave[l_sel[o]] = 1'b1;
    end
  end

  always_comb begin
    for (int o = 0; o < 2; o++) begin
      out_valid[o] = h_go[o] || l_go[o];
      out_prio[o]  = h_go[o] ? PRIO_HIGH : PRIO_LOW;
      out_pkt[o]   = h_go[o] ? hq_pkt[h_sel[o]] : lq_pkt[l_sel[o]];
    end
    in_ready_h = ~hq_valid | h_leave;
    in_ready_l = ~lq_valid | l_leave;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++) begin
      if (!rst_n) begin
        hq_valid[i] <= 1'b0;
        lq_valid[i] <= 1'b0;
      end else begin
        hq_valid[i] <= (hq_valid[i] && !h_leave[i]) || (in_valid[i] && in_prio[i] == PRIO_HIGH);
        lq_valid[i] <= (lq_valid[i] && !l_leave[i]) || (in_valid[i] && in_prio[i] == PRIO_LOW);
      end
      if (in_valid[i] && in_prio[i] == PRIO_HIGH) hq_pkt[i] <= in_pkt[i];
      if (in_valid[i] && in_prio[i] == PRIO_LOW)  lq_pkt[i] <= in_pkt[i];
    end
  end

  // Handshake rules of the backpressure protocol.
  for (genvar i = 0; i < 2; i++) begin : g_chk
    a_in_h : assert property (@(posedge clk) disable iff (!rst_n)
      (in_valid[i] && in_prio[i] == PRIO_HIGH) |-> in_ready_h[i])
      else $error("dp_se: high priority packet sent to a full queue");
    a_in_l : assert property (@(posedge clk) disable iff (!rst_n)
      (in_valid[i] && in_prio[i] == PRIO_LOW) |-> in_ready_l[i])
      else $error("dp_se: low priority packet sent to a full queue");
    a_out : assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[i] |-> (out_prio[i] == PRIO_HIGH ? out_ready_h[i] : out_ready_l[i]))
      else $error("dp_se: packet sent without downstream acceptance");
  end

endmodule
