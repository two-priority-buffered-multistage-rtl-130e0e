// dp_input_port: one input port of the dual priority system.
//
// An arriving packet is stored in the high priority input FIFO or in the low
// priority input FIFO according to its class. Each cycle the port offers at
// most one packet to its network input link, with strict priority:
//   * the head of the high priority FIFO enters when the network input can
//     accept a high priority packet (min_ready_h);
//   * otherwise (high FIFO empty, or its packet cannot enter) the head of the
//     low priority FIFO enters when the network input can accept a low
//     priority packet (min_ready_l).
// Packets keep their arrival order within a class.
//
// Interface: arr_valid/arr_prio/arr_pkt carry at most one arriving packet per
// cycle; arr_ready tells whether the FIFO of the offered class has room (it
// depends combinationally on arr_prio) and a packet offered while arr_ready is
// low is not taken. min_valid/min_prio/min_pkt is the packet entering the
// network in this cycle; it is raised only together with the matching
// min_ready_*, which the network computes in the same cycle. A packet that
// arrives at edge t can enter the network from the cycle after edge t.
// hq_count/lq_count give the FIFO occupancies. Reset is synchronous, active
// low.
//
// The two FIFOs per input and the admission rule follow the design's
// description; the FIFO depth and the refusal of arrivals to a full FIFO are
// this design's choices (the evaluation assumes unbounded FIFOs).
module dp_input_port
  import min_pkg::*;
#(
  parameter int unsigned PKT_W      = 22,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // arrivals
  input  logic             arr_valid,
  input  prio_e            arr_prio,
  input  logic [PKT_W-1:0] arr_pkt,
  output logic             arr_ready,
  // network input link
  output logic             min_valid,
  output prio_e            min_prio,
  output logic [PKT_W-1:0] min_pkt,
  input  logic             min_ready_h,
  input  logic             min_ready_l,
  // FIFO occupancies
  output logic [CW-1:0]    hq_count,
  output logic [CW-1:0]    lq_count
);

  logic             h_full, h_empty, l_full, l_empty;
  logic [PKT_W-1:0] h_head, l_head;
  logic             h_push, l_push, h_send, l_send;

  assign arr_ready = (arr_prio == PRIO_HIGH) ? !h_full : !l_full;
  assign h_push    = arr_valid && arr_prio == PRIO_HIGH && !h_full;
  assign l_push    = arr_valid && arr_prio == PRIO_LOW  && !l_full;

  assign h_send    = !h_empty && min_ready_h;
  assign l_send    = !h_send && !l_empty && min_ready_l;

  assign min_valid = h_send || l_send;
  assign min_prio  = h_send ? PRIO_HIGH : PRIO_LOW;
  assign min_pkt   = h_send ? h_head : l_head;

  pkt_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_hfifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (h_push),
    .wr_data (arr_pkt),
    .full    (h_full),
    .rd_en   (h_send),
    .rd_data (h_head),
    .empty   (h_empty),
    .count   (hq_count)
  );

  pkt_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_lfifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (l_push),
    .wr_data (arr_pkt),
    .full    (l_full),
    .rd_en   (l_send),
    .rd_data (l_head),
    .empty   (l_empty),
    .count   (lq_count)
  );

endmodule
