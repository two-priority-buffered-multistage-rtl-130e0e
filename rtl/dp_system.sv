// dp_system: N x N dual priority switch built around an internally two
// priority buffered delta-2 multistage interconnection network.
//
// Main idea: packets belong to a high or a low priority class, and the class
// is kept all the way through the fabric. Every system input has a high and a
// low priority input FIFO (dp_input_port) and every SE input buffer of the
// MIN (dp_min, made of dp_se elements) has one queue per class. High priority
// packets always win, so they see the network as if low priority traffic
// were absent; low priority packets use every link and output that high
// priority traffic leaves idle, including outputs whose high priority
// contender is blocked further downstream.
//
// Interface: in_valid/in_prio/in_dest/in_data offer at most one packet per
// input per cycle; it is stored when in_ready is high (room in the FIFO of
// its class) and dropped otherwise, so a source that must not lose packets
// holds it while in_ready is low. A packet leaves on network output in_dest
// with out_valid high for one cycle, carrying its class, address and data.
// The outputs cannot be stalled. With an empty network a packet arriving at
// edge t leaves in the cycle that ends at edge t+1+N_STAGES (one cycle in the
// input FIFO, one per stage). Reset is synchronous, active low.
//
// Follows the design's description: the two FIFOs per input, strict priority
// admission, the SE organisation, flow control and network topology.
// This design's choices: finite FIFO_DEPTH (the evaluation assumes unbounded
// FIFOs), the DATA_W payload, the LFSR-based random arbitration and the reset.
module dp_system
  import min_pkg::*;
#(
  parameter int unsigned N_STAGES   = 6,
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter logic [15:0] SEED       = 16'hACE1,
  localparam int unsigned N         = 2 ** N_STAGES,
  localparam int unsigned PKT_W     = N_STAGES + DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // system inputs
  input  logic                in_valid [N],
  input  prio_e               in_prio  [N],
  input  logic [N_STAGES-1:0] in_dest  [N],
  input  logic [DATA_W-1:0]   in_data  [N],
  output logic                in_ready [N],
  // network outputs
  output logic                out_valid [N],
  output prio_e               out_prio  [N],
  output logic [N_STAGES-1:0] out_dest  [N],
  output logic [DATA_W-1:0]   out_data  [N]
);

  logic  [N-1:0]            m_valid, m_rdy_h, m_rdy_l, o_valid;
  prio_e [N-1:0]            m_prio, o_prio;
  logic  [N-1:0][PKT_W-1:0] m_pkt, o_pkt;

  for (genvar i = 0; i < N; i++) begin : g_port
    dp_input_port #(
      .PKT_W      (PKT_W),
      .FIFO_DEPTH (FIFO_DEPTH)
    ) u_port (
      .clk         (clk),
      .rst_n       (rst_n),
      .arr_valid   (in_valid[i]),
      .arr_prio    (in_prio[i]),
      .arr_pkt     ({in_dest[i], in_data[i]}),
      .arr_ready   (in_ready[i]),
      .min_valid   (m_valid[i]),
      .min_prio    (m_prio[i]),
      .min_pkt     (m_pkt[i]),
      .min_ready_h (m_rdy_h[i]),
      .min_ready_l (m_rdy_l[i]),
      .hq_count    (),
      .lq_count    ()
    );

    assign out_valid[i] = o_valid[i];
    assign out_prio[i]  = o_prio[i];
    assign out_dest[i]  = o_pkt[i][PKT_W-1:DATA_W];
    assign out_data[i]  = o_pkt[i][DATA_W-1:0];
  end

  dp_min #(
    .N_STAGES (N_STAGES),
    .DATA_W   (DATA_W),
    .SEED     (SEED)
  ) u_min (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (m_valid),
    .in_prio    (m_prio),
    .in_pkt     (m_pkt),
    .in_ready_h (m_rdy_h),
    .in_ready_l (m_rdy_l),
    .out_valid  (o_valid),
    .out_prio   (o_prio),
    .out_pkt    (o_pkt)
  );

endmodule
