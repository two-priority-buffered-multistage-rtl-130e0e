// dp_min: N x N single buffered dual priority delta-2 MIN.
//
// N_STAGES stages of N/2 dual priority 2x2 switching elements (dp_se),
// N = 2**N_STAGES. A packet word is {dest, data}, dest being the N_STAGES-bit
// network output address. Stage s (1..N_STAGES) steers on dest bit
// N_STAGES-s, so the most significant address bit is used first, and between
// stage s and s+1 output link l goes to input link l with bit 0 and bit
// N_STAGES-s exchanged (see min_pkg::next_link). This is the unique-path
// wiring of the 8x8 example network extended to any size; packets reach
// network output `dest`.
//
// Flow control: the acceptance signals (one for the high and one for the low
// priority queue of every SE input) are computed combinationally from the
// last stage back to the first in the first part of the cycle, and packets
// move one stage on the clock edge. The network outputs never block, so the
// last stage always sees acceptance. Each SE has its own arb_lfsr for random
// same-priority conflict resolution, seeded from SEED and its position.
//
// Interface: in_valid[i] may be raised for a high priority packet only while
// in_ready_h[i] is high, and for a low one only while in_ready_l[i] is high;
// the packet is then taken on the clock edge. out_valid[o] marks a packet
// leaving network output o in this cycle. An unobstructed packet taken at
// edge t appears on its output in the cycle that ends at edge t+N_STAGES
// (one cycle per stage). Reset is synchronous, active low.
//
// The network structure, routing and flow control follow the design's
// description; the link wiring is read from the 8x8 example drawing; the
// random source and the packet word layout are this design's choices.
module dp_min
  import min_pkg::*;
#(
  parameter int unsigned N_STAGES = 6,
  parameter int unsigned DATA_W   = 16,
  parameter logic [15:0] SEED     = 16'hACE1,
  localparam int unsigned N       = 2 ** N_STAGES,
  localparam int unsigned PKT_W   = N_STAGES + DATA_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          in_valid,
  input  prio_e [N-1:0]         in_prio,
  input  logic [N-1:0][PKT_W-1:0] in_pkt,
  output logic [N-1:0]          in_ready_h,
  output logic [N-1:0]          in_ready_l,
  output logic [N-1:0]          out_valid,
  output prio_e [N-1:0]         out_prio,
  output logic [N-1:0][PKT_W-1:0] out_pkt
);

  // Link bundles at the input (si_*) and output (so_*) of every stage.
  logic  [N_STAGES-1:0][N-1:0]            si_valid, so_valid;
  prio_e [N_STAGES-1:0][N-1:0]            si_prio,  so_prio;
  logic  [N_STAGES-1:0][N-1:0][PKT_W-1:0] si_pkt,   so_pkt;
  logic  [N_STAGES-1:0][N-1:0]            si_rdy_h, si_rdy_l, so_rdy_h, so_rdy_l;

  assign si_valid[0] = in_valid;
  assign si_prio[0]  = in_prio;
  assign si_pkt[0]   = in_pkt;
  assign in_ready_h  = si_rdy_h[0];
  assign in_ready_l  = si_rdy_l[0];

  assign out_valid = so_valid[N_STAGES-1];
  assign out_prio  = so_prio[N_STAGES-1];
  assign out_pkt   = so_pkt[N_STAGES-1];
  assign so_rdy_h[N_STAGES-1] = '1;  // no blocking at the network outputs
  assign so_rdy_l[N_STAGES-1] = '1;

  for (genvar k = 0; k < N_STAGES; k++) begin : g_stage
    for (genvar j = 0; j < N / 2; j++) begin : g_se
      logic [3:0] rnd;

      arb_lfsr #(
        .SEED  (se_seed(SEED, k * (N / 2) + j)),
        .OUT_W (4)
      ) u_lfsr (
        .clk   (clk),
        .rst_n (rst_n),
        .rnd   (rnd)
      );

      dp_se #(
        .PKT_W   (PKT_W),
        .SEL_BIT (DATA_W + route_bit(N_STAGES, k + 1))
      ) u_se (
        .clk         (clk),
        .rst_n       (rst_n),
        .in_valid    (si_valid[k][2*j+1 : 2*j]),
        .in_prio     (si_prio[k][2*j+1 : 2*j]),
        .in_pkt      (si_pkt[k][2*j+1 : 2*j]),
        .in_ready_h  (si_rdy_h[k][2*j+1 : 2*j]),
        .in_ready_l  (si_rdy_l[k][2*j+1 : 2*j]),
        .out_valid   (so_valid[k][2*j+1 : 2*j]),
        .out_prio    (so_prio[k][2*j+1 : 2*j]),
        .out_pkt     (so_pkt[k][2*j+1 : 2*j]),
        .out_ready_h (so_rdy_h[k][2*j+1 : 2*j]),
        .out_ready_l (so_rdy_l[k][2*j+1 : 2*j]),
        .rnd         (rnd)
      );
    end

    // Interstage permutation from stage k+1 to stage k+2 (stages counted 1..n).
    if (k < N_STAGES - 1) begin : g_link
      for (genvar l = 0; l < N; l++) begin : g_l
        localparam int unsigned NL = next_link(N_STAGES, k + 1, l);
        assign si_valid[k+1][NL] = so_valid[k][l];
        assign si_prio[k+1][NL]  = so_prio[k][l];
        assign si_pkt[k+1][NL]   = so_pkt[k][l];
        assign so_rdy_h[k][l]    = si_rdy_h[k+1][NL];
        assign so_rdy_l[k][l]    = si_rdy_l[k+1][NL];
      end
    end
  end

endmodule
