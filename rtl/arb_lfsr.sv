// arb_lfsr: pseudo-random bit source for the SE arbiters.
//
// Same-priority conflicts inside a switching element are resolved at random,
// so each SE owns one of these generators. It is a 16-bit Fibonacci LFSR with
// the maximal-length polynomial x^16 + x^14 + x^13 + x^11 + 1 (period 65535).
// Every clock cycle it advances OUT_W steps and presents the OUT_W bits shifted
// in during those steps, so no output bit repeats another bit of the same or
// the previous cycle. The generator type, length and polynomial are this
// design's choice; the network only requires that conflicts be resolved
// randomly and fairly.
//
// Interface: rnd is valid in every cycle after reset and changes on each
// rising clock edge. Reset (active low, synchronous) loads SEED, which must be
// non-zero.
module arb_lfsr #(
  parameter logic [15:0] SEED  = 16'hACE1,
  parameter int unsigned OUT_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [OUT_W-1:0] rnd
);

  logic [15:0] state_q;
  logic [15:0] state_d;

  always_comb begin
    state_d = state_q;
    for (int unsigned i = 0; i < OUT_W; i++) begin
      state_d = {state_d[14:0], state_d[15] ^ state_d[13] ^ state_d[12] ^ state_d[10]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= SEED;
    else        state_q <= state_d;
  end

  assign rnd = state_q[OUT_W-1:0];

  initial begin
    assert (SEED != 16'd0) else $error("arb_lfsr: SEED must be non-zero");
    assert (OUT_W >= 1 && OUT_W <= 16) else $error("arb_lfsr: OUT_W out of range");
  end

endmodule
