// pkt_fifo: synchronous packet FIFO used as a system input FIFO.
//
// Every network input has two of these in front of it, one for high and one
// for low priority packets. It is a circular buffer of DEPTH words with a
// read and a write pointer and an occupancy counter; the head word is always
// presented on rd_data (show-ahead), so the admission logic can offer it to
// the network in the same cycle.
//
// Interface: a word is written on the clock edge when wr_en is high (only
// allowed while full is low) and the head is removed when rd_en is high
// (only allowed while empty is low); both may happen in the same cycle. A
// word written at edge t is readable from the cycle after edge t. count is the
// number of stored words. Reset is synchronous, active low, and empties the
// FIFO.
//
// The network's evaluation assumes unbounded input FIFOs; a hardware FIFO has
// to be finite, so DEPTH is this design's choice, as is the show-ahead
// organisation.
module pkt_fifo #(
  parameter int unsigned WIDTH = 22,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= incr(wr_ptr);
      if (rd_en) rd_ptr <= incr(rd_ptr);
      count <= count + CW'(wr_en) - CW'(rd_en);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full)
    else $error("pkt_fifo: write while full");
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("pkt_fifo: read while empty");

endmodule
