// tb_pkt_fifo: self-checking testbench of the input packet FIFO.
//
// A depth that is not a power of two is used so that pointer wrap-around is
// exercised. Random writes and reads (only where full/empty allow them) are
// applied for many cycles, with phases biased towards filling and towards
// draining; the head word, full, empty and count are compared with a
// SystemVerilog queue every cycle.
module tb_pkt_fifo;

  localparam int unsigned WIDTH  = 12;
  localparam int unsigned DEPTH  = 5;
  localparam int unsigned CYCLES = 20000;

  logic clk = 1'b0;
  logic rst_n;
  logic wr_en, rd_en, full, empty;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  pkt_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0, n_both = 0;
  logic [WIDTH-1:0] model[$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    int bias;
    rst_n = 1'b0; wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      bias = ((c / 200) % 2 == 0) ? 3 : 1;   // alternate filling and draining phases
      #1;
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(count == model.size(), "count");
      if (model.size() > 0) check(rd_data == model[0], $sformatf("head %h exp %h", rd_data, model[0]));
      if (full) n_full++;
      wr_en = !full && ($urandom_range(0, 3) < bias);
      rd_en = !empty && ($urandom_range(0, 3) >= bias - 1 + (bias == 3 ? 1 : 0));
      wr_data = WIDTH'($urandom);
      if (wr_en && rd_en) n_both++;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
    end
    check(n_full > 0, "FIFO never became full");
    check(n_both > 0, "no simultaneous write and read");
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
