// tb_noc_fifo: self-checking test of the three-stage port buffer.
//
// Drives random pushes (req) and data, with a reset in the middle, and
// compares data_out, mem_empty and mem_full after every edge with a model
// kept as a plain list of the words pushed since reset: data_out is the word
// pushed DEPTH pushes ago (zero until then), empty means no push yet, full
// means at least DEPTH pushes. Also checks that a full buffer pushed again
// drops its oldest word and that data_out holds while req is low.
module tb_noc_fifo;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned DEPTH  = 3;

  logic              clk = 1'b0;
  logic              rst, req;
  logic [DATA_W-1:0] data_in, data_out;
  logic              mem_empty, mem_full;

  int checks = 0, failures = 0;
  int overflows = 0, holds = 0;
  logic [DATA_W-1:0] pushed[$];

  noc_fifo #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [DATA_W-1:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic compare_model();
    int n = pushed.size();
    logic [DATA_W-1:0] exp_out;
    exp_out = (n >= DEPTH) ? pushed[n-DEPTH] : '0;
    check("data_out", data_out, exp_out);
    check("mem_empty", DATA_W'(mem_empty), DATA_W'(n == 0));
    check("mem_full", DATA_W'(mem_full), DATA_W'(n >= DEPTH));
  endtask

  task automatic push_cycle(input logic r, input logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] prev_out;
    prev_out  = data_out;
    req     = r;
    data_in = d;
    @(posedge clk);
    #1;
    if (r) begin
      if (pushed.size() >= DEPTH) overflows++;
      pushed.push_back(d);
    end else begin
      holds++;
      check("hold", data_out, prev_out);
    end
    compare_model();
  endtask

  initial begin
    rst = 1'b1; req = 1'b0; data_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    compare_model();
    // Fill exactly to DEPTH, one push at a time.
    for (int i = 0; i < DEPTH; i++) push_cycle(1'b1, DATA_W'(8'hA0 + i));
    check("full after DEPTH pushes", DATA_W'(mem_full), 1);
    check("oldest word at output", data_out, 8'hA0);
    // Overflow: the oldest word is dropped.
    push_cycle(1'b1, 8'h5C);
    check("after overflow", data_out, 8'hA1);
    // Random traffic.
    for (int i = 0; i < 300; i++) push_cycle(1'($urandom_range(0, 1)), DATA_W'($urandom));
    // Reset in the middle clears everything.
    rst = 1'b1; req = 1'b1; data_in = 8'hFF;
    @(posedge clk); #1;
    rst = 1'b0; req = 1'b0;
    pushed.delete();
    compare_model();
    for (int i = 0; i < 2; i++) push_cycle(1'b1, DATA_W'(i + 1));
    check("not full after 2", DATA_W'(mem_full), 0);
    check("not empty after 2", DATA_W'(mem_empty), 0);
    for (int i = 0; i < 200; i++) push_cycle(1'($urandom_range(0, 1)), DATA_W'($urandom));
    if (overflows == 0 || holds == 0) begin
      failures++;
      $display("FAIL coverage: overflows=%0d holds=%0d", overflows, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
