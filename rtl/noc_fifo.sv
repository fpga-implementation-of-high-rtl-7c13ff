// noc_fifo: output buffer of one router port.
//
// A chain of DEPTH registers (three by default) that all share one clock
// enable, req. On each clock edge with req high, data_in enters stage 0 and
// every stage passes its word to the next; data_out is the last stage. There
// is no read side: a word leaves at data_out after DEPTH words have been
// pushed, and a push into a full chain drops the oldest word. This is the
// three-flip-flop chain with a Counter and a Decision block that the
// router's design calls its FIFO.
//
// The Counter counts pushes since reset and stops at DEPTH. The Decision
// block turns the count into mem_empty (nothing pushed yet) and mem_full
// (every stage holds a word, so data_out carries the oldest one still held).
// How the count saturates, the flag definitions, and the synchronous
// active-high reset that clears stages and count are this design's choices.
//
// Timing: data_out, mem_empty and mem_full change only on the clock edge at
// which req (or rst) is sampled high; they are registered outputs.
module noc_fifo #(
  parameter int unsigned DATA_W = noc_pkg::DEF_DATA_W,
  parameter int unsigned DEPTH  = noc_pkg::DEF_DEPTH
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              mem_empty,
  output logic              mem_full
);

  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [DEPTH-1:0][DATA_W-1:0] stage;
  logic [CNT_W-1:0]             count;

  // D flip-flop chain.
  always_ff @(posedge clk) begin
    if (rst) begin
      stage <= '0;
    end else if (req) begin
      stage[0] <= data_in;
      for (int unsigned i = 1; i < DEPTH; i++) begin
        stage[i] <= stage[i-1];
      end
    end
  end

  // Counter: pushes since reset, saturating at DEPTH.
  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
    end else if (req && count != CNT_W'(DEPTH)) begin
      count <= count + 1'b1;
    end
  end

  // Decision.
  always_comb begin
    mem_empty = (count == '0);
    mem_full  = (count == CNT_W'(DEPTH));
  end

  assign data_out = stage[DEPTH-1];

endmodule
