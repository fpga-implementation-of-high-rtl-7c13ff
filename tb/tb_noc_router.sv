// tb_noc_router: end-to-end self-checking test of the four-port router,
// with every parameter at its default.
//
// Each cycle the bench drives random words on the four inputs, a random
// port_sel, req, and destination lines that are usually one-hot but
// sometimes all low or several high. A cycle-accurate model written from
// the router's timing rules predicts every output: a request at edge k with
// a destination loads that direction's controller register at edge k, and
// that word is pushed into the direction's FIFO at edge k+1; the FIFO shows
// the word pushed DEPTH pushes ago, is empty before the first push and full
// from the DEPTH-th on. All twelve outputs are compared after every edge.
//
// Counted mechanisms, each of which must happen at least once: every one of
// the 16 source/destination pairs, a request with no destination line, a
// request with several destination lines (priority), a FIFO reaching full
// and a push into a full FIFO in each direction, and a reset in mid-traffic.
// A directed part also checks the latency in clock cycles from req to the
// FIFO output.
module tb_noc_router;
  import noc_pkg::*;
  localparam int unsigned DATA_W = DEF_DATA_W;
  localparam int unsigned DEPTH  = DEF_DEPTH;

  logic              clk = 1'b0;
  logic              rst, req;
  logic [DATA_W-1:0] data_in_E, data_in_W, data_in_N, data_in_S;
  logic              E_rst, W_rst, N_rst, S_rst;
  logic [SEL_W-1:0]  port_sel;
  logic [DATA_W-1:0] data_out_E, data_out_W, data_out_N, data_out_S;
  logic              empty_E, empty_W, empty_N, empty_S;
  logic              full_E, full_W, full_N, full_S;

  noc_router dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pair_seen[NUM_PORTS][NUM_PORTS];
  int no_dest = 0, multi_dest = 0, resets = 0;
  int full_seen[NUM_PORTS], overflow_seen[NUM_PORTS];

  // Model state.
  logic [DATA_W-1:0] m_reg[NUM_PORTS];
  logic              m_vld[NUM_PORTS];
  logic [DATA_W-1:0] m_fifo[NUM_PORTS][$];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] in_word(int p);
    case (p)
      0: return data_in_E;
      1: return data_in_W;
      2: return data_in_N;
      default: return data_in_S;
    endcase
  endfunction

  task automatic check_port(int p, logic [DATA_W-1:0] dout, logic emp, logic ful);
    int n = m_fifo[p].size();
    logic [DATA_W-1:0] exp_out = (n >= DEPTH) ? m_fifo[p][n-DEPTH] : '0;
    checks++;
    if (dout !== exp_out || emp !== (n == 0) || ful !== (n >= DEPTH)) begin
      failures++;
      $display("FAIL port %0d at %0t: out %0h/%b/%b expected %0h/%b/%b", p, $time,
               dout, emp, ful, exp_out, n == 0, n >= DEPTH);
    end
  endtask

  task automatic check_all();
    check_port(0, data_out_E, empty_E, full_E);
    check_port(1, data_out_W, empty_W, full_W);
    check_port(2, data_out_N, empty_N, full_N);
    check_port(3, data_out_S, empty_S, full_S);
  endtask

  task automatic model_reset();
    for (int p = 0; p < NUM_PORTS; p++) begin
      m_reg[p] = '0;
      m_vld[p] = 1'b0;
      m_fifo[p].delete();
    end
  endtask

  // Apply one cycle of stimulus, advance the model by one edge, compare.
  task automatic cycle(input logic r, input int src, input logic [3:0] lines);
    logic [3:0] l = lines;
    int d = -1;
    for (int p = 0; p < NUM_PORTS; p++) begin
      case (p)
        0: data_in_E = DATA_W'($urandom);
        1: data_in_W = DATA_W'($urandom);
        2: data_in_N = DATA_W'($urandom);
        default: data_in_S = DATA_W'($urandom);
      endcase
    end
    req = r; port_sel = SEL_W'(src);
    {S_rst, N_rst, W_rst, E_rst} = l;
    for (int p = NUM_PORTS - 1; p >= 0; p--) if (l[p]) d = p;
    if (r && l == 0) no_dest++;
    if (r && $countones(l) > 1) multi_dest++;
    @(posedge clk);
    // FIFO pushes use the controller state from before this edge.
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (m_vld[p]) begin
        if (m_fifo[p].size() >= DEPTH) overflow_seen[p]++;
        m_fifo[p].push_back(m_reg[p]);
        if (m_fifo[p].size() == DEPTH) full_seen[p]++;
      end
      m_vld[p] = 1'b0;
    end
    if (r && d >= 0) begin
      m_reg[d] = in_word(src);
      m_vld[d] = 1'b1;
      pair_seen[src][d]++;
    end
    #1;
    check_all();
  endtask

  initial begin
    int t_req, t_out;
    foreach (pair_seen[s, d]) pair_seen[s][d] = 0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      full_seen[p] = 0;
      overflow_seen[p] = 0;
    end
    rst = 1'b1; req = 1'b0; port_sel = '0;
    {S_rst, N_rst, W_rst, E_rst} = '0;
    {data_in_E, data_in_W, data_in_N, data_in_S} = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    model_reset();
    check_all();

    // Directed latency: DEPTH words from West to North, one per cycle,
    // then idle. The first word must reach data_out_N DEPTH+1 edges after
    // the edge that sampled its request.
    for (int k = 0; k < DEPTH; k++) cycle(1'b1, DIR_W, 4'b0100);
    t_req = 0; t_out = -1;
    for (int k = 0; k < 4; k++) begin
      cycle(1'b0, DIR_E, 4'b0000);
      if (t_out < 0 && full_N) t_out = DEPTH + k;
    end
    checks++;
    if (t_out - t_req != DEPTH) begin
      failures++;
      $display("FAIL latency: first word out after %0d edges, expected %0d", t_out + 1, DEPTH + 1);
    end

    // Random traffic.
    for (int i = 0; i < 3000; i++) begin
      logic [3:0] lines;
      int sel;
      sel = $urandom_range(0, 9);
      lines = (sel == 0) ? 4'b0000 : (sel == 1) ? 4'($urandom) : (4'b0001 << $urandom_range(0, 3));
      cycle($urandom_range(0, 4) != 0, $urandom_range(0, 3), lines);
      if (i == 1500) begin
        // Reset in mid-traffic.
        rst = 1'b1; req = 1'b1; {S_rst, N_rst, W_rst, E_rst} = 4'b1111;
        @(posedge clk); #1;
        rst = 1'b0;
        model_reset();
        resets++;
        check_all();
      end
    end

    // Mechanism coverage.
    foreach (pair_seen[s, d]) begin
      checks++;
      if (pair_seen[s][d] == 0) begin
        failures++;
        $display("FAIL never routed %0d -> %0d", s, d);
      end
    end
    for (int p = 0; p < NUM_PORTS; p++) begin
      checks += 2;
      if (full_seen[p] == 0)     begin failures++; $display("FAIL port %0d never full", p); end
      if (overflow_seen[p] == 0) begin failures++; $display("FAIL port %0d never overflowed", p); end
    end
    checks += 3;
    if (no_dest == 0)    begin failures++; $display("FAIL no request without destination"); end
    if (multi_dest == 0) begin failures++; $display("FAIL no request with several destinations"); end
    if (resets == 0)     begin failures++; $display("FAIL no reset in traffic"); end
    $display("mechanisms: no_dest=%0d multi_dest=%0d resets=%0d full=%0d/%0d/%0d/%0d overflow=%0d/%0d/%0d/%0d",
             no_dest, multi_dest, resets, full_seen[0], full_seen[1], full_seen[2], full_seen[3],
             overflow_seen[0], overflow_seen[1], overflow_seen[2], overflow_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
