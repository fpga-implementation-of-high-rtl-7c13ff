// tb_noc_controller: self-checking test of the controller unit.
//
// Drives random input words, port_sel, req and destination lines every
// cycle. A model keeps the four output registers: on an edge with req high
// and some destination line high, the register of the first high line
// (East, West, North, South order) takes the word on the port_sel input and
// its valid bit is set for one cycle; every other register holds. After
// each edge all four registers and valid bits are compared with the model,
// and each source-to-destination pair is counted to show all 16 occurred.
module tb_noc_controller;
  import noc_pkg::*;
  localparam int unsigned DATA_W = 8;

  logic                             clk = 1'b0;
  logic                             rst, req;
  logic [NUM_PORTS-1:0][DATA_W-1:0] data_in, data_out, model;
  dir_e                             port_sel;
  logic [NUM_PORTS-1:0]             dest_rst, out_vld, model_vld;
  int checks = 0, failures = 0;
  int pair_seen[NUM_PORTS][NUM_PORTS];

  noc_controller #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; req = 1'b0; dest_rst = '0; data_in = '0; port_sel = DIR_E;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    model = '0; model_vld = '0;
    foreach (pair_seen[s, d]) pair_seen[s][d] = 0;
    for (int i = 0; i < 2000; i++) begin
      int d;
      for (int p = 0; p < NUM_PORTS; p++) data_in[p] = DATA_W'($urandom);
      port_sel = dir_e'($urandom_range(0, 3));
      req      = ($urandom_range(0, 3) != 0);
      dest_rst = ($urandom_range(0, 3) == 0) ? 4'($urandom) : (4'b0001 << $urandom_range(0, 3));
      // Independent model of the edge.
      d = -1;
      for (int p = NUM_PORTS - 1; p >= 0; p--) if (dest_rst[p]) d = p;
      model_vld = '0;
      if (req && d >= 0) begin
        model[d]     = data_in[port_sel];
        model_vld[d] = 1'b1;
        pair_seen[port_sel][d]++;
      end
      @(posedge clk); #1;
      for (int p = 0; p < NUM_PORTS; p++) begin
        checks++;
        if (data_out[p] !== model[p] || out_vld[p] !== model_vld[p]) begin
          failures++;
          $display("FAIL port %0d: got %0h/%b expected %0h/%b", p, data_out[p], out_vld[p],
                   model[p], model_vld[p]);
        end
      end
    end
    foreach (pair_seen[s, d]) begin
      checks++;
      if (pair_seen[s][d] == 0) begin
        failures++;
        $display("FAIL no transfer from %0d to %0d", s, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
