// tb_noc_mux4: self-checking test of the 4-to-1 port multiplexer.
//
// Applies random words on all four inputs under every select value and
// checks that the output equals the word on the selected input.
module tb_noc_mux4;
  import noc_pkg::*;
  localparam int unsigned DATA_W = 8;

  logic [NUM_PORTS-1:0][DATA_W-1:0] din;
  dir_e                             sel;
  logic [DATA_W-1:0]                dout;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  noc_mux4 #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      for (int p = 0; p < NUM_PORTS; p++) din[p] = DATA_W'($urandom);
      sel = dir_e'(i % NUM_PORTS);
      #1;
      checks++;
      if (dout !== din[i % NUM_PORTS]) begin
        failures++;
        $display("FAIL sel=%0d got %0h expected %0h", sel, dout, din[i % NUM_PORTS]);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
