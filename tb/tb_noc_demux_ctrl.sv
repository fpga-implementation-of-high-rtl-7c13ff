// tb_noc_demux_ctrl: self-checking test of the DEMUX controller and DEMUX.
//
// Goes through all 32 combinations of req and the four destination lines,
// several times, and checks dest, dest_vld and the one-hot enable against a
// priority rule written out independently: the first high line in the order
// East, West, North, South is the destination, and req reaches only it.
module tb_noc_demux_ctrl;
  import noc_pkg::*;

  logic                 req;
  logic [NUM_PORTS-1:0] dest_rst;
  dir_e                 dest;
  logic                 dest_vld;
  logic [NUM_PORTS-1:0] en;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  noc_demux_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 32; v++) begin
        logic [3:0] exp_en;
        int         exp_dest;
        logic       exp_vld;
        req      = v[4];
        dest_rst = v[3:0];
        exp_vld  = (v[3:0] != 0);
        exp_dest = v[0] ? 0 : v[1] ? 1 : v[2] ? 2 : v[3] ? 3 : -1;
        exp_en   = (req && exp_vld) ? (4'b0001 << exp_dest) : 4'b0000;
        #1;
        checks++;
        if (en !== exp_en) begin
          failures++;
          $display("FAIL en: req=%b lines=%b got %b expected %b", req, dest_rst, en, exp_en);
        end
        checks++;
        if (dest_vld !== exp_vld) begin
          failures++;
          $display("FAIL dest_vld: lines=%b got %b", dest_rst, dest_vld);
        end
        if (exp_vld) begin
          checks++;
          if (int'(dest) != exp_dest) begin
            failures++;
            $display("FAIL dest: lines=%b got %0d expected %0d", dest_rst, dest, exp_dest);
          end
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
