// noc_demux_ctrl: DEMUX controller and DEMUX of the router's controller unit.
//
// The DEMUX controller looks at the four destination lines (E_rst, W_rst,
// N_rst, S_rst as dest_rst[0..3]) and forms a destination address, dest.
// The DEMUX then steers the request, req, onto that direction's line of the
// one-hot en bus, which is the load enable of that direction's output
// register. This split follows the router's design.
//
// Own choices: the destination lines are active high; when several are high
// the first in the order East, West, North, South wins; when none is high,
// dest_vld is low and req enables nothing. Purely combinational.
module noc_demux_ctrl
  import noc_pkg::*;
(
  input  logic                 req,
  input  logic [NUM_PORTS-1:0] dest_rst,
  output dir_e                 dest,
  output logic                 dest_vld,
  output logic [NUM_PORTS-1:0] en
);

  // DEMUX controller: fixed-priority encoder of the destination lines.
  always_comb begin
    dest_vld = 1'b1;
    if (dest_rst[DIR_E])      dest = DIR_E;
    else if (dest_rst[DIR_W]) dest = DIR_W;
    else if (dest_rst[DIR_N]) dest = DIR_N;
    else if (dest_rst[DIR_S]) dest = DIR_S;
    else begin
      dest     = DIR_E;
      dest_vld = 1'b0;
    end
  end

  // DEMUX: route req to the addressed output.
  always_comb begin
    en       = '0;
    en[dest] = req & dest_vld;
  end

  // At most one output register is ever enabled.
  always_comb assert ((en & (en - 1'b1)) == '0);

endmodule
