// noc_mux4: 4-to-1 data multiplexer of the router's controller unit.
//
// Passes din[sel] to dout. Inputs are indexed East, West, North, South
// (noc_pkg::dir_e); the controller has four of these, one per output
// direction, all driven by the same port_sel. Purely combinational.
module noc_mux4
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W = DEF_DATA_W
) (
  input  logic [NUM_PORTS-1:0][DATA_W-1:0] din,
  input  dir_e                             sel,
  output logic [DATA_W-1:0]                dout
);

  always_comb begin
    unique case (sel)
      DIR_E:   dout = din[DIR_E];
      DIR_W:   dout = din[DIR_W];
      DIR_N:   dout = din[DIR_N];
      default: dout = din[DIR_S];
    endcase
  end

endmodule
