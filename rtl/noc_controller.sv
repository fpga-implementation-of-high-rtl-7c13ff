// noc_controller: controller unit of the four-port router.
//
// Four 4-to-1 muxes (noc_mux4), one per output direction, all see the four
// input ports and the same port_sel, so each passes the chosen source word.
// The DEMUX controller and DEMUX (noc_demux_ctrl) turn req and the
// destination lines E_rst..S_rst into a one-hot load enable, and only the
// addressed direction's output D flip-flop register captures its mux output.
// The other three registers hold. So one word moves from the port_sel input
// to the addressed output per clock. This structure follows the router's
// design.
//
// Own choices: out_vld, a registered copy of the load enables, is added so
// that the FIFO behind each output knows when its register holds a new word;
// reset is synchronous, active high, and clears the registers and out_vld.
//
// Timing: with req and a destination line high at clock edge k, data_out of
// that direction carries data_in[port_sel] and its out_vld is high from edge
// k until edge k+1.
module noc_controller
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W = DEF_DATA_W
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [NUM_PORTS-1:0][DATA_W-1:0] data_in,
  input  dir_e                             port_sel,
  input  logic                             req,
  input  logic [NUM_PORTS-1:0]             dest_rst,
  output logic [NUM_PORTS-1:0][DATA_W-1:0] data_out,
  output logic [NUM_PORTS-1:0]             out_vld
);

  logic [NUM_PORTS-1:0][DATA_W-1:0] mux_out;
  logic [NUM_PORTS-1:0]             en;
  dir_e                             dest;
  logic                             dest_vld;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_mux
    noc_mux4 #(.DATA_W(DATA_W)) u_mux (
      .din  (data_in),
      .sel  (port_sel),
      .dout (mux_out[p])
    );
  end

  noc_demux_ctrl u_demux (
    .req      (req),
    .dest_rst (dest_rst),
    .dest     (dest),
    .dest_vld (dest_vld),
    .en       (en)
  );

  // A request with a destination enables exactly the addressed register.
  always_comb begin
    if (req && dest_vld) assert (en == (NUM_PORTS'(1) << dest));
    else                 assert (en == '0);
  end

  // Output D flip-flops with load enable.
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_oreg
    always_ff @(posedge clk) begin
      if (rst) begin
        data_out[p] <= '0;
        out_vld[p]  <= 1'b0;
      end else begin
        out_vld[p] <= en[p];
        if (en[p]) data_out[p] <= mux_out[p];
      end
    end
  end

endmodule
