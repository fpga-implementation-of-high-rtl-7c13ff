// noc_router: four-port network-on-chip router (East, West, North, South).
//
// Each clock, the controller unit can move one word from the input chosen by
// port_sel to the output direction named by the destination lines E_rst,
// W_rst, N_rst, S_rst, provided req is high. The word is registered in the
// controller's output register for that direction and, one edge later,
// pushed into that direction's three-stage output FIFO. Each FIFO shows its
// last stage on data_out_X and flags empty_X and full_X, so the sender can
// see when a direction has filled up. The block structure - one controller
// unit feeding four FIFOs, with these port names - follows the router's
// design.
//
// Own choices: the data width (8), the port_sel encoding (0=E, 1=W, 2=N,
// 3=S), fixed priority E > W > N > S among several high destination lines,
// synchronous active-high rst, and driving each FIFO's push from a registered
// valid bit of the controller.
//
// Timing: a word sent at edge k is in the controller register after edge k,
// in FIFO stage 0 after edge k+1, and appears on data_out_X once DEPTH words
// in all have been sent to that direction (the FIFO has no read side; the
// chain advances only on pushes).
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned DEPTH  = DEF_DEPTH
) (
  input  logic              clk,
  input  logic              rst,

  input  logic [DATA_W-1:0] data_in_E,
  input  logic [DATA_W-1:0] data_in_W,
  input  logic [DATA_W-1:0] data_in_N,
  input  logic [DATA_W-1:0] data_in_S,

  input  logic              E_rst,
  input  logic              W_rst,
  input  logic              N_rst,
  input  logic              S_rst,

  input  logic [SEL_W-1:0]  port_sel,
  input  logic              req,

  output logic [DATA_W-1:0] data_out_E,
  output logic [DATA_W-1:0] data_out_W,
  output logic [DATA_W-1:0] data_out_N,
  output logic [DATA_W-1:0] data_out_S,

  output logic              empty_E,
  output logic              empty_W,
  output logic              empty_N,
  output logic              empty_S,

  output logic              full_E,
  output logic              full_W,
  output logic              full_N,
  output logic              full_S
);

  logic [NUM_PORTS-1:0][DATA_W-1:0] din, ctrl_out, fifo_out;
  logic [NUM_PORTS-1:0]             dest_rst, ctrl_vld, empty, full;

  assign din[DIR_E] = data_in_E;
  assign din[DIR_W] = data_in_W;
  assign din[DIR_N] = data_in_N;
  assign din[DIR_S] = data_in_S;

  assign dest_rst[DIR_E] = E_rst;
  assign dest_rst[DIR_W] = W_rst;
  assign dest_rst[DIR_N] = N_rst;
  assign dest_rst[DIR_S] = S_rst;

  noc_controller #(.DATA_W(DATA_W)) u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .data_in  (din),
    .port_sel (dir_e'(port_sel)),
    .req      (req),
    .dest_rst (dest_rst),
    .data_out (ctrl_out),
    .out_vld  (ctrl_vld)
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_fifo
    noc_fifo #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_fifo (
      .clk       (clk),
      .rst       (rst),
      .req       (ctrl_vld[p]),
      .data_in   (ctrl_out[p]),
      .data_out  (fifo_out[p]),
      .mem_empty (empty[p]),
      .mem_full  (full[p])
    );
  end

  assign data_out_E = fifo_out[DIR_E];
  assign data_out_W = fifo_out[DIR_W];
  assign data_out_N = fifo_out[DIR_N];
  assign data_out_S = fifo_out[DIR_S];

  assign empty_E = empty[DIR_E];
  assign empty_W = empty[DIR_W];
  assign empty_N = empty[DIR_N];
  assign empty_S = empty[DIR_S];

  assign full_E = full[DIR_E];
  assign full_W = full[DIR_W];
  assign full_N = full[DIR_N];
  assign full_S = full[DIR_S];

endmodule
