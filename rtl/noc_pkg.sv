// noc_pkg: constants and types shared by the four-port router.
//
// The router has one port in each compass direction. Everywhere in this
// design a four-wide bus or array is indexed by dir_e, so bit/element 0 is
// East, 1 West, 2 North and 3 South. That order is the top-to-bottom order
// of the data inputs on the controller drawing; the numeric encoding itself
// (also used for port_sel) is this design's choice.
package noc_pkg;

  // Number of router ports (East, West, North, South).
  localparam int unsigned NUM_PORTS = 4;

  // Width of port_sel and of the destination address.
  localparam int unsigned SEL_W = $clog2(NUM_PORTS);

  // Default data word width. The width is this design's choice.
  localparam int unsigned DEF_DATA_W = 8;

  // Default buffer depth: three flip-flop stages per output FIFO.
  localparam int unsigned DEF_DEPTH = 3;

  typedef enum logic [SEL_W-1:0] {
    DIR_E = 2'd0,
    DIR_W = 2'd1,
    DIR_N = 2'd2,
    DIR_S = 2'd3
  } dir_e;

endpackage
