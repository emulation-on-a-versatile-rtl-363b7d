// Shared types and constants of the discrete-time queuing-network emulator.
//
// A cell is the customer of a queue when the queue holds contents. It carries
// what the point-to-point study needs: a valid flag, the number of the source
// it came from, its destination port on the four-by-four switch and a tag
// that marks the periodic (observed) flow apart from background traffic.
// The 16-bit random word and the two service orders of a discrete-time queue
// (arrival first, departure first) are also defined here. The cell fields
// follow the origin/destination tagging described for the switch study; the
// bit widths beyond the 2-bit port number are this design's choice.
package qnet_pkg;

  // Width of the random word produced every clock cycle.
  localparam int unsigned RAND_W = 16;

  // Four-by-four switch: 2-bit port numbers.
  localparam int unsigned N_PORTS = 4;
  localparam int unsigned PORT_W  = 2;

  // Order of events inside a slot of a discrete-time queue.
  typedef enum logic {
    ARRIVAL_FIRST   = 1'b0,
    DEPARTURE_FIRST = 1'b1
  } order_e;

  typedef struct packed {
    logic              valid;   // a cell is present
    logic              probe;  // belongs to the periodic point-to-point flow
    logic [PORT_W-1:0] src;     // source (input port) number
    logic [PORT_W-1:0] dst;     // destination (output port) number
  } cell_t;

  localparam cell_t NO_CELL = '0;

endpackage
