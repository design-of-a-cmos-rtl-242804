// router_pkg: shared widths and types of the two by two self-timed packet router.
//
// A packet travels byte-serially. Each byte carries an extra Last-Byte bit (lb)
// that is 1 on the final byte of a packet and 0 otherwise; the first byte holds
// the address, and its bit 0 selects the output port (0 = upper, 1 = lower).
// The byte width and the Last-Byte bit follow the router description; packing
// lb as the top bit of a 9-bit word is this design's choice.
package router_pkg;

  localparam int unsigned BYTE_W = 8;
  localparam int unsigned FLIT_W = BYTE_W + 1;

  // One byte on a link: the Last-Byte flag and the byte itself.
  typedef struct packed {
    logic              lb;
    logic [BYTE_W-1:0] data;
  } flit_t;

  // Output port index selected by the address bit.
  typedef enum logic {PORT_UPPER = 1'b0, PORT_LOWER = 1'b1} port_e;

endpackage
