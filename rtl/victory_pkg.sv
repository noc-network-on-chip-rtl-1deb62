// victory_pkg: types and constants shared by the Victory bidirectional ring
// router.
//
// A Victory packet is exactly one 64-bit word; packet, flit, phit and channel
// width are all the same. The upper 32 bits are the header and the lower 32
// bits the payload. The header layout, from the most significant bit down, is
// taken from the packet format of the router specification:
//   [63]    vc        virtual channel polarity (0 even, 1 odd)
//   [62]    dir       direction, 0 clockwise, 1 counter-clockwise
//   [61:56] reserved  always 0
//   [55:48] hop       binary hop count, decremented at every hop
//   [47:32] source    identification number of the injecting node
//   [31:0]  payload
// The port enumeration and its encoding are this design's own choice.
package victory_pkg;

  localparam int unsigned PKT_W = 64;  // packet = flit = phit = channel width
  localparam int unsigned NUM_VC = 2;  // virtual channels per physical channel

  typedef struct packed {
    logic        vc;
    logic        dir;
    logic [5:0]  reserved;
    logic [7:0]  hop;
    logic [15:0] source;
    logic [31:0] payload;
  } packet_t;

  // Channel identifiers, used for both input and output channels.
  typedef enum logic [1:0] {
    PORT_CW  = 2'd0,
    PORT_CCW = 2'd1,
    PORT_PE  = 2'd2
  } port_e;

  localparam int unsigned NUM_PORTS = 3;

  localparam logic DIR_CW  = 1'b0;
  localparam logic DIR_CCW = 1'b1;

endpackage
