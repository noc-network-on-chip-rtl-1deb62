// route_decode: routing logic (address decoder) of one input channel.
//
// Purely combinational. It follows the source-routing rules of the Victory
// specification:
//  * a packet from the processing-element input goes to the clockwise output
//    when its direction bit is 0 and to the counter-clockwise output when it
//    is 1; its hop count must be non-zero;
//  * a packet from a ring input (cw or ccw) whose hop count is 8'h00 has
//    arrived and goes to the pe output; any other packet keeps travelling in
//    the same direction, to the output of the same name as its input.
// The hop count is decremented whenever the packet is sent onward on the ring,
// so a packet injected with hop count N reaches the node N hops away carrying
// 8'h00. Doing the decrement here, on the way into the output buffer, is this
// design's choice; the specification only says that it happens at each hop.
//
// Ports: pkt_i is the buffered packet, dest_o the requested output channel and
// pkt_o the packet as it is to be written into that output buffer.
module route_decode
  import victory_pkg::*;
#(
  parameter port_e IN_PORT = PORT_PE
) (
  input  packet_t pkt_i,
  output port_e   dest_o,
  output packet_t pkt_o
);

  logic hop_zero;
  assign hop_zero = (pkt_i.hop == 8'h00);

  always_comb begin
    unique case (IN_PORT)
      PORT_PE:  dest_o = (pkt_i.dir == DIR_CCW) ? PORT_CCW : PORT_CW;
      PORT_CW:  dest_o = hop_zero ? PORT_PE : PORT_CW;
      default:  dest_o = hop_zero ? PORT_PE : PORT_CCW;
    endcase
  end

  always_comb begin
    pkt_o = pkt_i;
    if (dest_o != PORT_PE) pkt_o.hop = pkt_i.hop - 8'd1;
  end

endmodule
