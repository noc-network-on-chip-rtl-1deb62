// input_ctrl: one input channel of the Victory router.
//
// Holds one 64-bit packet buffer per virtual channel (VC). The two VCs share
// the physical channel by time: in a cycle of polarity p, VC p is forwarded
// internally and VC !p owns the external channel.
//
// External side (VC !p): ri_o is high when the buffer of VC !p is empty. When
// si_i is high the packet on di_i is latched into that buffer at the next
// rising edge, as the send/ready handshake of the specification describes.
// A sender must only raise send while ready is high, and the packet it sends
// must carry the vc bit of the VC that owns the channel; both rules are
// checked by assertions.
//
// Internal side (VC p): while the buffer of VC p is full, the channel raises
// req_o toward the output chosen by route_decode, with the packet as it will
// be written there. When that output grants (grant_i), the buffer is freed at
// the same edge. The output is granted only when its buffer is empty, so a
// packet moves from input buffer to output buffer in one cycle (virtual
// cut-through of a one-flit packet).
//
// Reset (synchronous, active high) empties both buffers. A buffer is freed
// in the cycle it is read and can be refilled from outside only in a later
// cycle of the opposite polarity, so a packet waits at least one cycle here.
module input_ctrl
  import victory_pkg::*;
#(
  parameter port_e IN_PORT = PORT_PE
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           polarity,
  // external channel
  input  logic           si_i,
  output logic           ri_o,
  input  logic [PKT_W-1:0] di_i,
  // request toward the switch
  output logic           req_o,
  output port_e          dest_o,
  output packet_t        pkt_o,
  input  logic           grant_i
);

  packet_t            buf_q  [NUM_VC];
  logic [NUM_VC-1:0]  full_q;

  packet_t di_pkt;
  assign di_pkt = packet_t'(di_i);

  logic ext_vc, int_vc, accept;
  assign int_vc = polarity;
  assign ext_vc = ~polarity;

  assign ri_o   = ~full_q[ext_vc];
  assign accept = si_i & ri_o;

  assign req_o  = full_q[int_vc];

  route_decode #(.IN_PORT(IN_PORT)) u_route (
    .pkt_i (buf_q[int_vc]),
    .dest_o(dest_o),
    .pkt_o (pkt_o)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      full_q <= '0;
    end else begin
      if (accept) full_q[ext_vc] <= 1'b1;
      if (req_o && grant_i) full_q[int_vc] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) buf_q[ext_vc] <= di_pkt;
  end

  // Handshake rules.
  a_send_only_when_ready: assert property (@(posedge clk) disable iff (reset)
    si_i |-> ri_o)
    else $error("input_ctrl: send while not ready");
  a_vc_matches_polarity: assert property (@(posedge clk) disable iff (reset)
    accept |-> (di_pkt.vc == ext_vc))
    else $error("input_ctrl: packet vc bit does not match channel polarity");
  a_no_zero_hop_injection: assert property (@(posedge clk) disable iff (reset)
    (accept && IN_PORT == PORT_PE) |-> (di_pkt.hop != 8'h00))
    else $error("input_ctrl: zero-hop packet injected");
  a_grant_needs_request: assert property (@(posedge clk) disable iff (reset)
    grant_i |-> req_o)
    else $error("input_ctrl: grant without request");

endmodule
