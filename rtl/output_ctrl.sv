// output_ctrl: arbitration and output controller of one output channel.
//
// Holds one 64-bit packet buffer per virtual channel (VC). In a cycle of
// polarity p, VC p is filled from inside the router and VC !p is sent on the
// external channel, so a buffer is never written and read in the same cycle.
//
// Internal side (VC p): the channel is reached from two input channels
// (NUM_SRC = 2: the input of the same direction and the processing-element
// input for a ring output, the two ring inputs for the pe output). When the
// buffer of VC p is empty, a round-robin arbiter (one per VC) grants one of
// the requesting inputs and its packet is written into the buffer at the next
// rising edge. While the buffer is full no input is granted and requests
// wait in their input buffers.
//
// External side (VC !p): so_o is high when the buffer of VC !p is full and
// the receiver's ready ro_i is high, exactly as the specification defines the
// send signal; do_o carries the buffer. A sent buffer is emptied at the edge
// that ends the cycle, in which the receiver latches the packet. do_o always
// shows the buffer of the external VC, valid or not.
//
// Reset (synchronous, active high) empties both buffers.
module output_ctrl
  import victory_pkg::*;
#(
  parameter int unsigned NUM_SRC = 2
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               polarity,
  // requests from the input channels that can reach this output
  input  logic [NUM_SRC-1:0] req_i,
  input  packet_t            pkt_i [NUM_SRC],
  output logic [NUM_SRC-1:0] grant_o,
  // external channel
  output logic               so_o,
  input  logic               ro_i,
  output logic [PKT_W-1:0]   do_o
);

  packet_t            buf_q  [NUM_VC];
  logic [NUM_VC-1:0]  full_q;

  logic ext_vc, int_vc;
  assign int_vc = polarity;
  assign ext_vc = ~polarity;

  // One arbiter per VC; only the internally forwarded VC sees requests.
  logic [NUM_SRC-1:0] arb_gnt [NUM_VC];
  logic               can_take;
  assign can_take = ~full_q[int_vc];

  for (genvar v = 0; v < NUM_VC; v++) begin : g_arb
    logic active;
    assign active = (int_vc == 1'(v)) && can_take;
    rr_arbiter #(.N(NUM_SRC)) u_arb (
      .clk  (clk),
      .reset(reset),
      .en_i (active),
      .req_i(active ? req_i : '0),
      .gnt_o(arb_gnt[v])
    );
  end

  assign grant_o = arb_gnt[int_vc];

  packet_t win_pkt;
  always_comb begin
    win_pkt = pkt_i[0];
    for (int unsigned s = 0; s < NUM_SRC; s++)
      if (grant_o[s]) win_pkt = pkt_i[s];
  end

  assign so_o = full_q[ext_vc] & ro_i;
  assign do_o = buf_q[ext_vc];

  always_ff @(posedge clk) begin
    if (reset) begin
      full_q <= '0;
    end else begin
      if (|grant_o) full_q[int_vc] <= 1'b1;
      if (so_o)     full_q[ext_vc] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (|grant_o) buf_q[int_vc] <= win_pkt;
  end

  a_grant_only_into_empty: assert property (@(posedge clk) disable iff (reset)
    (|grant_o) |-> !full_q[int_vc])
    else $error("output_ctrl: grant into a full buffer");
  a_send_needs_ready: assert property (@(posedge clk) disable iff (reset)
    so_o |-> ro_i)
    else $error("output_ctrl: send without ready");

endmodule
