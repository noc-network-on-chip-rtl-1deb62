// victory_router: Victory bidirectional ring network-on-chip router.
//
// The router is the building block of a ring NoC for multi-core chips. It has
// three input and three output channels: one to and from the local processing
// element (pe), one for the clockwise (cw) direction and one for the
// counter-clockwise (ccw) direction. Every channel is 64 bits of data plus a
// send (s) and a ready (r) wire. Packets are a single fixed 64-bit word and
// carry their own route (source routing): a direction bit used at injection
// and a hop count that is decremented at every hop and tested for zero at
// every ring input.
//
// Two virtual channels (VCs) share each physical channel by time. The
// polarity output is 0 on even and 1 on odd cycles (0 during reset). In a
// cycle of polarity p, VC p moves from input buffers to output buffers inside
// the router and VC !p moves from output buffers over the external channels
// into the neighbours' input buffers. Each channel therefore holds one buffer
// per VC, and with no contention a packet advances one buffer per cycle:
//   cycle t    send on an input channel (VC v, polarity !v), latched at edge
//   cycle t+1  switched into the output buffer (polarity v)
//   cycle t+2  sent on the output channel (polarity !v)
// A packet injected with hop count H is delivered on pedo of the router H
// hops away, with send high, 2*H+2 cycles after it was sent on pedi, and
// carries hop count 0 there.
//
// Switching (this design's reading of the internal switching figure): a
// packet continues in the direction it travels, so
//   cw  output <- cw  input (through traffic) or pe input (dir = 0)
//   ccw output <- ccw input (through traffic) or pe input (dir = 1)
//   pe  output <- cw  input or ccw input (hop count 0)
// and a ring is built by wiring cwdo/cwso/cwro of node i to cwdi/cwsi/cwri of
// node i+1 and ccwdo/ccwso/ccwro of node i+1 to ccwdi/ccwsi/ccwri of node i.
// Each output arbitrates round robin between its two sources; this policy
// is not given by the specification.
//
// Reset is synchronous and active high; it empties every buffer and puts the
// arbiters and the polarity in their idle state, as specified.
//
// Port names and widths follow the specification's signal table; the clock
// and reset are named clk and reset as in its interface figure.
module victory_router
  import victory_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  output logic             polarity,
  // clockwise input channel
  input  logic             cwsi,
  output logic             cwri,
  input  logic [PKT_W-1:0] cwdi,
  // counter-clockwise input channel
  input  logic             ccwsi,
  output logic             ccwri,
  input  logic [PKT_W-1:0] ccwdi,
  // processing-element input channel
  input  logic             pesi,
  output logic             peri,
  input  logic [PKT_W-1:0] pedi,
  // clockwise output channel
  output logic             cwso,
  input  logic             cwro,
  output logic [PKT_W-1:0] cwdo,
  // counter-clockwise output channel
  output logic             ccwso,
  input  logic             ccwro,
  output logic [PKT_W-1:0] ccwdo,
  // processing-element output channel
  output logic             peso,
  input  logic             pero,
  output logic [PKT_W-1:0] pedo
);

  polarity_gen u_pol (
    .clk     (clk),
    .reset   (reset),
    .polarity(polarity)
  );

  // ---------------------------------------------------------------- inputs
  logic             in_s   [NUM_PORTS];
  logic             in_r   [NUM_PORTS];
  logic [PKT_W-1:0] in_d   [NUM_PORTS];
  logic             in_req [NUM_PORTS];
  port_e            in_dest[NUM_PORTS];
  packet_t          in_pkt [NUM_PORTS];
  logic             in_gnt [NUM_PORTS];

  assign in_s[PORT_CW]  = cwsi;   assign in_d[PORT_CW]  = cwdi;
  assign in_s[PORT_CCW] = ccwsi;  assign in_d[PORT_CCW] = ccwdi;
  assign in_s[PORT_PE]  = pesi;   assign in_d[PORT_PE]  = pedi;
  assign cwri  = in_r[PORT_CW];
  assign ccwri = in_r[PORT_CCW];
  assign peri  = in_r[PORT_PE];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    input_ctrl #(.IN_PORT(port_e'(i))) u_in (
      .clk     (clk),
      .reset   (reset),
      .polarity(polarity),
      .si_i    (in_s[i]),
      .ri_o    (in_r[i]),
      .di_i    (in_d[i]),
      .req_o   (in_req[i]),
      .dest_o  (in_dest[i]),
      .pkt_o   (in_pkt[i]),
      .grant_i (in_gnt[i])
    );
  end

  // ---------------------------------------------------------------- outputs
  // Source table: SRC_A is the through or first ring input, SRC_B the other.
  localparam port_e SRC_A [NUM_PORTS] = '{PORT_CW,  PORT_CCW, PORT_CW};
  localparam port_e SRC_B [NUM_PORTS] = '{PORT_PE,  PORT_PE,  PORT_CCW};

  logic             out_s  [NUM_PORTS];
  logic             out_r  [NUM_PORTS];
  logic [PKT_W-1:0] out_d  [NUM_PORTS];
  logic [1:0]       out_gnt[NUM_PORTS];

  assign out_r[PORT_CW]  = cwro;
  assign out_r[PORT_CCW] = ccwro;
  assign out_r[PORT_PE]  = pero;
  assign cwso  = out_s[PORT_CW];   assign cwdo  = out_d[PORT_CW];
  assign ccwso = out_s[PORT_CCW];  assign ccwdo = out_d[PORT_CCW];
  assign peso  = out_s[PORT_PE];   assign pedo  = out_d[PORT_PE];

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    logic [1:0] req;
    packet_t    pkt [2];
    assign req[0] = in_req[SRC_A[o]] && (in_dest[SRC_A[o]] == port_e'(o));
    assign req[1] = in_req[SRC_B[o]] && (in_dest[SRC_B[o]] == port_e'(o));
    assign pkt[0] = in_pkt[SRC_A[o]];
    assign pkt[1] = in_pkt[SRC_B[o]];

    output_ctrl #(.NUM_SRC(2)) u_out (
      .clk     (clk),
      .reset   (reset),
      .polarity(polarity),
      .req_i   (req),
      .pkt_i   (pkt),
      .grant_o (out_gnt[o]),
      .so_o    (out_s[o]),
      .ro_i    (out_r[o]),
      .do_o    (out_d[o])
    );
  end

  // Each input requests exactly one output, so its grant is the OR of the
  // grants it can receive.
  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) in_gnt[i] = 1'b0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      if (out_gnt[o][0]) in_gnt[SRC_A[o]] = 1'b1;
      if (out_gnt[o][1]) in_gnt[SRC_B[o]] = 1'b1;
    end
  end

endmodule
