// tb_victory_ring: end-to-end test of a ring of Victory routers.
//
// The ring is used at its default size (4 nodes) with no parameter
// overridden; every router in it has no parameters. A processing
// element model at every node injects packets on the pe input and consumes
// them on the pe output, with a randomly toggling pe ready for back pressure.
//
// Each packet carries a unique id in its payload. The scoreboard works out,
// from the routing rules alone (start node, direction, hop count), where
// each packet must come out and what it must look like there (hop count 0,
// all other fields unchanged), and checks that every packet is delivered
// exactly once, at the right node, unaltered.
//
// Phase 1 sends single packets (1 to 5 hops, and 255 hops, the largest
// hop count) through an empty ring and checks the latency:
// a packet sent on pedi in cycle t appears with peso high in cycle t+2*H+2.
// Phase 2 runs random traffic in both directions and both virtual channels.
// Phase 3 applies reset with packets in flight and checks that every buffer
// is empty and the polarity even afterwards, then checks the ring still
// works. Each mechanism of the router (injection in each direction, through
// traffic, ejection, arbitration between two requesters, a full output
// buffer held by a not-ready receiver, a full input buffer refusing a send,
// a switch stall into a full output buffer, both VCs, ring wrap-around,
// reset) is counted, and one that never happens is a failure.
//
// The PE model obeys the handshake: it raises pesi only while peri is high
// and only for a packet whose vc bit equals the VC that owns the external
// channel in that cycle (the opposite of polarity). To keep the ring free of
// a full cycle of buffers it keeps at most MAX_INFLIGHT packets in the
// network.
module tb_victory_ring;
  import victory_pkg::*;

  localparam int NODES        = 4;  // default size of victory_ring
  localparam int MAXP         = 3000;
  localparam int MAX_INFLIGHT = 6;
  localparam int WATCHDOG     = 200000;

  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ the ring
  logic                        polarity;
  logic [NODES-1:0]            pesi, peri, peso, pero;
  logic [NODES-1:0][PKT_W-1:0] pedi, pedo;

  victory_ring u_ring (
    .clk(clk), .reset(reset), .polarity(polarity),
    .pesi(pesi), .peri(peri), .pedi(pedi),
    .peso(peso), .pero(pero), .pedo(pedo)
  );

  // ------------------------------------------------------------ scoreboard
  int      n_sent = 0;
  int      n_recv = 0;
  int      inflight = 0;
  int      exp_dest  [MAXP];
  packet_t exp_pkt   [MAXP];
  int      hops_of   [MAXP];
  int      sent_cycle[MAXP];
  int      recv_cycle[MAXP];
  bit      delivered [MAXP];
  bit      check_latency = 1'b0;

  // mechanism counters
  int m_inj_cw = 0, m_inj_ccw = 0, m_thru_cw = 0, m_thru_ccw = 0, m_eject = 0;
  int m_arb = 0, m_out_hold = 0, m_in_full = 0, m_sw_stall = 0;
  int m_ring_hold = 0;
  int m_vc0 = 0, m_vc1 = 0, m_wrap = 0, m_reset = 0, m_lat = 0;

  // PE injection queues
  packet_t q [NODES][$];
  bit      pe_ready_random = 1'b0;

  function automatic int dest_of(int src, logic dir, int hops);
    if (dir == DIR_CW) return (src + hops) % NODES;
    else               return ((src - hops) % NODES + NODES) % NODES;
  endfunction

  task automatic enqueue(int src, logic vc, logic dir, int hops);
    packet_t p;
    int id;
    id = n_sent + q_total();
    p = '0;
    p.vc = vc; p.dir = dir; p.hop = 8'(hops); p.source = 16'(src);
    p.payload = 32'(id);
    exp_dest[id] = dest_of(src, dir, hops);
    exp_pkt[id]  = p;
    exp_pkt[id].hop = 8'h00;
    hops_of[id]  = hops;
    delivered[id] = 1'b0;
    q[src].push_back(p);
  endtask

  function automatic int q_total();
    int t = 0;
    for (int n = 0; n < NODES; n++) t += q[n].size();
    return t;
  endfunction

  // PE senders: drive on the falling edge, handshake sampled on the rising.
  initial begin
    for (int n = 0; n < NODES; n++) begin
      pesi[n] = 1'b0; pedi[n] = '0; pero[n] = 1'b1;
    end
  end

  always @(negedge clk) begin
    int fl;
    fl = inflight;
    for (int n = 0; n < NODES; n++) begin
      pesi[n] = 1'b0;
      pero[n] = pe_ready_random ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (!reset && q[n].size() > 0 && q[n][0].vc == ~polarity && fl < MAX_INFLIGHT) begin
        if (peri[n]) begin
          pesi[n] = 1'b1;
          pedi[n] = q[n][0];
          fl++;
        end else begin
          m_in_full++;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (!reset) begin
      for (int n = 0; n < NODES; n++) begin
        if (pesi[n] && peri[n]) begin
          packet_t p;
          int id;
          p = q[n].pop_front();
          id = int'(p.payload);
          sent_cycle[id] = cycle;
          n_sent++;
          inflight++;
        end
        if (peso[n]) begin
          packet_t r;
          int id;
          r = packet_t'(pedo[n]);
          id = int'(r.payload);
          checks++;
          if (!pero[n]) begin
            failures++;
            $display("FAIL: node %0d sent to its pe without ready", n);
          end
          m_eject++;
          if (id >= MAXP || delivered[id]) begin
            failures++;
            $display("FAIL: node %0d delivered unknown or duplicate packet %h", n, r);
          end else begin
            delivered[id] = 1'b1;
            recv_cycle[id] = cycle;
            n_recv++;
            inflight--;
            if (r.vc) m_vc1++; else m_vc0++;
            if (hops_of[id] >= NODES) m_wrap++;
            if (exp_dest[id] != n || r != exp_pkt[id]) begin
              failures++;
              $display("FAIL: packet %0d at node %0d (expected %0d): got %h expected %h",
                       id, n, exp_dest[id], r, exp_pkt[id]);
            end
            if (check_latency) begin
              checks++;
              m_lat++;
              if (cycle - sent_cycle[id] != 2 * hops_of[id] + 2) begin
                failures++;
                $display("FAIL: packet %0d latency %0d, expected %0d", id,
                         cycle - sent_cycle[id], 2 * hops_of[id] + 2);
              end
            end
          end
        end
      end
    end
  end

  // Mechanism observation through the router hierarchy.
  for (genvar n = 0; n < NODES; n++) begin : g_mon
    always @(posedge clk) if (!reset) begin
      if (u_ring.g_node[n].u_rtr.g_out[0].u_out.grant_o[0]) m_thru_cw++;
      if (u_ring.g_node[n].u_rtr.g_out[0].u_out.grant_o[1]) m_inj_cw++;
      if (u_ring.g_node[n].u_rtr.g_out[1].u_out.grant_o[0]) m_thru_ccw++;
      if (u_ring.g_node[n].u_rtr.g_out[1].u_out.grant_o[1]) m_inj_ccw++;
      if (u_ring.g_node[n].u_rtr.g_out[0].u_out.req_i == 2'b11 ||
          u_ring.g_node[n].u_rtr.g_out[1].u_out.req_i == 2'b11 ||
          u_ring.g_node[n].u_rtr.g_out[2].u_out.req_i == 2'b11) m_arb++;
      if ((u_ring.g_node[n].u_rtr.g_out[0].u_out.full_q[~polarity] && !u_ring.g_node[n].u_rtr.cwro) ||
          (u_ring.g_node[n].u_rtr.g_out[1].u_out.full_q[~polarity] && !u_ring.g_node[n].u_rtr.ccwro))
        m_ring_hold++;
      if (u_ring.g_node[n].u_rtr.g_out[2].u_out.full_q[~polarity] && !pero[n]) m_out_hold++;
      if ((u_ring.g_node[n].u_rtr.g_out[0].u_out.req_i != 0 && u_ring.g_node[n].u_rtr.g_out[0].u_out.full_q[polarity]) ||
          (u_ring.g_node[n].u_rtr.g_out[1].u_out.req_i != 0 && u_ring.g_node[n].u_rtr.g_out[1].u_out.full_q[polarity]) ||
          (u_ring.g_node[n].u_rtr.g_out[2].u_out.req_i != 0 && u_ring.g_node[n].u_rtr.g_out[2].u_out.full_q[polarity]))
        m_sw_stall++;
    end
  end

  // ------------------------------------------------------------ checks
  task automatic wait_drain(int limit);
    int c = 0;
    while ((q_total() > 0 || inflight > 0) && c < limit) begin
      @(posedge clk);
      c++;
    end
  endtask

  task automatic check_polarity_all();
    for (int n = 0; n < NODES; n++) begin
      checks++;
      if (u_ring.pol[n] != polarity) begin
        failures++;
        $display("FAIL: polarity of node %0d differs", n);
      end
    end
  endtask

  logic last_pol;
  initial begin
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (polarity !== 1'b0) begin failures++; $display("FAIL: polarity not even in reset"); end
    @(negedge clk);
    reset = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (polarity !== 1'b1) begin failures++; $display("FAIL: polarity not odd after first edge"); end

    // Phase 1: single packets through an empty ring, latency checked.
    check_latency = 1'b1;
    for (int k = 0; k < 16; k++) begin
      enqueue(k % NODES, k[0], k[1], 1 + (k % (NODES + 1)));
      wait_drain(200);
    end
    // the largest hop count the 8-bit field holds: 255 hops, many laps
    enqueue(1, 1'b0, DIR_CCW, 255);
    wait_drain(1000);
    enqueue(2, 1'b1, DIR_CW, 255);
    wait_drain(1000);
    check_latency = 1'b0;

    // Phase 2: random traffic with back pressure on the pe outputs.
    pe_ready_random = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      int s;
      s = $urandom_range(0, NODES - 1);
      enqueue(s, 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)),
              $urandom_range(1, NODES + 2));
      if (q_total() > 20) wait_drain(20);
    end
    wait_drain(20000);
    checks++;
    if (inflight != 0 || q_total() != 0) begin
      failures++;
      $display("FAIL: %0d packets not delivered", inflight + q_total());
    end
    check_polarity_all();

    // Phase 3: reset with packets in flight.
    pe_ready_random = 1'b0;
    for (int n = 0; n < NODES; n++) pero[n] = 1'b0;
    for (int k = 0; k < 6; k++) enqueue(k % NODES, k[0], 1'b0, 2);
    repeat (12) @(posedge clk);
    @(negedge clk);
    reset = 1'b1;
    m_reset++;
    @(posedge clk); #1;
    for (int n = 0; n < NODES; n++) q[n].delete();
    // everything that was in the network is gone
    for (int id = 0; id < n_sent; id++) delivered[id] = 1'b1;
    inflight = 0;
    for (int n = 0; n < NODES; n++) begin
      checks++;
      if (!(u_ring.cwri[n] && u_ring.ccwri[n] && peri[n] && !u_ring.cwso[n] && !u_ring.ccwso[n] && !peso[n] && u_ring.pol[n] == 1'b0)) begin
        failures++;
        $display("FAIL: node %0d not idle after reset", n);
      end
    end
    @(negedge clk);
    reset = 1'b0;
    @(posedge clk);
    // the ring still works after reset
    check_latency = 1'b1;
    for (int k = 0; k < 4; k++) begin
      enqueue(k, k[0], ~k[0], 3);
      wait_drain(200);
    end
    check_latency = 1'b0;
    checks++;
    if (inflight != 0) begin failures++; $display("FAIL: packets lost after reset"); end

    // Mechanism coverage.
    begin
      int m [string];
      m["inject_cw"] = m_inj_cw;   m["inject_ccw"] = m_inj_ccw;
      m["through_cw"] = m_thru_cw; m["through_ccw"] = m_thru_ccw;
      m["eject"] = m_eject;        m["arbitration"] = m_arb;
      m["pe_output_held_not_ready"] = m_out_hold;
      m["ring_output_held_not_ready"] = m_ring_hold;
      m["input_full_refuses"] = m_in_full;
      m["switch_stall"] = m_sw_stall;
      m["vc_even"] = m_vc0;        m["vc_odd"] = m_vc1;
      m["ring_wrap"] = m_wrap;     m["reset"] = m_reset;
      m["latency_checked"] = m_lat;
      foreach (m[k]) begin
        checks++;
        $display("mechanism %-22s %0d", k, m[k]);
        if (m[k] == 0) begin failures++; $display("FAIL: mechanism %s never happened", k); end
      end
    end
    $display("packets sent %0d delivered %0d in %0d cycles", n_sent, n_recv, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
