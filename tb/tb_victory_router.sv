// tb_victory_router: pin-level test of one Victory router.
//
// The testbench plays the two ring neighbours and the processing element:
// it sends packets on all three input channels and receives on all three
// output channels with randomly toggling ready signals. Senders follow the
// handshake: send only while ready is high, with the vc bit of the VC that
// owns the external channel (the opposite of polarity).
//
// Every packet has a unique id in its payload. From the routing rules alone
// the scoreboard works out the output channel (pe input: direction bit; ring
// input: pe output at hop count 0, else onward in the same direction) and
// the packet expected there (hop count minus one when sent onward). It checks
// that every packet leaves once, on that channel, unaltered otherwise, and
// in order with the other packets of the same input, VC and output. A send
// must never appear without ready.
//
// Phase 1 sends single packets through the idle router and checks the
// timing: a packet sent on an input in cycle t leaves on its output, send
// high, in cycle t+2. Phase 2 is random traffic. Phase 3 checks polarity and
// idle state around a reset with packets inside.
module tb_victory_router;
  import victory_pkg::*;

  localparam int MAXP = 6000;

  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic             polarity;
  logic             si [NUM_PORTS], ri [NUM_PORTS], so [NUM_PORTS], ro [NUM_PORTS];
  logic [PKT_W-1:0] di [NUM_PORTS], dout [NUM_PORTS];

  victory_router dut (
    .clk(clk), .reset(reset), .polarity(polarity),
    .cwsi(si[PORT_CW]),   .cwri(ri[PORT_CW]),   .cwdi(di[PORT_CW]),
    .ccwsi(si[PORT_CCW]), .ccwri(ri[PORT_CCW]), .ccwdi(di[PORT_CCW]),
    .pesi(si[PORT_PE]),   .peri(ri[PORT_PE]),   .pedi(di[PORT_PE]),
    .cwso(so[PORT_CW]),   .cwro(ro[PORT_CW]),   .cwdo(dout[PORT_CW]),
    .ccwso(so[PORT_CCW]), .ccwro(ro[PORT_CCW]), .ccwdo(dout[PORT_CCW]),
    .peso(so[PORT_PE]),   .pero(ro[PORT_PE]),   .pedo(dout[PORT_PE])
  );

  // scoreboard
  int      n_ids = 0, outstanding = 0;
  int      e_out  [MAXP];
  int      e_key  [MAXP];
  int      t_in   [MAXP];
  packet_t e_pkt  [MAXP];
  bit      done   [MAXP];
  int      order  [NUM_PORTS * 2 * NUM_PORTS][$];
  bit      timing = 1'b0;
  bit      traffic = 1'b0;
  int      rate = 2;

  int m_arb [NUM_PORTS];
  int m_hold = 0, m_refused = 0, m_to [NUM_PORTS], m_from [NUM_PORTS];

  function automatic packet_t make_pkt(int in, logic vc);
    packet_t p;
    p = {$urandom, $urandom};
    p.vc = vc;
    p.reserved = '0;
    p.hop = 8'($urandom_range(0, 3));
    if (in == PORT_PE && p.hop == 0) p.hop = 8'($urandom_range(1, 255));
    p.payload = 32'(n_ids);
    return p;
  endfunction

  function automatic int route(int in, packet_t p);
    if (in == PORT_PE) return p.dir ? PORT_CCW : PORT_CW;
    return (p.hop == 0) ? PORT_PE : in;
  endfunction

  bit want [NUM_PORTS];

  initial for (int i = 0; i < NUM_PORTS; i++) begin
    si[i] = 0; ro[i] = 1; di[i] = '0; want[i] = 0; m_arb[i] = 0; m_to[i] = 0; m_from[i] = 0;
  end

  // drive on the falling edge
  always @(negedge clk) begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      si[i] = 1'b0;
      if (traffic) ro[i] = ($urandom_range(0, 3) != 0);
      if (!reset && (want[i] || (traffic && $urandom_range(0, rate) == 0)) && n_ids < MAXP) begin
        if (ri[i]) begin
          packet_t p;
          int o;
          p = make_pkt(i, ~polarity);
          o = route(i, p);
          e_out[n_ids] = o;
          e_key[n_ids] = (i * 2 + int'(p.vc)) * NUM_PORTS + o;
          e_pkt[n_ids] = p;
          if (o != PORT_PE) e_pkt[n_ids].hop = p.hop - 8'd1;
          done[n_ids] = 1'b0;
          order[e_key[n_ids]].push_back(n_ids);
          n_ids++;
          si[i] = 1'b1;
          di[i] = p;
          want[i] = 1'b0;
        end else if (traffic) begin
          m_refused++;
        end
      end
    end
  end

  // sample on the rising edge
  always @(posedge clk) if (!reset) begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      if (si[i]) begin
        packet_t sp;
        sp = packet_t'(di[i]);
        t_in[int'(sp.payload)] = cycle;
        outstanding++;
        m_from[i]++;
      end
      if (so[i]) begin
        packet_t r;
        int id;
        r = packet_t'(dout[i]);
        id = int'(r.payload);
        checks++;
        m_to[i]++;
        if (!ro[i]) begin failures++; $display("FAIL: send without ready on output %0d", i); end
        if (id >= n_ids || done[id]) begin
          failures++;
          $display("FAIL: output %0d unknown or duplicate packet %h", i, r);
        end else begin
          done[id] = 1'b1;
          outstanding--;
          if (e_out[id] != i || r != e_pkt[id]) begin
            failures++;
            $display("FAIL: packet %0d on output %0d (expected %0d): %h expected %h",
                     id, i, e_out[id], r, e_pkt[id]);
          end
          if (order[e_key[id]].size() == 0 || order[e_key[id]][0] != id) begin
            failures++;
            $display("FAIL: packet %0d out of order", id);
          end else begin
            void'(order[e_key[id]].pop_front());
          end
          if (timing) begin
            checks++;
            if (cycle - t_in[id] != 2) begin
              failures++;
              $display("FAIL: packet %0d took %0d cycles, expected 2", id, cycle - t_in[id]);
            end
          end
        end
      end
    end
    for (int o = 0; o < NUM_PORTS; o++) begin
      if (o == 0 && dut.g_out[0].u_out.req_i == 2'b11) m_arb[0]++;
      if (o == 1 && dut.g_out[1].u_out.req_i == 2'b11) m_arb[1]++;
      if (o == 2 && dut.g_out[2].u_out.req_i == 2'b11) m_arb[2]++;
    end
    if (traffic && (dut.g_out[0].u_out.full_q[~polarity] && !ro[0])) m_hold++;
  end

  task automatic drain(int limit);
    int c = 0;
    while (outstanding > 0 && c < limit) begin @(posedge clk); c++; end
    @(posedge clk);
  endtask

  initial begin
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (polarity !== 1'b0) begin failures++; $display("FAIL: polarity odd during reset"); end
    @(negedge clk);
    reset = 1'b0;
    for (int k = 0; k < 6; k++) begin
      @(posedge clk); #1;
      checks++;
      if (polarity !== 1'(k % 2 == 0)) begin failures++; $display("FAIL: polarity sequence"); end
    end

    // Phase 1: single packets, idle router, all ready: two cycles in to out.
    timing = 1'b1;
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      want[k % NUM_PORTS] = 1'b1;
      drain(50);
    end
    timing = 1'b0;

    // Phase 2: random traffic on all inputs, random readies.
    for (int r = 0; r < 3; r++) begin
      rate = r;
      traffic = 1'b1;
      repeat (1500) @(posedge clk);
      traffic = 1'b0;
      @(negedge clk);
      for (int i = 0; i < NUM_PORTS; i++) ro[i] = 1'b1;
      drain(200);
    end
    checks++;
    if (outstanding != 0) begin failures++; $display("FAIL: %0d packets stuck", outstanding); end

    // Phase 3: reset with packets inside empties everything.
    for (int i = 0; i < NUM_PORTS; i++) ro[i] = 1'b0;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_PORTS; i++) want[i] = 1'b1;
    end
    @(negedge clk);
    reset = 1'b1;
    for (int i = 0; i < NUM_PORTS; i++) begin ro[i] = 1'b1; want[i] = 1'b0; end
    @(posedge clk); #1;
    // whatever was inside is gone
    foreach (order[k]) order[k].delete();
    for (int id = 0; id < n_ids; id++) done[id] = 1'b1;
    outstanding = 0;
    checks++;
    if (!(ri[0] && ri[1] && ri[2] && !so[0] && !so[1] && !so[2] && polarity == 1'b0)) begin
      failures++; $display("FAIL: router not idle after reset");
    end
    @(negedge clk);
    reset = 1'b0;
    repeat (6) begin
      @(posedge clk); #1;
      checks++;
      if (so[0] || so[1] || so[2]) begin failures++; $display("FAIL: send after reset"); end
    end

    // Coverage of the switch paths and contention.
    for (int i = 0; i < NUM_PORTS; i++) begin
      checks += 3;
      $display("channel %0d: packets in %0d, out %0d, arbitration cycles %0d",
               i, m_from[i], m_to[i], m_arb[i]);
      if (m_from[i] == 0 || m_to[i] == 0 || m_arb[i] == 0) begin
        failures++; $display("FAIL: channel %0d not exercised", i);
      end
    end
    checks += 2;
    $display("refused sends %0d, outputs held %0d", m_refused, m_hold);
    if (m_refused == 0 || m_hold == 0) begin failures++; $display("FAIL: back pressure not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
