// tb_input_ctrl: checks an input channel controller against a model of its
// two virtual-channel buffers.
//
// Two instances are tested side by side: a counter-clockwise ring input and a
// processing-element input. The testbench makes the polarity itself (0 in
// reset, then toggling). Each cycle it checks, against its own model:
//  * ready is high exactly when the buffer of the externally owned VC (the
//    one opposite to polarity) is empty;
//  * a request is raised exactly when the buffer of the internally forwarded
//    VC (equal to polarity) is full, toward the output the routing rules
//    give, with the hop count decremented for a ring output;
//  * a sent packet is stored and comes out unchanged in a later cycle, and a
//    granted request frees the buffer at that edge.
// Sends follow the handshake (only while ready, vc bit equal to the external
// VC); grants are random, so packets also wait in the buffers.
module tb_input_ctrl;
  import victory_pkg::*;

  logic clk = 1'b0;
  logic reset;
  logic polarity;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam port_e KIND [2] = '{PORT_CCW, PORT_PE};

  logic             si  [2], ri [2], req [2], gnt [2];
  logic [PKT_W-1:0] di  [2];
  port_e            dest[2];
  packet_t          pkt [2];

  for (genvar i = 0; i < 2; i++) begin : g_dut
    input_ctrl #(.IN_PORT(KIND[i])) dut (
      .clk(clk), .reset(reset), .polarity(polarity),
      .si_i(si[i]), .ri_o(ri[i]), .di_i(di[i]),
      .req_o(req[i]), .dest_o(dest[i]), .pkt_o(pkt[i]), .grant_i(gnt[i])
    );
  end

  // model
  bit      mfull [2][2];
  packet_t mbuf  [2][2];
  int      n_in = 0, n_out = 0, n_wait = 0;

  always_ff @(posedge clk) begin
    if (reset) polarity <= 1'b0;
    else       polarity <= ~polarity;
  end

  initial begin
    reset = 1'b1;
    for (int i = 0; i < 2; i++) begin si[i] = 0; gnt[i] = 0; di[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 2; i++) for (int v = 0; v < 2; v++) mfull[i][v] = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic ev, iv;
      ev = ~polarity;
      iv = polarity;
      for (int i = 0; i < 2; i++) begin
        packet_t p;
        port_e   ed;
        packet_t ep;
        // ready / request against the model
        checks++;
        if (ri[i] != !mfull[i][ev] || req[i] != mfull[i][iv]) begin
          failures++;
          $display("FAIL: port %0d cycle %0d ri %0b req %0b model full %0b%0b",
                   i, cyc, ri[i], req[i], mfull[i][1], mfull[i][0]);
        end
        if (mfull[i][iv]) begin
          ep = mbuf[i][iv];
          if (KIND[i] == PORT_PE) ed = ep.dir ? PORT_CCW : PORT_CW;
          else                    ed = (ep.hop == 0) ? PORT_PE : KIND[i];
          if (ed != PORT_PE) ep.hop = ep.hop - 8'd1;
          checks++;
          if (dest[i] != ed || pkt[i] != ep) begin
            failures++;
            $display("FAIL: port %0d routing: dest %0d/%0d pkt %h/%h", i, dest[i], ed, pkt[i], ep);
          end
        end
        // stimulus
        si[i] = 1'b0;
        if (ri[i] && $urandom_range(0, 2) != 0) begin
          p = {$urandom, $urandom};
          p.vc  = ev;
          p.hop = 8'($urandom_range(0, 3));
          if (KIND[i] == PORT_PE && p.hop == 0) p.hop = 8'd5;
          si[i] = 1'b1;
          di[i] = p;
        end
        gnt[i] = req[i] && ($urandom_range(0, 2) == 0);
        if (req[i] && !gnt[i]) n_wait++;
      end
      @(posedge clk);
      for (int i = 0; i < 2; i++) begin
        if (si[i]) begin mfull[i][ev] = 1; mbuf[i][ev] = packet_t'(di[i]); n_in++; end
        if (gnt[i]) begin mfull[i][iv] = 0; n_out++; end
      end
      @(negedge clk);
    end
    checks++;
    if (n_in < 100 || n_out < 100 || n_wait < 100) begin
      failures++;
      $display("FAIL: too little traffic: in %0d out %0d wait %0d", n_in, n_out, n_wait);
    end
    // reset empties both buffers
    for (int i = 0; i < 2; i++) begin si[i] = 0; gnt[i] = 0; end
    reset = 1'b1;
    @(posedge clk); @(negedge clk);
    reset = 1'b0;
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (!ri[i] || req[i]) begin failures++; $display("FAIL: port %0d not empty after reset", i); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
