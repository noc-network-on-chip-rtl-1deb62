// tb_output_ctrl: checks an output channel controller against a model of its
// two virtual-channel buffers and per-VC round-robin arbitration.
//
// The testbench makes the polarity (0 in reset, then toggling) and drives
// random requests from the two sources and a random receiver ready. Each
// cycle it checks, against its model:
//  * a grant is given only when the buffer of the internally forwarded VC
//    (equal to polarity) is empty, to the source the round-robin pointer of
//    that VC picks, and the granted packet is stored;
//  * send is high exactly when the buffer of the externally owned VC is full
//    and ready is high, and the data is that buffer's packet;
//  * a sent buffer is empty afterwards.
module tb_output_ctrl;
  import victory_pkg::*;

  logic clk = 1'b0;
  logic reset;
  logic polarity;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [1:0]       req, gnt;
  packet_t          pkt [2];
  logic             so, ro;
  logic [PKT_W-1:0] dout;

  output_ctrl #(.NUM_SRC(2)) dut (
    .clk(clk), .reset(reset), .polarity(polarity),
    .req_i(req), .pkt_i(pkt), .grant_o(gnt),
    .so_o(so), .ro_i(ro), .do_o(dout)
  );

  always_ff @(posedge clk) begin
    if (reset) polarity <= 1'b0;
    else       polarity <= ~polarity;
  end

  bit      mfull [2];
  packet_t mbuf  [2];
  int      mptr  [2];
  int      n_sent = 0, n_conflict = 0, n_hold = 0, n_blocked = 0;

  initial begin
    reset = 1'b1;
    req = 0; ro = 0; pkt[0] = '0; pkt[1] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    mfull = '{0, 0}; mptr = '{0, 0};
    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic ev, iv;
      logic [1:0] eg;
      ev = ~polarity;
      iv = polarity;
      req = 2'($urandom);
      pkt[0] = {$urandom, $urandom};
      pkt[1] = {$urandom, $urandom};
      ro = ($urandom_range(0, 2) != 0);
      #1;
      eg = 2'b00;
      if (!mfull[iv] && req != 0) begin
        if (req[mptr[iv]]) eg[mptr[iv]] = 1'b1;
        else               eg[1 - mptr[iv]] = 1'b1;
      end
      if (req == 2'b11 && !mfull[iv]) n_conflict++;
      if (req != 0 && mfull[iv]) n_blocked++;
      if (mfull[ev] && !ro) n_hold++;
      checks += 2;
      if (gnt != eg) begin
        failures++;
        $display("FAIL: cycle %0d req %b grant %b expected %b", cyc, req, gnt, eg);
      end
      if (so != (mfull[ev] && ro) || (so && dout != mbuf[ev])) begin
        failures++;
        $display("FAIL: cycle %0d so %0b data %h model full %0b data %h", cyc, so, dout, mfull[ev], mbuf[ev]);
      end
      @(posedge clk);
      if (eg != 0) begin
        mfull[iv] = 1;
        mbuf[iv]  = eg[0] ? pkt[0] : pkt[1];
        mptr[iv]  = eg[0] ? 1 : 0;
      end
      if (mfull[ev] && ro) begin mfull[ev] = 0; n_sent++; end
      @(negedge clk);
    end
    checks++;
    if (n_sent < 100 || n_conflict < 50 || n_hold < 50 || n_blocked < 50) begin
      failures++;
      $display("FAIL: too little traffic %0d %0d %0d %0d", n_sent, n_conflict, n_hold, n_blocked);
    end
    // reset empties both buffers
    reset = 1'b1; req = 0; ro = 1;
    @(posedge clk); @(negedge clk);
    reset = 1'b0;
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (so) begin failures++; $display("FAIL: send after reset"); end
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
