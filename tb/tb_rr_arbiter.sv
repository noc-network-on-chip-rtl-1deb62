// tb_rr_arbiter: checks the round-robin arbiter against a reference model,
// for two requesters (as used in the router) and for three.
//
// The model keeps its own priority pointer: the grant goes to the first
// requester at or after the pointer, and after an enabled grant the pointer
// moves past the winner. With en low the pointer must not move. A directed
// sequence also checks that two requesters that both keep requesting are
// served alternately.
module tb_rr_arbiter;

  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       en2, en3;
  logic [1:0] req2, gnt2;
  logic [2:0] req3, gnt3;

  rr_arbiter #(.N(2)) u2 (.clk(clk), .reset(reset), .en_i(en2), .req_i(req2), .gnt_o(gnt2));
  rr_arbiter #(.N(3)) u3 (.clk(clk), .reset(reset), .en_i(en3), .req_i(req3), .gnt_o(gnt3));

  int ptr2 = 0, ptr3 = 0;
  logic [1:0] last_gnt2;

  function automatic int model_win(int n, int ptr, logic [2:0] req);
    for (int k = 0; k < n; k++)
      if (req[(ptr + k) % n]) return (ptr + k) % n;
    return -1;
  endfunction

  task automatic step(logic e2, logic [1:0] r2, logic e3, logic [2:0] r3);
    int w2, w3;
    logic [1:0] eg2;
    logic [2:0] eg3;
    en2 = e2; req2 = r2; en3 = e3; req3 = r3;
    #1;
    w2 = model_win(2, ptr2, {1'b0, r2});
    w3 = model_win(3, ptr3, r3);
    eg2 = (w2 < 0) ? 2'b00 : 2'(1 << w2);
    eg3 = (w3 < 0) ? 3'b000 : 3'(1 << w3);
    checks += 2;
    if (gnt2 != eg2) begin failures++; $display("FAIL: N=2 req %b gnt %b expected %b", r2, gnt2, eg2); end
    if (gnt3 != eg3) begin failures++; $display("FAIL: N=3 req %b gnt %b expected %b", r3, gnt3, eg3); end
    last_gnt2 = gnt2;
    @(posedge clk);
    if (e2 && w2 >= 0) ptr2 = (w2 + 1) % 2;
    if (e3 && w3 >= 0) ptr3 = (w3 + 1) % 3;
    @(negedge clk);
  endtask

  initial begin
    en2 = 0; en3 = 0; req2 = 0; req3 = 0;
    reset = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    // both always requesting: must alternate
    for (int k = 0; k < 8; k++) begin
      step(1'b1, 2'b11, 1'b1, 3'b111);
      checks++;
      if (last_gnt2 != ((k % 2 == 0) ? 2'b01 : 2'b10)) begin
        failures++; $display("FAIL: no alternation at step %0d", k);
      end
    end
    for (int k = 0; k < 3000; k++)
      step(1'($urandom_range(0, 3) != 0), 2'($urandom), 1'($urandom_range(0, 3) != 0), 3'($urandom));
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
