// tb_route_decode: checks the routing decision and hop-count update of the
// three input channel kinds against the routing rules.
//
// Rules checked, for random packets and the corner hop counts 0, 1 and 255:
//  * pe input: direction bit 0 goes to the cw output, 1 to the ccw output;
//  * cw / ccw input: hop count 0 goes to the pe output, anything else
//    continues to the output of the same direction;
//  * a packet sent onward on the ring has its hop count decremented by one;
//    a packet for the pe output is unchanged; no other field ever changes.
module tb_route_decode;
  import victory_pkg::*;

  int checks = 0, failures = 0;

  packet_t pkt;
  port_e   dest [NUM_PORTS];
  packet_t outp [NUM_PORTS];

  route_decode #(.IN_PORT(PORT_CW))  u_cw  (.pkt_i(pkt), .dest_o(dest[0]), .pkt_o(outp[0]));
  route_decode #(.IN_PORT(PORT_CCW)) u_ccw (.pkt_i(pkt), .dest_o(dest[1]), .pkt_o(outp[1]));
  route_decode #(.IN_PORT(PORT_PE))  u_pe  (.pkt_i(pkt), .dest_o(dest[2]), .pkt_o(outp[2]));

  task automatic check_one();
    port_e   ed;
    packet_t ep;
    for (int i = 0; i < 3; i++) begin
      if (i == 2) ed = pkt[62] ? PORT_CCW : PORT_CW;     // dir bit
      else        ed = (pkt[55:48] == 0) ? PORT_PE : port_e'(i);
      ep = pkt;
      if (ed != PORT_PE) ep[55:48] = pkt[55:48] - 1;
      checks++;
      if (dest[i] != ed || outp[i] != ep) begin
        failures++;
        $display("FAIL: input %0d packet %h: dest %0d/%0d out %h/%h", i, pkt,
                 dest[i], ed, outp[i], ep);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 2000; k++) begin
      pkt = {$urandom, $urandom};
      case (k % 4)
        0: pkt[55:48] = 8'h00;
        1: pkt[55:48] = 8'h01;
        2: pkt[55:48] = 8'hff;
        default: ;
      endcase
      #1;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
