// rr_arbiter: round-robin arbiter for N requesters.
//
// Combinational grant with registered priority. gnt_o is one-hot (or zero):
// the first requester at or after the priority pointer, searching upward and
// wrapping around. When en_i is high and a grant is given, the pointer moves
// to the requester just after the winner at the next rising edge, so a
// requester that loses is first in line next time. Reset (synchronous,
// active high) points at requester 0.
//
// The router specification names an arbitration stage in each output
// controller but gives no policy; round robin is this design's choice, made
// so that through traffic cannot starve injection and vice versa.
module rr_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en_i,
  input  logic [N-1:0] req_i,
  output logic [N-1:0] gnt_o
);

  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0] ptr_q;
  logic [PW-1:0] win;
  logic          found;

  always_comb begin
    gnt_o = '0;
    win   = ptr_q;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      logic [PW-1:0] idx;
      idx = PW'((int'(ptr_q) + k) % N);
      if (!found && req_i[idx]) begin
        gnt_o[idx] = 1'b1;
        win        = idx;
        found      = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      ptr_q <= '0;
    end else if (en_i && found) begin
      ptr_q <= (int'(win) == N - 1) ? '0 : win + PW'(1);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (reset) $onehot0(gnt_o))
    else $error("rr_arbiter: grant not one-hot");

endmodule
