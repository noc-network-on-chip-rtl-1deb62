// victory_ring: a bidirectional ring network-on-chip built from NODES Victory
// routers.
//
// Router i drives its clockwise output into the clockwise input of router
// i+1 and its counter-clockwise output into the counter-clockwise input of
// router i-1 (indices modulo NODES), send, ready and data alike. What is left
// outside is the processing-element (pe) channel pair of every node: the core
// at node i injects on pesi[i]/peri[i]/pedi[i] and receives on
// peso[i]/pero[i]/pedo[i], with the same send/ready handshake as a single
// router. A packet injected at node s with direction bit 0 and hop count H
// leaves at node (s+H) mod NODES, with direction bit 1 at (s-H) mod NODES,
// 2*H+2 cycles after it was sent when it meets no contention.
//
// All routers share clk and reset, so they all have the same polarity; the
// polarity of router 0 is brought out. The ring size is this design's
// choice (the router specification describes a ring of Victory routers but
// gives no node count); NODES can be any value of 2 or more.
module victory_ring
  import victory_pkg::*;
#(
  parameter int unsigned NODES = 4
) (
  input  logic                        clk,
  input  logic                        reset,
  output logic                        polarity,
  input  logic [NODES-1:0]            pesi,
  output logic [NODES-1:0]            peri,
  input  logic [NODES-1:0][PKT_W-1:0] pedi,
  output logic [NODES-1:0]            peso,
  input  logic [NODES-1:0]            pero,
  output logic [NODES-1:0][PKT_W-1:0] pedo
);

  logic [NODES-1:0]            pol;
  logic [NODES-1:0]            cwso, cwri, ccwso, ccwri;
  logic [NODES-1:0][PKT_W-1:0] cwdo, ccwdo;

  for (genvar n = 0; n < NODES; n++) begin : g_node
    localparam int unsigned NXT = (n + 1) % NODES;
    localparam int unsigned PRV = (n + NODES - 1) % NODES;

    victory_router u_rtr (
      .clk     (clk),
      .reset   (reset),
      .polarity(pol[n]),
      // clockwise traffic arrives from the previous node
      .cwsi    (cwso[PRV]),
      .cwri    (cwri[n]),
      .cwdi    (cwdo[PRV]),
      // counter-clockwise traffic arrives from the next node
      .ccwsi   (ccwso[NXT]),
      .ccwri   (ccwri[n]),
      .ccwdi   (ccwdo[NXT]),
      .pesi    (pesi[n]),
      .peri    (peri[n]),
      .pedi    (pedi[n]),
      .cwso    (cwso[n]),
      .cwro    (cwri[NXT]),
      .cwdo    (cwdo[n]),
      .ccwso   (ccwso[n]),
      .ccwro   (ccwri[PRV]),
      .ccwdo   (ccwdo[n]),
      .peso    (peso[n]),
      .pero    (pero[n]),
      .pedo    (pedo[n])
    );
  end

  assign polarity = pol[0];

  a_polarity_agrees: assert property (@(posedge clk) disable iff (reset) (pol == '0) || (pol == '1))
    else $error("victory_ring: router polarities differ");

endmodule
