// polarity_gen: the router's clock-cycle polarity.
//
// The polarity says whether the current cycle is even (0) or odd (1). It
// decides which virtual channel is forwarded inside the router this cycle
// (the one equal to polarity) and which one uses the external channels (the
// other one). As the specification requires, it is even while reset is held,
// becomes odd at the first rising clock edge after reset is released and
// toggles on every edge after that. Reset is synchronous and active high.
// Every router of a ring shares clock and reset, so all polarities agree.
module polarity_gen (
  input  logic clk,
  input  logic reset,
  output logic polarity
);

  always_ff @(posedge clk) begin
    if (reset) polarity <= 1'b0;
    else       polarity <= ~polarity;
  end

endmodule
