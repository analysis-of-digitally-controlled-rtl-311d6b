// nikolic_saff: single edge sense-amplifier flip-flop (function of the
// Nikolic sense-amplifier flip-flop, the second driving-circuit option).
//
// The output takes the value of d at every rising clock edge and provides
// both polarities; the cell's symmetric output latch makes q and qb switch
// together, which is modelled by deriving qb from the same register.
// Transistor-level details (cross-coupled inverters, output drivers) are
// replaced by the logic function.
// Interface: clk, rst_n (asynchronous, active low, q = RST_VAL), d, q, qb.
// Timing: one register stage, q valid after each rising edge.
module nikolic_saff #(
  parameter logic RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic qb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RST_VAL;
    else        q <= d;
  end

  assign qb = ~q;

endmodule
