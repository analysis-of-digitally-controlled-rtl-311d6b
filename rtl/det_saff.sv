// det_saff: dual edge triggered flip-flop (function of the dual edge
// triggered sense-amplifier flip-flop used as the delay line's driving
// circuit).
//
// The output takes the value of d at every rising and every falling clock
// edge, so the control bits can be updated twice per clock period. The
// transistor-level cell (pulse generator, sense stage, latch stage) is
// replaced here by its logic function, built from two single-edge
// registers combined by XOR: at a rising edge q_r <= d ^ q_f, at a falling
// edge q_f <= d ^ q_r, and q = q_r ^ q_f, so q equals the last sampled d
// without a clock-gated multiplexer. This construction is this design's own.
// Interface: clk, rst_n (asynchronous, active low, q = RST_VAL), d, q, qb.
// Timing: q is valid right after each edge of clk; qb = ~q.
module det_saff #(
  parameter logic RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic qb
);

  logic q_r;  // state captured on rising edges
  logic q_f;  // state captured on falling edges

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_r <= RST_VAL;
    else        q_r <= d ^ q_f;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q_f <= 1'b0;
    else        q_f <= d ^ q_r;
  end

  assign q  = q_r ^ q_f;
  assign qb = ~q;

endmodule
