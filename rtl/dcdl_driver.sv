// dcdl_driver: driving circuit of the delay line.
//
// One flip-flop per control bit registers the encoded S and T words and
// hands them to the line, S in both polarities (S and S'). With DUAL_EDGE=1
// (default, the preferred option) every bit is a det_saff, which updates at
// both clock edges; with DUAL_EDGE=0 every bit is a nikolic_saff, which
// updates at rising edges only. All bits of one word share one clock edge,
// so S and T change together.
// Reset (asynchronous, active low) loads the encoding of control code 0:
// S = all ones, T = all ones except T_1 = 0. That reset value is this
// design's own choice.
// Interface: clk, rst_n, s_d/t_d (next S/T words), s_q, s_n_q, t_q.
// Timing: one edge of latency (half a clock period with DUAL_EDGE=1).
module dcdl_driver #(
  parameter int unsigned N_DE      = dcdl_pkg::N_DE_DEFAULT,
  parameter bit          DUAL_EDGE = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_DE-1:0] s_d,
  input  logic [N_DE-1:0] t_d,
  output logic [N_DE-1:0] s_q,
  output logic [N_DE-1:0] s_n_q,
  output logic [N_DE-1:0] t_q
);

  localparam logic [N_DE-1:0] S_RST = '1;
  localparam logic [N_DE-1:0] T_RST = (N_DE > 1) ? ~(N_DE'(1) << 1) : '1;

  logic [N_DE-1:0] t_n_q;  // complementary T output of the cell, not used by the line

  for (genvar i = 0; i < N_DE; i++) begin : g_bit
    if (DUAL_EDGE) begin : g_det
      det_saff #(.RST_VAL(S_RST[i])) u_s (
        .clk(clk), .rst_n(rst_n), .d(s_d[i]), .q(s_q[i]), .qb(s_n_q[i]));
      det_saff #(.RST_VAL(T_RST[i])) u_t (
        .clk(clk), .rst_n(rst_n), .d(t_d[i]), .q(t_q[i]), .qb(t_n_q[i]));
    end else begin : g_sff
      nikolic_saff #(.RST_VAL(S_RST[i])) u_s (
        .clk(clk), .rst_n(rst_n), .d(s_d[i]), .q(s_q[i]), .qb(s_n_q[i]));
      nikolic_saff #(.RST_VAL(T_RST[i])) u_t (
        .clk(clk), .rst_n(rst_n), .d(t_d[i]), .q(t_q[i]), .qb(t_n_q[i]));
    end
  end

endmodule
