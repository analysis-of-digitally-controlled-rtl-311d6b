// tb_dcdl_driver: self-checking test of the driving circuit.
// Two instances: dual edge (default) and single edge. Random S/T words are
// applied a quarter period after each edge; the dual edge driver must show
// each word after the very next edge, the single edge driver only after a
// rising edge. Also checks the reset word (encoding of code 0) and S'.
module tb_dcdl_driver;
  localparam int unsigned N = 4;
  localparam int unsigned P = 100;
  logic clk = 0, rst_n;
  logic [N-1:0] s_d, t_d;
  logic [N-1:0] s_q, s_n_q, t_q, s_q1, s_n_q1, t_q1;
  int checks = 0, failures = 0;

  dcdl_driver dut (.clk(clk), .rst_n(rst_n), .s_d(s_d), .t_d(t_d),
                   .s_q(s_q), .s_n_q(s_n_q), .t_q(t_q));
  dcdl_driver #(.DUAL_EDGE(1'b0)) dut1 (.clk(clk), .rst_n(rst_n), .s_d(s_d), .t_d(t_d),
                   .s_q(s_q1), .s_n_q(s_n_q1), .t_q(t_q1));

  always #(P/2) clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #(400*P);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] s_held, t_held;
    rst_n = 1; s_d = '0; t_d = '0;
    #1 rst_n = 0;
    #(P/4 - 1);
    check(s_q == 4'b1111 && t_q == 4'b1101, "dual edge reset word");
    check(s_q1 == 4'b1111 && t_q1 == 4'b1101, "single edge reset word");
    rst_n = 1;
    s_held = s_q1; t_held = t_q1;
    for (int k = 0; k < 200; k++) begin
      s_d = 4'($urandom); t_d = 4'($urandom);
      #(P/2);
      check(s_q == s_d && t_q == t_d, "dual edge: word after next edge");
      check(s_n_q == ~s_q, "dual edge: S' complement");
      if (clk) begin s_held = s_d; t_held = t_d; end
      check(s_q1 == s_held && t_q1 == t_held, "single edge: word after rising edge only");
      check(s_n_q1 == ~s_q1, "single edge: S' complement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
