// tb_nikolic_saff: self-checking test of the single edge sense-amplifier
// flip-flop. q must take d at rising edges only and hold it across falling
// edges; qb is its complement; reset loads RST_VAL.
module tb_nikolic_saff;
  localparam int unsigned P = 100;
  logic clk = 0, rst_n, d;
  logic q, qb;
  int checks = 0, failures = 0;

  nikolic_saff #(.RST_VAL(1)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .qb(qb));

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
    logic held;
    rst_n = 1; d = 0;
    #1 rst_n = 0;
    #(P/4 - 1);                      // clk low, a quarter period before the rising edge
    check(q == 1'b1 && qb == 1'b0, "reset value");
    rst_n = 1;
    held = q;
    for (int k = 0; k < 200; k++) begin
      d = 1'($urandom);
      #(P/2);                    // quarter period after an edge
      if (clk) held = d;         // a rising edge was crossed
      check(q == held, $sformatf("q after %s edge", clk ? "rising" : "falling"));
      check(qb == !q, "qb complement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
