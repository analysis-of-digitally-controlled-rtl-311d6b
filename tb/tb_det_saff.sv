// tb_det_saff: self-checking test of the dual edge triggered flip-flop.
// Random data changes a quarter period away from the clock edges; after
// every rising and every falling edge q must equal the d sampled at that
// edge and qb its complement. Also checks the asynchronous reset value.
module tb_det_saff;
  localparam int unsigned P = 100;  // clock period
  logic clk = 0, rst_n, d;
  logic q, qb, q1, qb1;
  int checks = 0, failures = 0;

  det_saff              dut  (.clk(clk), .rst_n(rst_n), .d(d), .q(q),  .qb(qb));
  det_saff #(.RST_VAL(1)) dut1 (.clk(clk), .rst_n(rst_n), .d(d), .q(q1), .qb(qb1));

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
    logic sampled;
    rst_n = 1; d = 1;
    #1 rst_n = 0;
    #(P + P/4 - 1);
    check(q == 1'b0 && qb == 1'b1, "reset value 0");
    check(q1 == 1'b1 && qb1 == 1'b0, "reset value 1");
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      // we are a quarter period after an edge: change d, then cross an edge
      d = 1'($urandom);
      sampled = d;
      #(P/2);  // now a quarter period after the next edge
      check(q == sampled && q1 == sampled, $sformatf("q after %s edge", clk ? "rising" : "falling"));
      check(qb == !q && qb1 == !q1, "qb complement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
