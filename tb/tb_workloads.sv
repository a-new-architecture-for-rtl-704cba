// tb_workloads: runs the 25-20-1 network (8-bit inputs, 12-bit weights,
// nine-step hidden NLF, one-step output NLF) in its two implementations:
// 11-word PN memories (3 PNs per hidden and per output neuron) and 7-word
// PN memories (5 PNs per hidden neuron, 4 per output neuron). Each run
// checks every result against a reference model, the latency
// (PNW + D1) + (PNW + D2) and the throughput of one result per PNW clocks,
// and requires that the hidden layer produced at least four different
// NLF levels.
module tb_workloads;
  logic clk = 1'b0, rst = 1'b1;
  int c1, f1, l1, r1, c2, f2, l2, r2;
  bit d1, d2;
  int checks, failures;

  always #5 clk = ~clk;

  nn_run #(.N0(25), .N1(20), .N2(1), .PNW(11), .WW(12), .S1(9), .S2(1), .B1(17), .SEED(3), .NPAT(60))
    u_nn1 (.clk(clk), .rst(rst), .checks(c1), .failures(f1), .levels_hidden(l1), .results(r1), .done(d1));
  nn_run #(.N0(25), .N1(20), .N2(1), .PNW(7), .WW(12), .S1(9), .S2(1), .B1(17), .SEED(5), .NPAT(60))
    u_nn2 (.clk(clk), .rst(rst), .checks(c2), .failures(f2), .levels_hidden(l2), .results(r2), .done(d2));

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (d1 && d2);
    checks = c1 + c2 + 2;
    failures = f1 + f2 + ((l1 < 4) ? 1 : 0) + ((l2 < 4) ? 1 : 0);
    $display("PNW=11: %0d results, %0d hidden levels; PNW=7: %0d results, %0d hidden levels", r1, l1, r2, l2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end
endmodule
