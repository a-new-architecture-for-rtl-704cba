// tb_neuron_sizes: tree neurons of several sizes, each with every weight
// slot in use: K = 1, 3, 5, 6, 7 and 16 PNs (the 16-PN tree has arcs
// 1-2, 3-4, 2-4, 5-6, 7-8, 6-8, 4-8, ..., 8-16), with memories of 4 to 7
// words. K = 5, 6 and 7 include weight steps that fall in the next cycle.
module tb_neuron_sizes;
  logic clk = 1'b0, rst = 1'b1;
  localparam int NR = 6;
  int c [NR], f [NR];
  bit d [NR];
  int checks, failures;

  always #5 clk = ~clk;

  neuron_run #(.K(1),  .PNW(6), .SEED(1)) u0 (.clk(clk), .rst(rst), .checks(c[0]), .failures(f[0]), .done(d[0]));
  neuron_run #(.K(3),  .PNW(5), .SEED(2)) u1 (.clk(clk), .rst(rst), .checks(c[1]), .failures(f[1]), .done(d[1]));
  neuron_run #(.K(5),  .PNW(7), .SEED(3)) u2 (.clk(clk), .rst(rst), .checks(c[2]), .failures(f[2]), .done(d[2]));
  neuron_run #(.K(6),  .PNW(4), .SEED(4)) u3 (.clk(clk), .rst(rst), .checks(c[3]), .failures(f[3]), .done(d[3]));
  neuron_run #(.K(7),  .PNW(6), .SEED(5)) u4 (.clk(clk), .rst(rst), .checks(c[4]), .failures(f[4]), .done(d[4]));
  neuron_run #(.K(16), .PNW(6), .SEED(6)) u5 (.clk(clk), .rst(rst), .checks(c[5]), .failures(f[5]), .done(d[5]));

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    checks = 0; failures = 0;
    for (int i = 0; i < NR; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
