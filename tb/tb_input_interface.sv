// tb_input_interface: six inputs on two buses (PNW = 6, K = 2).
//
// Set 0 (inputs 1-4) must be sampled while synch[0] is high (step 0) and
// appear on bus 0 at steps 1-4; set 1 (inputs 5-6) is sampled while
// synch[1] is high (step 1) and appears on bus 1 at steps 2-3. Both buses
// are 0 at every other step. The source changes to random values outside
// the sampling steps, which must not reach the buses.
module tb_input_interface;
  localparam int N_IN = 6, PNW = 6, K = 2, XW = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] addr;
  logic [XW-1:0] src_now [N_IN];
  logic [XW-1:0] bus [K];
  logic [K-1:0] synch;
  int checks = 0, failures = 0;
  int xs [N_IN];
  int e0, e1;

  input_interface #(.N_IN(N_IN), .PNW(PNW), .K(K), .XW(XW), .PHASE(0), .USE_HELD(1'b0)) dut (
    .clk(clk), .rst(rst), .addr(addr), .src_now(src_now), .src_held(src_now),
    .bus(bus), .synch(synch));

  always #5 clk = ~clk;

  initial begin
    addr = 0;
    for (int j = 0; j < N_IN; j++) src_now[j] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 100; c++) begin
      for (int j = 0; j < N_IN; j++) xs[j] = int'($urandom_range(0, 255));
      for (int t = 0; t < PNW; t++) begin
        addr = 3'(t);
        for (int j = 0; j < N_IN; j++) begin
          if ((t == 0 && j < 4) || (t == 1 && j >= 4)) src_now[j] = XW'(xs[j]);
          else src_now[j] = XW'($urandom_range(0, 255));
        end
        #1;
        checks++;
        if (synch != {t == 1, t == 0}) begin
          failures++;
          $display("FAIL step %0d synch %b", t, synch);
        end
        e0 = (t >= 1 && t <= 4) ? xs[t - 1] : 0;
        e1 = (t >= 2 && t <= 3) ? xs[t + 2] : 0;
        checks++;
        if (int'(bus[0]) != e0 || int'(bus[1]) != e1) begin
          failures++;
          $display("FAIL cycle %0d step %0d: bus %0d %0d expected %0d %0d", c, t, bus[0], bus[1], e0, e1);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
