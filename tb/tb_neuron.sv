// tb_neuron: the 32-input neuron built from a tree of 8 PNs with 6-word
// memories (K = 8, PNW = 6, D = 3).
//
// The stimulus follows the published weight timing of this example,
// written out independently of the design: PN1 multiplies inputs 1-4 at
// steps 1-4, PN2 inputs 5-8 at steps 2-5, PN3 9-13 at 1-5, PN4 14-16 at 3-5,
// PN5 17-21 at 1-5, PN6 22-25 at 2-5, PN7 26-30 at 1-5, PN8 31-32 at 4-5.
// At every other step the buses carry random values, which must be ignored.
// The neuron must fire at step 3 of the following cycle (latency PNW + D
// after the cycle start) with net = sum(w*x) + theta*1.0 and y = NLF(net).
module tb_neuron;
  localparam int N_IN = 32, PNW = 6, K = 8, WW = 8, XW = 8, ACC_W = 22;
  localparam int S = 3, B = 12;
  localparam int FULL = 1 << (XW - 1);
  localparam int FIRST [K] = '{0, 4, 8, 13, 16, 21, 25, 30};   // first input (0-based)
  localparam int TAU0  [K] = '{1, 2, 1, 3, 1, 2, 1, 4};        // step of that input

  function automatic logic [N_IN*WW-1:0] make_w();
    logic [N_IN*WW-1:0] w;
    for (int j = 0; j < N_IN; j++) w[j*WW +: WW] = WW'((j * 37) % 201 - 100);
    return w;
  endfunction
  localparam logic [N_IN*WW-1:0] W = make_w();
  localparam logic [WW-1:0] THETA = -8'sd77;

  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] addr;
  logic [XW-1:0] bus [K];
  logic [XW-1:0] y;
  logic fire;
  logic signed [ACC_W-1:0] net;
  int checks = 0, failures = 0;
  int xs [N_IN];
  int expected_net, prev_net;
  int fired = 0;

  neuron #(.N_IN(N_IN), .PNW(PNW), .K(K), .WW(WW), .XW(XW), .ACC_W(ACC_W),
           .PHASE(0), .S(S), .B(B), .W(W), .THETA(THETA)) dut (.*);

  always #5 clk = ~clk;

  function automatic int nlf_ref(input int v);
    int k;
    k = 0;
    for (int m = 1; m <= S; m++) if (v >= (m - (S + 1) / 2) * (1 << B)) k++;
    return (k == 0) ? 0 : (FULL >> (S - k));
  endfunction

  initial begin
    addr = 0;
    for (int b = 0; b < K; b++) bus[b] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    prev_net = 0;
    for (int c = 0; c < 60; c++) begin
      for (int j = 0; j < N_IN; j++) xs[j] = int'($urandom_range(0, 255));
      expected_net = $signed(THETA) * FULL;
      for (int j = 0; j < N_IN; j++) expected_net += $signed(W[j*WW +: WW]) * xs[j];
      for (int t = 0; t < PNW; t++) begin
        addr = 3'(t);
        for (int b = 0; b < K; b++) begin
          int j;
          j = FIRST[b] + t - TAU0[b];
          if (t >= TAU0[b] && (b == K - 1 ? j < N_IN : j < FIRST[b + 1])) bus[b] = XW'(xs[j]);
          else bus[b] = XW'($urandom_range(0, 255));
        end
        #1;
        checks++;
        if (fire != (t == 3)) begin
          failures++;
          $display("FAIL cycle %0d step %0d: fire %b", c, t, fire);
        end
        if (fire && c > 0) begin
          fired++;
          checks++;
          if (int'(net) != prev_net || int'(y) != nlf_ref(prev_net)) begin
            failures++;
            $display("FAIL cycle %0d: net %0d expected %0d, y %0d", c, net, prev_net, y);
          end
        end
        @(negedge clk);
      end
      prev_net = expected_net;
    end
    checks++;
    if (fired != 59) failures++;
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
