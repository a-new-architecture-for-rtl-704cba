// neuron_run: checks one tree neuron of K PNs with PNW-word memories and
// N_IN = K*(PNW-2) inputs (every weight slot used).
//
// Each bus is driven from the bus schedule: in a weight step of PN b at
// local step tau, bus b carries the input of the pattern whose window the
// step belongs to (the current cycle's pattern when tau > depth(PN b), the
// previous cycle's otherwise); all other steps carry random values. The
// neuron must fire once per cycle, at tau = D = ceil(log2 K), with
// net = sum(w*x) + theta*1.0 of the pattern of the cycle before. This holds
// only if the tree wiring, the x/y timing and the weight placement agree.
module neuron_run #(
  parameter int K = 8, PNW = 6, SEED = 1, NCYC = 30
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int N_IN = K * (PNW - 2), WW = 8, XW = 8;
  localparam int ACC_W = WW + XW + 2 + $clog2(N_IN + 2);
  localparam int FULL = 1 << (XW - 1);
  localparam int D = nn_pkg::clog2i(K);
  localparam int AW = (PNW > 1) ? $clog2(PNW) : 1;

  function automatic logic [N_IN*WW-1:0] make_w();
    logic [N_IN*WW-1:0] w;
    for (int j = 0; j < N_IN; j++) w[j*WW +: WW] = WW'(((j + 1) * (SEED * 29 + 11)) % 241 - 120);
    return w;
  endfunction
  localparam logic [N_IN*WW-1:0] W = make_w();
  localparam logic [WW-1:0] THETA = WW'(SEED * 13 - 60);

  logic [AW-1:0] addr;
  logic [XW-1:0] bus [K];
  logic [XW-1:0] y;
  logic fire;
  logic signed [ACC_W-1:0] net;

  neuron #(.N_IN(N_IN), .PNW(PNW), .K(K), .WW(WW), .XW(XW), .ACC_W(ACC_W),
           .PHASE(0), .S(1), .B(0), .W(W), .THETA(THETA)) dut (.*);

  int cur [N_IN];
  int prev [N_IN];
  int net_cur, net_prev;

  initial begin
    int tau, j, fires;
    checks = 0; failures = 0; done = 0;
    addr = '0;
    for (int b = 0; b < K; b++) bus[b] = '0;
    for (int i = 0; i < N_IN; i++) begin cur[i] = 0; prev[i] = 0; end
    net_cur = 0; net_prev = 0;
    wait (!rst);
    @(negedge clk);
    for (int c = 0; c < NCYC; c++) begin
      prev = cur;
      net_prev = net_cur;
      net_cur = $signed(THETA) * FULL;
      for (int i = 0; i < N_IN; i++) begin
        cur[i] = int'($urandom_range(0, 255));
        net_cur += $signed(W[i*WW +: WW]) * cur[i];
      end
      fires = 0;
      for (tau = 0; tau < PNW; tau++) begin
        addr = AW'(tau);
        for (int b = 0; b < K; b++) begin
          j = nn_pkg::bus_input(K, PNW, N_IN, b + 1, tau);
          if (j < 0) bus[b] = XW'($urandom_range(0, 255));
          else if (tau > nn_pkg::depth_of(K, b + 1)) bus[b] = XW'(cur[j]);
          else bus[b] = XW'(prev[j]);
        end
        #1;
        checks++;
        if (fire != (tau == D)) begin
          failures++;
          $display("FAIL K=%0d PNW=%0d cycle %0d tau %0d: fire %b", K, PNW, c, tau, fire);
        end
        // the pattern of cycle c-1 fires in cycle c
        if (fire && c >= 1) begin
          checks++;
          if (int'(net) != net_prev) begin
            failures++;
            $display("FAIL K=%0d PNW=%0d cycle %0d: net %0d expected %0d", K, PNW, c, net, net_prev);
          end
        end
        @(negedge clk);
      end
    end
    done = 1;
  end

endmodule
