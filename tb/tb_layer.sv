// tb_layer: a hidden layer of three 6-input neurons with 2 PNs each
// (PNW = 6). By the tree timing, bus 0 carries inputs 1-4 at steps 1-4 and
// bus 1 inputs 5-6 at steps 2-3 (written out here by hand); other steps
// carry random values. All neurons must fire together at step 1 of the
// next cycle with y = NLF(sum(w*x) + theta*1.0) of their own weights.
module tb_layer;
  localparam int N_IN = 6, N_OUT = 3, PNW = 6, K = 2, WW = 8, XW = 8, ACC_W = 20;
  localparam int S = 3, B = 11;
  localparam int FULL = 1 << (XW - 1);

  function automatic logic [N_OUT*N_IN*WW-1:0] make_w();
    logic [N_OUT*N_IN*WW-1:0] w;
    for (int n = 0; n < N_OUT*N_IN; n++) w[n*WW +: WW] = WW'((n * 53) % 181 - 90);
    return w;
  endfunction
  localparam logic [N_OUT*N_IN*WW-1:0] W = make_w();
  localparam logic [N_OUT*WW-1:0] THETA = {8'sd40, -8'sd100, 8'sd5};

  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] addr;
  logic [XW-1:0] bus [K];
  logic [XW-1:0] y [N_OUT];
  logic fire;
  logic signed [ACC_W-1:0] net [N_OUT];
  int checks = 0, failures = 0;
  int xs [N_IN];
  int exp_y [N_OUT], prev_y [N_OUT];
  int seen [4];

  layer #(.N_IN(N_IN), .N_OUT(N_OUT), .PNW(PNW), .K(K), .WW(WW), .XW(XW), .ACC_W(ACC_W),
          .PHASE(0), .S(S), .B(B), .W(W), .THETA(THETA)) dut (.*);

  always #5 clk = ~clk;

  function automatic int nlf_ref(input int v);
    int k;
    k = 0;
    for (int m = 1; m <= S; m++) if (v >= (m - (S + 1) / 2) * (1 << B)) k++;
    return k;
  endfunction

  initial begin
    int v;
    addr = 0;
    bus[0] = 0; bus[1] = 0;
    for (int l = 0; l < 4; l++) seen[l] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 200; c++) begin
      for (int j = 0; j < N_IN; j++) xs[j] = int'($urandom_range(0, 255));
      for (int i = 0; i < N_OUT; i++) begin
        v = $signed(THETA[i*WW +: WW]) * FULL;
        for (int j = 0; j < N_IN; j++) v += $signed(W[(i*N_IN + j)*WW +: WW]) * xs[j];
        exp_y[i] = nlf_ref(v);
      end
      for (int t = 0; t < PNW; t++) begin
        addr = 3'(t);
        bus[0] = (t >= 1 && t <= 4) ? XW'(xs[t - 1]) : XW'($urandom_range(0, 255));
        bus[1] = (t >= 2 && t <= 3) ? XW'(xs[t + 2]) : XW'($urandom_range(0, 255));
        #1;
        checks++;
        if (fire != (t == 1)) begin
          failures++;
          $display("FAIL step %0d fire %b", t, fire);
        end
        if (fire && c > 0) begin
          for (int i = 0; i < N_OUT; i++) begin
            checks++;
            seen[prev_y[i]]++;
            if (int'(y[i]) != ((prev_y[i] == 0) ? 0 : FULL >> (S - prev_y[i]))) begin
              failures++;
              $display("FAIL cycle %0d neuron %0d: y %0d level %0d", c, i, y[i], prev_y[i]);
            end
          end
        end
        if (!fire) for (int i = 0; i < N_OUT; i++) begin
          checks++;
          if (y[i] != 0) failures++;
        end
        @(negedge clk);
      end
      prev_y = exp_y;
    end
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (seen[l] == 0) begin
        failures++;
        $display("FAIL output level %0d never produced", l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
