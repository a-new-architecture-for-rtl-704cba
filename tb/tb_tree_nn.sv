// tb_tree_nn: end-to-end test of the network at its default size (6-4-4,
// PNW = 6, 8-bit weights, one-step hidden NLF, three-step output NLF).
//
// A new random input pattern is presented at address 0 of every cycle. A
// reference model computes the two layers with plain integer arithmetic from
// the same weights; every out_valid step is compared with the pattern that
// was presented LAT = (PNW + D1) + (PNW + D2) clocks earlier, and the spacing
// of out_valid is checked against the throughput of one pattern per PNW
// clocks. The test also counts how often the mechanisms of the design were
// exercised (partial-sum forwarding between PNs, the fire steps, the input
// sampling of each bus set, every output level of the NLFs) and counts a
// failure for any that never occurred.
module tb_tree_nn;
  localparam int N0 = 6, N1 = 4, N2 = 4, PNW = 6, WW = 8, XW = 8;
  localparam int S1 = 1, S2 = 3, B1 = 0, B2 = 12;
  localparam int K1 = 2, K2 = 1, D1 = 1, D2 = 0;
  localparam int LAT = (PNW + D1) + (PNW + D2);
  localparam int FULL = 1 << (XW - 1);
  localparam int NPAT = 400;

  logic clk = 1'b0, rst = 1'b1;
  logic [XW-1:0] x_in [N0];
  logic [K1-1:0] synch;
  logic [2:0]    addr;
  logic [XW-1:0] y_out [N2];
  logic          out_valid;

  tree_nn dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int step = 0;
  int npres = 0;
  int pat_c0 [NPAT];
  int pat_x  [NPAT][N0];
  int last_valid = -1;
  int n_forward = 0, n_fire = 0, n_out = 0;
  int n_synch [K1];
  int n_lvl2 [4];
  int n_lvl1 [2];

  function automatic int wgt(input logic [1023:0] v, input int n);
    return int'($signed(v[n*WW +: WW]));
  endfunction

  function automatic int nlf_ref(input int net, input int s, input int b);
    int k;
    k = 0;
    for (int m = 1; m <= s; m++)
      if (net >= (m - (s + 1) / 2) * (1 << b)) k++;
    return (k == 0) ? 0 : (FULL >> (s - k));
  endfunction

  task automatic ref_model(input int n, output int y [N2], output int h [N1]);
    int net;
    for (int i = 0; i < N1; i++) begin
      net = wgt(1024'(nn_pkg::DEFAULT_T1), i) * FULL;
      for (int j = 0; j < N0; j++) net += wgt(1024'(nn_pkg::DEFAULT_W1), i*N0 + j) * pat_x[n][j];
      h[i] = nlf_ref(net, S1, B1);
    end
    for (int i = 0; i < N2; i++) begin
      net = wgt(1024'(nn_pkg::DEFAULT_T2), i) * FULL;
      for (int j = 0; j < N1; j++) net += wgt(1024'(nn_pkg::DEFAULT_W2), i*N1 + j) * h[j];
      y[i] = nlf_ref(net, S2, B2);
    end
  endtask

  initial for (int j = 0; j < N0; j++) x_in[j] = '0;
  initial begin
    for (int b = 0; b < K1; b++) n_synch[b] = 0;
    for (int l = 0; l < 4; l++) n_lvl2[l] = 0;
    n_lvl1[0] = 0; n_lvl1[1] = 0;
  end

  // Stimulus: a new pattern for every cycle, starting at address 0.
  always @(posedge clk) begin
    step <= step + 1;
    if (!rst && addr == 3'(PNW - 1) && npres < NPAT) begin
      pat_c0[npres] = step + 1;
      for (int j = 0; j < N0; j++) begin
        pat_x[npres][j] = int'($urandom_range(0, 255));
        x_in[j] <= XW'(pat_x[npres][j]);
      end
      npres <= npres + 1;
    end
  end

  // Checking
  always @(posedge clk) if (!rst) begin
    int ye [N2];
    int he [N1];
    int found;
    for (int b = 0; b < K1; b++) if (synch[b]) n_synch[b]++;
    if (dut.u_hidden.g_neuron[0].u_neuron.oe[0]) n_forward++;
    if (dut.u_hidden.fire) begin
      n_fire++;
      for (int i = 0; i < N1; i++) begin
        if (dut.y1[i] == 0) n_lvl1[0]++;
        else n_lvl1[1]++;
      end
    end
    if (out_valid) begin
      if (last_valid >= 0) begin
        checks++;
        if (step - last_valid != PNW) begin
          failures++;
          $display("FAIL throughput: out_valid spacing %0d", step - last_valid);
        end
      end
      last_valid = step;
      found = -1;
      for (int n = 0; n < npres; n++) if (pat_c0[n] + LAT == step) found = n;
      if (found >= 0) begin
        n_out++;
        ref_model(found, ye, he);
        for (int i = 0; i < N2; i++) begin
          checks++;
          if (int'(y_out[i]) != ye[i]) begin
            failures++;
            $display("FAIL pattern %0d output %0d: got %0d expected %0d", found, i, y_out[i], ye[i]);
          end
          for (int l = 0; l < 4; l++) if (ye[i] == ((l == 0) ? 0 : (FULL >> (3 - l)))) n_lvl2[l]++;
        end
      end else if (npres > 0 && step > pat_c0[0] + LAT) begin
        failures++;
        $display("FAIL out_valid at step %0d matches no pattern", step);
      end
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-28s : %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (n_out >= NPAT - 3);
    @(posedge clk);
    // latency: the first result appears exactly LAT clocks after its pattern
    need("results compared", n_out);
    need("partial-sum forward (y/x)", n_forward);
    need("layer fire", n_fire);
    for (int b = 0; b < K1; b++) need($sformatf("input sampling bus %0d", b), n_synch[b]);
    need("hidden level 0", n_lvl1[0]);
    need("hidden level 1.0", n_lvl1[1]);
    for (int l = 0; l < 4; l++) need($sformatf("output level %0d", l), n_lvl2[l]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPAT * PNW + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
