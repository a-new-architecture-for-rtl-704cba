// nn_run: reusable end-to-end check of tree_nn at a chosen size.
//
// Instantiates tree_nn with the given layer sizes, memory size and NLF
// settings, with pseudo-random weights and thresholds (a linear congruential
// sequence seeded by SEED, scaled to +/-WMAX). It presents NPAT random input
// patterns, one per cycle starting at address 0, and compares every
// out_valid step with an integer reference model of the two layers computed
// for the pattern presented LAT = (PNW + D1) + (PNW + D2) clocks earlier.
// It also checks the out_valid spacing (one result per PNW clocks) and
// counts the NLF levels seen. done rises when all patterns are checked.
module nn_run #(
  parameter int N0 = 25, N1 = 20, N2 = 1, PNW = 7, WW = 12, XW = 8,
  parameter int S1 = 9, S2 = 1, B1 = 17, B2 = 0,
  parameter int WMAX = 1000, SEED = 1, NPAT = 60
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   levels_hidden,
  output int   results,
  output bit   done
);
  localparam int K1 = nn_pkg::pn_count(N0, PNW), K2 = nn_pkg::pn_count(N1, PNW);
  localparam int D1 = nn_pkg::clog2i(K1), D2 = nn_pkg::clog2i(K2);
  localparam int LAT = (PNW + D1) + (PNW + D2);
  localparam int FULL = 1 << (XW - 1);
  localparam int AW = $clog2(PNW);

  function automatic int lcg(input int n);
    int unsigned v;
    v = 32'(SEED) * 32'd2654435761 + 32'(n) * 32'd1103515245 + 32'd12345;
    v = v ^ (v >> 13);
    v = v * 32'd2246822519;
    v = v ^ (v >> 16);
    return int'(v % (2 * WMAX + 1)) - WMAX;
  endfunction
  function automatic logic [N1*N0*WW-1:0] gen_w1();
    logic [N1*N0*WW-1:0] w;
    for (int n = 0; n < N1*N0; n++) w[n*WW +: WW] = WW'(lcg(n));
    return w;
  endfunction
  function automatic logic [N1*WW-1:0] gen_t1();
    logic [N1*WW-1:0] w;
    for (int n = 0; n < N1; n++) w[n*WW +: WW] = WW'(lcg(5000 + n));
    return w;
  endfunction
  function automatic logic [N2*N1*WW-1:0] gen_w2();
    logic [N2*N1*WW-1:0] w;
    for (int n = 0; n < N2*N1; n++) w[n*WW +: WW] = WW'(lcg(10000 + n));
    return w;
  endfunction
  function automatic logic [N2*WW-1:0] gen_t2();
    logic [N2*WW-1:0] w;
    for (int n = 0; n < N2; n++) w[n*WW +: WW] = WW'(lcg(15000 + n) / 8);
    return w;
  endfunction

  logic [XW-1:0] x_in [N0];
  logic [K1-1:0] synch;
  logic [AW-1:0] addr;
  logic [XW-1:0] y_out [N2];
  logic          out_valid;

  tree_nn #(
    .N0(N0), .N1(N1), .N2(N2), .PNW(PNW), .WW(WW), .XW(XW),
    .S1(S1), .S2(S2), .B1(B1), .B2(B2),
    .W1(gen_w1()), .T1(gen_t1()), .W2(gen_w2()), .T2(gen_t2())
  ) dut (.*);

  function automatic int nlf_ref(input longint net, input int s, input int b);
    int k;
    k = 0;
    for (int m = 1; m <= s; m++)
      if (net >= longint'(m - (s + 1) / 2) * (longint'(1) << b)) k++;
    return k;
  endfunction

  int step = 0, npres = 0, last_valid = -1;
  int pat_c0 [NPAT];
  int pat_x  [NPAT][N0];
  bit lvl_seen [S1+1];

  initial begin
    checks = 0; failures = 0; results = 0; done = 0; levels_hidden = 0;
    for (int j = 0; j < N0; j++) x_in[j] = '0;
    for (int l = 0; l <= S1; l++) lvl_seen[l] = 0;
  end

  always @(posedge clk) begin
    step <= step + 1;
    if (!rst && addr == AW'(PNW - 1) && npres < NPAT) begin
      pat_c0[npres] = step + 1;
      for (int j = 0; j < N0; j++) begin
        pat_x[npres][j] = int'($urandom_range(0, 255));
        x_in[j] <= XW'(pat_x[npres][j]);
      end
      npres <= npres + 1;
    end
  end

  always @(posedge clk) if (!rst && !done) begin
    int found, hk, ye;
    int h [N1];
    longint net;
    if (out_valid) begin
      if (last_valid >= 0) begin
        checks++;
        if (step - last_valid != PNW) failures++;
      end
      last_valid = step;
      found = -1;
      for (int n = 0; n < npres; n++) if (pat_c0[n] + LAT == step) found = n;
      if (found >= 0) begin
        for (int i = 0; i < N1; i++) begin
          net = longint'($signed(WW'(gen_t1() >> (i*WW)))) * FULL;
          for (int j = 0; j < N0; j++)
            net += longint'($signed(WW'(gen_w1() >> ((i*N0 + j)*WW)))) * pat_x[found][j];
          hk = nlf_ref(net, S1, B1);
          lvl_seen[hk] = 1;
          h[i] = (hk == 0) ? 0 : (FULL >> (S1 - hk));
        end
        for (int i = 0; i < N2; i++) begin
          net = longint'($signed(WW'(gen_t2() >> (i*WW)))) * FULL;
          for (int j = 0; j < N1; j++)
            net += longint'($signed(WW'(gen_w2() >> ((i*N1 + j)*WW)))) * h[j];
          hk = nlf_ref(net, S2, B2);
          ye = (hk == 0) ? 0 : (FULL >> (S2 - hk));
          checks++;
          if (int'(y_out[i]) != ye) begin
            failures++;
            $display("FAIL N0=%0d PNW=%0d pattern %0d output %0d: got %0d expected %0d",
                     N0, PNW, found, i, y_out[i], ye);
          end
        end
        results++;
        if (results == NPAT) begin
          levels_hidden = 0;
          for (int l = 0; l <= S1; l++) levels_hidden += int'(lvl_seen[l]);
          done = 1;
        end
      end else if (npres > 0 && step > pat_c0[0] + LAT) begin
        failures++;
        $display("FAIL N0=%0d PNW=%0d: out_valid at step %0d matches no pattern", N0, PNW, step);
      end
    end
  end
endmodule
