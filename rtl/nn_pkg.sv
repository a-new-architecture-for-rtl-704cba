// nn_pkg: types, default constants and the schedule functions shared by the
// tree-structured neural network.
//
// A neuron with K pseudo-neurons (PNs) is an in-tree. The arcs follow the
// adjacency rule of the tree structure: for t = 1..ceil(log2 K) and
// s = 0..max(floor(K/2^t)-1, 0) there is an arc PN_i -> PN_j with
// i = 2^t*s + 2^(t-1) and j = min(2^t*s + 2^t, K). The depth of a PN is the
// length of its longest path from a PN with no predecessors; the root PN_K
// has depth D = ceil(log2 K).
//
// Every PN reads one memory word per clock step. Over one computational cycle
// of PNW steps (local time tau = 0..PNW-1) a PN at depth d holds:
//   tau == d                   : y word (forward partial sum), or fire for PN_K
//   tau == depth of a pred     : x word (add the linear input of that pred)
//   tau == PNW-1, PN_1 only    : threshold word
//   all other steps            : synaptic weight words
// The weight words of a PN belong to the window tau = d+1 .. PNW-1, 0 .. d-1
// that ends at its y/fire step; network inputs are numbered over the PNs in
// order PN_1..PN_K and, inside a PN, in window order. This reproduces the
// weight placement of the 8-PN example of the tree structure (weights 1-4 in
// PN_1, 5-8 in PN_2, 14-16 in PN_4, 31-32 in PN_8). The numbering inside a
// layer is the same for all its neurons, so PN b of every neuron reads the
// same input bus b.
//
// The rule leaves some PNs without a successor for a few K (e.g. K = 7);
// this design then connects such a PN to the root (its own choice).
package nn_pkg;

  localparam int MAX_K = 64;

  // Memory word: weight block, then the two synchronisation bits.
  // sel = 1 selects the linear input (x word), oe = 1 drives the output (y, fire).
  typedef struct packed {
    logic sel;
    logic oe;
  } pn_ctl_t;

  typedef enum logic [2:0] {
    SLOT_WEIGHT = 3'd0,
    SLOT_THETA  = 3'd1,
    SLOT_X      = 3'd2,
    SLOT_Y      = 3'd3,
    SLOT_FIRE   = 3'd4
  } slot_kind_e;

  typedef struct packed {
    slot_kind_e kind;
    logic [15:0] idx;    // input number for SLOT_WEIGHT
    logic        used;   // SLOT_WEIGHT with idx < number of inputs
  } slot_t;

  // Default parameters of the 6-4-4 test-case network. The weights are example
  // values (signed 8 bit); element n sits at bits [8*n +: 8], n = neuron*N_IN + input.
  localparam logic [191:0] DEFAULT_W1 = 192'h36b51233bde3b71115bcafdc27b43b03be2fb8b24c0bccf8;
  localparam logic [31:0]  DEFAULT_T1 = 32'h1414e0d3;
  localparam logic [127:0] DEFAULT_W2 = 128'ha612acf3d2aa631693c094ed1d1b971d;
  localparam logic [31:0]  DEFAULT_T2 = 32'h2c0beb0d;

  function automatic int clog2i(input int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Number of PNs for a neuron with n_in inputs: ceil(n_in / (pnw - 2)).
  function automatic int pn_count(input int n_in, input int pnw);
    return (n_in + pnw - 3) / (pnw - 2);
  endfunction

  // Successor of PN i (1-based) in a tree of k PNs; 0 for the root.
  function automatic int succ_of(input int k, input int i);
    int res, smax, ii, jj;
    res = 0;
    for (int t = 1; t <= clog2i(k); t++) begin
      smax = (k >> t) - 1;
      if (smax < 0) smax = 0;
      for (int s = 0; s <= smax; s++) begin
        ii = (s << t) + (1 << (t - 1));
        jj = (s << t) + (1 << t);
        if (jj > k) jj = k;
        if (ii == i && jj != i) res = jj;
      end
    end
    if (res == 0 && i != k) res = k;
    return res;
  endfunction

  // Depth (longest path from a leaf) of PN i.
  function automatic int depth_of(input int k, input int i);
    int d [MAX_K+1];
    for (int p = 1; p <= k; p++) begin
      d[p] = 0;
      for (int q = 1; q < p; q++)
        if (succ_of(k, q) == p && d[q] + 1 > d[p]) d[p] = d[q] + 1;
    end
    return d[i];
  endfunction

  function automatic int pred_count(input int k, input int i);
    int n;
    n = 0;
    for (int q = 1; q <= k; q++) if (succ_of(k, q) == i) n++;
    return n;
  endfunction

  // Weight words held by PN i.
  function automatic int weight_count(input int k, input int pnw, input int i);
    return pnw - 1 - pred_count(k, i) - ((i == 1) ? 1 : 0);
  endfunction

  // Kind of the word of PN p at local step tau, ignoring weight numbering.
  function automatic slot_kind_e kind_of(input int k, input int pnw, input int p, input int tau);
    slot_kind_e r;
    r = SLOT_WEIGHT;
    if (p == 1 && tau == pnw - 1) r = SLOT_THETA;
    for (int q = 1; q <= k; q++)
      if (succ_of(k, q) == p && depth_of(k, q) == tau) r = SLOT_X;
    if (tau == depth_of(k, p)) r = (p == k) ? SLOT_FIRE : SLOT_Y;
    return r;
  endfunction

  // Full slot of PN p at local step tau for a neuron with n_in inputs.
  function automatic slot_t slot_of(input int k, input int pnw, input int n_in,
                                    input int p, input int tau);
    slot_t r;
    int base, ord, d, t;
    r.kind = kind_of(k, pnw, p, tau);
    r.idx  = '0;
    r.used = 1'b0;
    if (r.kind == SLOT_WEIGHT) begin
      base = 0;
      for (int q = 1; q < p; q++) base += weight_count(k, pnw, q);
      d = depth_of(k, p);
      ord = 0;
      for (int s = 1; s < pnw; s++) begin
        t = (d + s) % pnw;
        if (t == tau) break;
        if (kind_of(k, pnw, p, t) == SLOT_WEIGHT) ord++;
      end
      r.idx  = 16'(base + ord);
      r.used = (base + ord) < n_in;
    end
    return r;
  endfunction

  // Input number carried by bus b (1-based PN position) at local step tau, or -1.
  function automatic int bus_input(input int k, input int pnw, input int n_in,
                                   input int b, input int tau);
    slot_t s;
    s = slot_of(k, pnw, n_in, b, tau);
    return s.used ? int'(s.idx) : -1;
  endfunction

  // True when input j travels on bus b.
  function automatic bit on_bus(input int k, input int pnw, input int n_in,
                                input int b, input int j);
    bit r;
    r = 1'b0;
    for (int t = 0; t < pnw; t++) if (bus_input(k, pnw, n_in, b, t) == j) r = 1'b1;
    return r;
  endfunction

endpackage
