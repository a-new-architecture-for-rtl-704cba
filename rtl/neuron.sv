// neuron: tree-structured neuron made of K pseudo-neurons and an NLF.
//
// The K PNs are wired as the in-tree of nn_pkg::succ_of: the output of PN_i
// is the linear input of its successor. PNs without predecessors start the
// weighted sums; every PN forwards its partial sum in its y step, exactly
// when its successor executes the matching x word, and the root PN_K fires
// the complete net input (sum of w*x minus threshold) at local step
// D = ceil(log2 K). The NLF turns it into the neuron output, which is driven
// (three-state modelled as AND) only during the fire step.
//
// The PN memories are filled at elaboration from the weights W, the negated
// threshold THETA and the schedule of nn_pkg::slot_of. Local step
// tau = (addr - PHASE) mod PNW; PHASE lets a layer start its cycle when the
// previous layer fires. The input on bus b at a weight step of PN_b is
// input number nn_pkg::bus_input(K, PNW, N_IN, b, tau).
//
// Latency: a set of inputs whose first weight step is local tau = 1 gives
// the fire step at local tau = D of the next cycle, PNW + D steps after the
// cycle began; one new set of inputs is taken every PNW steps.
//
// Interface: bus[b] is the input bus of PN_(b+1); y/fire are the output;
// net is the root's linear output (for observation), valid while fire is 1.
// The default weights (all 1, stored threshold -2) are placeholders only.
module neuron #(
  parameter int unsigned N_IN  = 6,
  parameter int unsigned PNW   = 6,
  parameter int unsigned K     = nn_pkg::pn_count(N_IN, PNW),
  parameter int unsigned WW    = 8,
  parameter int unsigned XW    = 8,
  parameter int unsigned ACC_W = 20,
  parameter int unsigned PHASE = 0,
  parameter int unsigned S     = 1,
  parameter int unsigned B     = 0,
  parameter logic [N_IN*WW-1:0] W     = {N_IN{WW'(1)}},
  parameter logic [WW-1:0]      THETA = WW'(-2),
  localparam int unsigned AW = (PNW > 1) ? $clog2(PNW) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [AW-1:0]           addr,
  input  logic [XW-1:0]           bus [K],
  output logic [XW-1:0]           y,
  output logic                    fire,
  output logic signed [ACC_W-1:0] net
);

  localparam int unsigned RW = PNW * (WW + 2);

  // Memory contents of PN p (1-based), word a = global address.
  function automatic logic [RW-1:0] build_rom(input int p);
    logic [RW-1:0] r;
    nn_pkg::slot_t s;
    int tau;
    logic [WW-1:0] wv;
    r = '0;
    for (int a = 0; a < PNW; a++) begin
      tau = (a + PNW - (PHASE % PNW)) % PNW;
      s = nn_pkg::slot_of(K, PNW, N_IN, p, tau);
      wv = '0;
      case (s.kind)
        nn_pkg::SLOT_WEIGHT: begin
          if (s.used) wv = W[int'(s.idx)*WW +: WW];
          r[a*(WW+2) +: WW+2] = {wv, 2'b00};
        end
        nn_pkg::SLOT_THETA:  r[a*(WW+2) +: WW+2] = {THETA, 2'b10};
        nn_pkg::SLOT_X:      r[a*(WW+2) +: WW+2] = {wv, 2'b10};
        default:             r[a*(WW+2) +: WW+2] = {wv, 2'b01};
      endcase
    end
    return r;
  endfunction

  // Predecessor masks: bit p*K+q is set for an arc PN_(q+1) -> PN_(p+1).
  function automatic logic [K*K-1:0] build_pred();
    logic [K*K-1:0] m;
    m = '0;
    for (int p = 0; p < K; p++)
      for (int q = 0; q < K; q++)
        if (nn_pkg::succ_of(K, q + 1) == p + 1) m[p*K + q] = 1'b1;
    return m;
  endfunction
  localparam logic [K*K-1:0] PRED = build_pred();

  logic signed [ACC_W-1:0] li [K];
  logic signed [ACC_W-1:0] lo [K];
  logic [K-1:0]            oe;

  for (genvar p = 0; p < K; p++) begin : g_pn
    pn #(
      .PNW(PNW), .WW(WW), .XW(XW), .ACC_W(ACC_W),
      .THETA_LI(p == 0),
      .ROM(build_rom(p + 1))
    ) u_pn (
      .clk (clk),
      .rst (rst),
      .addr(addr),
      .x   (bus[p]),
      .li  (li[p]),
      .lo  (lo[p]),
      .oe  (oe[p])
    );

    // Linear-input line of PN p: OR of the gated outputs of its predecessors.
    always_comb begin
      li[p] = '0;
      for (int q = 0; q < K; q++) if (PRED[p*K + q]) li[p] = li[p] | lo[q];
    end

    // Only one predecessor may drive a linear-input line at a time.
    a_one_driver: assert property (@(posedge clk) disable iff (rst)
                                   $onehot0(oe & PRED[p*K +: K]));
  end

  logic [XW-1:0] act;

  nlf #(.ACC_W(ACC_W), .XW(XW), .S(S), .B(B)) u_nlf (
    .net(lo[K-1]),
    .y  (act)
  );

  assign fire = oe[K-1];
  assign net  = lo[K-1];
  assign y    = fire ? act : '0;

endmodule
