// tree_nn: feed-forward neural network of tree-structured neurons.
//
// A hidden layer of N1 neurons and an output layer of N2 neurons compute
// y = NLF2(W2 * NLF1(W1 * x - T1) - T2) for N0 inputs, one input pattern every
// PNW clocks. Every neuron is a tree of pseudo-neurons (PNs), each with its
// own small weight memory; a single address counter, broadcast to all PN
// memories, is the only global control. The memory words themselves say when
// a PN adds a product, adds a partial sum from another PN, or forwards its sum,
// so no other control signal is distributed.
//
// Data path:  x_in -> input_interface -> K1 buses -> hidden layer (N1 neurons)
//             -> delay_cells -> K2 buses -> output layer (N2 neurons) -> y_out
//
// The default configuration is the 6-4-4 test-case network: 8-bit weights,
// a one-step NLF in the hidden layer and a three-step NLF in the output
// layer, PNW = 6 words per PN memory, giving K1 = 2 PNs per hidden neuron and
// K2 = 1 PN per output neuron. The weights are example values
// (nn_pkg::DEFAULT_*); a trained network is loaded by overriding W1/T1/W2/T2
// (the thresholds are stored negated, see pn).
//
// Timing: addr counts 0..PNW-1. Pattern inputs are sampled per bus set while
// synch[b] is high (every set is sampled within the first D1+1 steps of a
// cycle). A pattern presented from address 0 of cycle f appears on y_out with
// out_valid = 1 at address (D1 + D2) mod PNW of cycle f+2, i.e. after
// (PNW + D1) + (PNW + D2) clocks with D = ceil(log2 K). y_out is 0 outside
// the out_valid step. Reset is synchronous and active high.
module tree_nn #(
  parameter int unsigned N0  = 6,
  parameter int unsigned N1  = 4,
  parameter int unsigned N2  = 4,
  parameter int unsigned PNW = 6,
  parameter int unsigned WW  = 8,
  parameter int unsigned XW  = 8,
  parameter int unsigned S1  = 1,
  parameter int unsigned S2  = 3,
  parameter int unsigned B1  = 0,
  parameter int unsigned B2  = 12,
  parameter logic [N1*N0*WW-1:0] W1 = nn_pkg::DEFAULT_W1,
  parameter logic [N1*WW-1:0]    T1 = nn_pkg::DEFAULT_T1,
  parameter logic [N2*N1*WW-1:0] W2 = nn_pkg::DEFAULT_W2,
  parameter logic [N2*WW-1:0]    T2 = nn_pkg::DEFAULT_T2,
  localparam int unsigned K1 = nn_pkg::pn_count(N0, PNW),
  localparam int unsigned K2 = nn_pkg::pn_count(N1, PNW),
  localparam int unsigned AW = (PNW > 1) ? $clog2(PNW) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [XW-1:0] x_in  [N0],
  output logic [K1-1:0] synch,
  output logic [AW-1:0] addr,
  output logic [XW-1:0] y_out [N2],
  output logic          out_valid
);

  localparam int unsigned D1     = nn_pkg::clog2i(K1);
  localparam int unsigned PHASE2 = D1 % PNW;
  // Accumulator: product (WW+XW+1 bits) plus growth for N inputs and threshold.
  localparam int unsigned ACC1   = WW + XW + 1 + nn_pkg::clog2i(N0 + 2);
  localparam int unsigned ACC2   = WW + XW + 1 + nn_pkg::clog2i(N1 + 2);

  // Memory size needed by the most loaded PN (the root) of a tree.
  if (PNW < nn_pkg::pred_count(K1, K1) + 1 || PNW < nn_pkg::pred_count(K2, K2) + 1 || PNW < 3)
  begin : g_size_check
    $error("PNW too small for the tree: PNW >= ceil(log2 K) + 1 is required");
  end

  logic [PNW-1:0] dec;

  address_gen #(.PNW(PNW)) u_addr (
    .clk (clk),
    .rst (rst),
    .addr(addr),
    .dec (dec)
  );

  // Hidden layer
  logic [XW-1:0] bus1 [K1];
  logic [XW-1:0] y1 [N1];
  logic          fire1;
  logic signed [ACC1-1:0] net1 [N1];

  input_interface #(
    .N_IN(N0), .PNW(PNW), .K(K1), .XW(XW), .PHASE(0), .USE_HELD(1'b0)
  ) u_in (
    .clk     (clk),
    .rst     (rst),
    .addr    (addr),
    .src_now (x_in),
    .src_held(x_in),
    .bus     (bus1),
    .synch   (synch)
  );

  layer #(
    .N_IN(N0), .N_OUT(N1), .PNW(PNW), .K(K1), .WW(WW), .XW(XW), .ACC_W(ACC1),
    .PHASE(0), .S(S1), .B(B1), .W(W1), .THETA(T1)
  ) u_hidden (
    .clk (clk),
    .rst (rst),
    .addr(addr),
    .bus (bus1),
    .y   (y1),
    .fire(fire1),
    .net (net1)
  );

  // Output layer
  logic [XW-1:0] bus2 [K2];
  logic [K2-1:0] synch2;
  logic signed [ACC2-1:0] net2 [N2];

  delay_cells #(
    .N_IN(N1), .PNW(PNW), .K(K2), .XW(XW), .PHASE(PHASE2)
  ) u_delay (
    .clk      (clk),
    .rst      (rst),
    .addr     (addr),
    .y_prev   (y1),
    .fire_prev(fire1),
    .bus      (bus2),
    .synch    (synch2)
  );

  layer #(
    .N_IN(N1), .N_OUT(N2), .PNW(PNW), .K(K2), .WW(WW), .XW(XW), .ACC_W(ACC2),
    .PHASE(PHASE2), .S(S2), .B(B2), .W(W2), .THETA(T2)
  ) u_output (
    .clk (clk),
    .rst (rst),
    .addr(addr),
    .bus (bus2),
    .y   (y_out),
    .fire(out_valid),
    .net (net2)
  );

endmodule
