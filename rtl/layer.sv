// layer: one layer of N_OUT tree neurons sharing K input buses.
//
// All neurons of a layer use the same placement of inputs in their PN
// memories, so PN b of every neuron takes its inputs from the same bus b and
// the layer needs only K buses, whatever the number of neurons. The neurons
// differ only in the weights held in their memories. All neurons fire in the
// same step; fire is the common fire strobe.
//
// W holds the weights, element (i, j) of neuron i and input j at bits
// [(i*N_IN + j)*WW +: WW]; THETA holds the negated thresholds, neuron i at
// [i*WW +: WW]. y[i] is neuron i's output, non-zero only while fire is 1.
// The default weights (all 1, stored thresholds -2) are placeholders only.
module layer #(
  parameter int unsigned N_IN  = 6,
  parameter int unsigned N_OUT = 4,
  parameter int unsigned PNW   = 6,
  parameter int unsigned K     = nn_pkg::pn_count(N_IN, PNW),
  parameter int unsigned WW    = 8,
  parameter int unsigned XW    = 8,
  parameter int unsigned ACC_W = 20,
  parameter int unsigned PHASE = 0,
  parameter int unsigned S     = 1,
  parameter int unsigned B     = 0,
  parameter logic [N_OUT*N_IN*WW-1:0] W     = {(N_OUT*N_IN){WW'(1)}},
  parameter logic [N_OUT*WW-1:0]      THETA = {N_OUT{WW'(-2)}},
  localparam int unsigned AW = (PNW > 1) ? $clog2(PNW) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [AW-1:0]           addr,
  input  logic [XW-1:0]           bus [K],
  output logic [XW-1:0]           y [N_OUT],
  output logic                    fire,
  output logic signed [ACC_W-1:0] net [N_OUT]
);

  logic [N_OUT-1:0] fire_n;

  for (genvar i = 0; i < N_OUT; i++) begin : g_neuron
    neuron #(
      .N_IN(N_IN), .PNW(PNW), .K(K), .WW(WW), .XW(XW), .ACC_W(ACC_W),
      .PHASE(PHASE), .S(S), .B(B),
      .W(W[i*N_IN*WW +: N_IN*WW]),
      .THETA(THETA[i*WW +: WW])
    ) u_neuron (
      .clk (clk),
      .rst (rst),
      .addr(addr),
      .bus (bus),
      .y   (y[i]),
      .fire(fire_n[i]),
      .net (net[i])
    );
  end

  assign fire = fire_n[0];

  a_fire_together: assert property (@(posedge clk) disable iff (rst)
                                    fire_n == '0 || fire_n == '1);

endmodule
