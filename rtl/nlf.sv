// nlf: stepwise approximation of the sigmoid with power-of-two levels.
//
// S steps divide the net input axis into S+1 intervals; the breakpoints are
// spaced 2^B apart and centred on zero: step k (k = 1..S) is passed when
// net >= (k - (S+1)/2) * 2^B. The level index is therefore
//   k = clamp(floor(net / 2^B) + (S+1)/2, 0, S)
// which costs only a shift, an add and a clamp. The output levels are powers
// of two, level 0 = 0 and level k = 1.0 / 2^(S-k), with 1.0 = 2^(XW-1). With
// S = 1 this is a hard threshold at zero (output 0 or 1.0). The number of
// steps per layer follows the networks described (one step in the hidden and
// three in the output layer of the test chip); the placement of the
// breakpoints and the level values are this design's reading of a
// "power-of-two stepwise" sigmoid. S should be odd.
//
// Timing: combinational.
module nlf #(
  parameter int unsigned ACC_W = 20,
  parameter int unsigned XW    = 8,
  parameter int unsigned S     = 1,
  parameter int unsigned B     = 0
) (
  input  logic signed [ACC_W-1:0] net,
  output logic [XW-1:0]           y
);

  localparam int unsigned IW = ACC_W + 2;

  logic signed [ACC_W-1:0] scaled;
  logic signed [IW-1:0]    k;
  logic [XW-1:0]           full;

  assign scaled = net >>> B;
  assign k      = IW'(scaled) + IW'((S + 1) / 2);
  assign full   = XW'(1) << (XW - 1);

  always_comb begin
    if (k <= 0)                 y = '0;
    else if (k >= IW'(S))       y = full;
    else                        y = full >> (IW'(S) - k);
  end

endmodule
