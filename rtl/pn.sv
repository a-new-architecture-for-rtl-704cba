// pn: pseudo-neuron (PN), the building block of a tree neuron.
//
// Each step the PN reads the word its local memory holds at the broadcast
// address and does one of three things:
//   weight word (sel=0, oe=0): acc += weight * x       (synaptic product)
//   x word      (sel=1, oe=0): acc += li               (linear input)
//   y/fire word (oe=1)       : drive acc on lo, then clear acc
// This is the multiplier, product/LI multiplexer, adder and accumulator of
// the PN datapath, with the output buffer enabled by the memory word.
// The three-state output is modelled as an AND gate: lo is acc while oe is 1
// and zero otherwise, so several PN outputs that feed one linear-input line
// are combined by OR (the neuron checks that at most one drives at a time).
// Clearing the accumulator at the end of the output step is the role of the
// 'clear' path from the output-enable bit; doing it on the same clock edge is
// this design's choice.
//
// The first PN of a neuron also holds the threshold: its threshold word is an
// x word, and with THETA_LI set the PN feeds its own weight field, scaled by
// the input value 1.0 (2^(XW-1)), into its linear input in place of a
// predecessor. The stored value is therefore the negated threshold.
//
// Numbers: weight signed WW bits, x unsigned XW bits (1.0 = 2^(XW-1)),
// acc / li / lo signed ACC_W bits. Reset clears acc (synchronous, active high).
// Timing: lo and oe are valid during the output step, from the register acc.
// The default memory (y word at address 0, weight 1 elsewhere) sums x over
// each cycle; a neuron always supplies its own table.
module pn #(
  parameter int unsigned PNW   = 6,
  parameter int unsigned WW    = 8,
  parameter int unsigned XW    = 8,
  parameter int unsigned ACC_W = 20,
  parameter bit          THETA_LI = 1'b0,
  parameter logic [PNW*(WW+2)-1:0] ROM = {{(PNW-1){{WW'(1), 2'b00}}}, {WW'(0), 2'b01}},
  localparam int unsigned AW = (PNW > 1) ? $clog2(PNW) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [AW-1:0]           addr,
  input  logic [XW-1:0]           x,
  input  logic signed [ACC_W-1:0] li,
  output logic signed [ACC_W-1:0] lo,
  output logic                    oe
);

  logic signed [WW-1:0]    weight;
  nn_pkg::pn_ctl_t         ctl;
  logic signed [WW+XW:0]   product;
  logic signed [ACC_W-1:0] li_eff;
  logic signed [ACC_W-1:0] addend;
  logic signed [ACC_W-1:0] acc;

  pn_memory #(.PNW(PNW), .WW(WW), .ROM(ROM)) u_mem (
    .addr  (addr),
    .weight(weight),
    .ctl   (ctl)
  );

  assign product = weight * $signed({1'b0, x});
  assign li_eff  = THETA_LI ? (ACC_W'(weight) <<< (XW - 1)) : li;
  assign addend  = ctl.sel ? li_eff : ACC_W'(product);

  always_ff @(posedge clk) begin
    if (rst || ctl.oe) acc <= '0;
    else               acc <= acc + addend;
  end

  assign oe = ctl.oe;
  assign lo = ctl.oe ? acc : '0;

endmodule
