// pn_memory: local memory of one pseudo-neuron.
//
// PNW words, read combinationally by the broadcast network address (the chip
// uses a PLA for each PN memory, so this is a constant table). Each word has a
// weight block of WW bits and a two-bit synchronisation block:
//   sel = 1  add the linear input instead of the synaptic product (x word)
//   oe  = 1  enable the PN's three-state output and clear it (y / fire word)
// The word layout {weight, sel, oe} follows the column order of the published
// memory format (weight columns, then the selector column, then the output
// enable column). The table contents come in through the ROM parameter,
// word a at bits [a*(WW+2) +: WW+2]; they are computed by the neuron from
// the network weights and the tree schedule.
// The default table (a y word at address 0, weight 1 elsewhere) makes a
// stand-alone PN sum its inputs over one cycle.
//
// Timing: purely combinational, word valid in the same step as addr.
module pn_memory #(
  parameter int unsigned PNW = 6,
  parameter int unsigned WW  = 8,
  parameter logic [PNW*(WW+2)-1:0] ROM = {{(PNW-1){{WW'(1), 2'b00}}}, {WW'(0), 2'b01}},
  localparam int unsigned AW = (PNW > 1) ? $clog2(PNW) : 1
) (
  input  logic [AW-1:0]      addr,
  output logic signed [WW-1:0] weight,
  output nn_pkg::pn_ctl_t    ctl
);

  logic [WW+1:0] words [PNW];

  always_comb begin
    for (int a = 0; a < PNW; a++) words[a] = ROM[a*(WW+2) +: WW+2];
  end

  always_comb begin
    weight = '0;
    ctl    = '0;
    for (int a = 0; a < PNW; a++) begin
      if (addr == AW'(a)) begin
        weight = words[a][WW+1:2];
        ctl    = words[a][1:0];
      end
    end
  end

endmodule
