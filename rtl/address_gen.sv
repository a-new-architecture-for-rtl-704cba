// address_gen: network address bus generator.
//
// A cyclic counter 0..PNW-1 whose value is broadcast to every PN memory and
// to the bus schedulers, so that no other control signal has to be spread
// across the network. It also provides the decoded (one-hot) form of the
// address, which enables the bus drivers of the input interface.
// The counter and its decoded output follow the address bus generator of the
// input-interface example; the synchronous, active-high reset to address 0
// is this design's choice.
//
// Timing: addr advances by one on every rising clock edge and wraps from
// PNW-1 to 0, so one computational cycle lasts PNW clocks. dec is decoded
// combinationally from addr.
module address_gen #(
  parameter int unsigned PNW = 6,
  localparam int unsigned AW = (PNW > 1) ? $clog2(PNW) : 1
) (
  input  logic           clk,
  input  logic           rst,
  output logic [AW-1:0]  addr,
  output logic [PNW-1:0] dec
);

  always_ff @(posedge clk) begin
    if (rst || addr == AW'(PNW - 1)) addr <= '0;
    else                             addr <= addr + 1'b1;
  end

  always_comb begin
    dec = '0;
    dec[addr] = 1'b1;
  end

endmodule
