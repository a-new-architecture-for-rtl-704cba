// delay_cells: synchronisation between layer l-1 and layer l.
//
// Layer l-1 fires all its neurons in one step; layer l needs those outputs
// spread over a whole cycle, on K_l buses, and some of its PNs (those deeper
// in the tree) start their cycle a few steps later than others. The delay
// cells capture the fired outputs in a register at the fire step, and an
// input_interface then re-times them onto the buses: banks that start at the
// fire step take the outputs directly, the others take the captured copy.
// The result is that every PN of layer l sees the inputs of one pattern for
// its whole cycle while layer l-1 already computes the next pattern.
//
// PHASE is the global address of the fire step of layer l-1, which is also
// local step 0 of layer l. The capture register and the per-bus banks are
// this design's way of realising the delay cells; the architecture defines their
// purpose (delay tables per layer), not their circuit.
module delay_cells #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned PNW   = 6,
  parameter int unsigned K     = nn_pkg::pn_count(N_IN, PNW),
  parameter int unsigned XW    = 8,
  parameter int unsigned PHASE = 1,
  localparam int unsigned AW = (PNW > 1) ? $clog2(PNW) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] addr,
  input  logic [XW-1:0] y_prev [N_IN],
  input  logic          fire_prev,
  output logic [XW-1:0] bus    [K],
  output logic [K-1:0]  synch
);

  logic [XW-1:0] held [N_IN];

  always_ff @(posedge clk) begin
    for (int j = 0; j < N_IN; j++) begin
      if (rst)            held[j] <= '0;
      else if (fire_prev) held[j] <= y_prev[j];
    end
  end

  input_interface #(
    .N_IN(N_IN), .PNW(PNW), .K(K), .XW(XW), .PHASE(PHASE), .USE_HELD(1'b1)
  ) u_sched (
    .clk     (clk),
    .rst     (rst),
    .addr    (addr),
    .src_now (y_prev),
    .src_held(held),
    .bus     (bus),
    .synch   (synch)
  );

  // The previous layer must fire exactly in local step 0 of this layer.
  a_fire_phase: assert property (@(posedge clk) disable iff (rst)
                                 fire_prev == (addr == AW'(PHASE % PNW)));

endmodule
