// input_interface: samples a layer's inputs and multiplexes them onto the
// layer's K input buses.
//
// Inputs are split into K sets, one per bus: set b holds the inputs that PN b
// of the layer's neurons multiply (the first rows of the schedule of
// nn_pkg::bus_input). Each set has its own bank of registers. Bank b samples
// its inputs at the end of local step tau = depth(PN_b), the y step that
// closes PN_b's previous cycle, and holds them for the next PNW steps; in
// each weight step a three-state driver (modelled as AND-OR) puts the input
// that the schedule names on bus b. Unused steps leave the bus at 0.
//
// synch[b] is high during the sampling step of bank b: the inputs of set b
// must be stable then and may change in every other step. Sampling happens on
// the clock edge that ends the synch pulse (its falling edge). The banks,
// the decoded bus drivers and one synch signal per bus follow the input
// interface example; the exact sampling step is this design's choice.
//
// For the first layer, src_now carries the environment inputs and USE_HELD
// is 0. The delay cells between layers set USE_HELD: banks sampling at
// tau = 0 (the step in which the previous layer fires) take src_now, all
// others take src_held, the copy captured at that fire step.
module input_interface #(
  parameter int unsigned N_IN  = 6,
  parameter int unsigned PNW   = 6,
  parameter int unsigned K     = nn_pkg::pn_count(N_IN, PNW),
  parameter int unsigned XW    = 8,
  parameter int unsigned PHASE = 0,
  parameter bit          USE_HELD = 1'b0,
  localparam int unsigned AW = (PNW > 1) ? $clog2(PNW) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] addr,
  input  logic [XW-1:0] src_now  [N_IN],
  input  logic [XW-1:0] src_held [N_IN],
  output logic [XW-1:0] bus      [K],
  output logic [K-1:0]  synch
);

  // Bus schedule: entry (b, a) at bits [(b*PNW + a)*16 +: 16] is one more than
  // the input number on bus b at global address a, or 0 for none.
  function automatic logic [K*PNW*16-1:0] build_tbl();
    logic [K*PNW*16-1:0] t;
    t = '0;
    for (int b = 0; b < K; b++)
      for (int a = 0; a < PNW; a++)
        t[(b*PNW + a)*16 +: 16] =
          16'(nn_pkg::bus_input(K, PNW, N_IN, b + 1, (a + PNW - (PHASE % PNW)) % PNW) + 1);
    return t;
  endfunction
  localparam logic [K*PNW*16-1:0] TBL = build_tbl();

  for (genvar b = 0; b < K; b++) begin : g_bus
    localparam int unsigned D_B    = nn_pkg::depth_of(K, b + 1);
    localparam int unsigned SAMPLE = (D_B + PHASE) % PNW;
    localparam bit          HELD   = USE_HELD && (D_B != 0);

    logic [XW-1:0] bank [N_IN];

    assign synch[b] = (addr == AW'(SAMPLE));

    for (genvar j = 0; j < N_IN; j++) begin : g_in
      if (nn_pkg::on_bus(K, PNW, N_IN, b + 1, j)) begin : g_reg
        always_ff @(posedge clk) begin
          if (rst)           bank[j] <= '0;
          else if (synch[b]) bank[j] <= HELD ? src_held[j] : src_now[j];
        end
      end else begin : g_none
        assign bank[j] = '0;
      end
    end

    always_comb begin
      bus[b] = '0;
      for (int a = 0; a < PNW; a++)
        for (int j = 0; j < N_IN; j++)
          if (addr == AW'(a) && TBL[(b*PNW + a)*16 +: 16] == 16'(j + 1))
            bus[b] = bus[b] | bank[j];
    end
  end

endmodule
