// tb_pn_memory: loads a memory with a known table (distinct weights, all four
// control codes) and checks that each address reads back its word, split
// into weight, selector and output-enable bits.
module tb_pn_memory;
  localparam int PNW = 6, WW = 8;
  // word a = {weight = 8'h11*(a+1) - 100, sel = a[0], oe = a[1]}
  function automatic logic [PNW*(WW+2)-1:0] table_of();
    logic [PNW*(WW+2)-1:0] t;
    for (int a = 0; a < PNW; a++)
      t[a*(WW+2) +: WW+2] = {WW'(17 * (a + 1) - 100), a[0] == 1'b1, a[1] == 1'b1};
    return t;
  endfunction
  localparam logic [PNW*(WW+2)-1:0] ROM = table_of();

  logic [2:0] addr;
  logic signed [WW-1:0] weight;
  nn_pkg::pn_ctl_t ctl;
  int checks = 0, failures = 0;

  pn_memory #(.PNW(PNW), .WW(WW), .ROM(ROM)) dut (.*);

  initial begin
    for (int a = 0; a < PNW; a++) begin
      addr = 3'(a);
      #1;
      checks++;
      if (int'(weight) != 17 * (a + 1) - 100 || ctl.sel != a[0] || ctl.oe != a[1]) begin
        failures++;
        $display("FAIL addr %0d: weight %0d sel %b oe %b", a, weight, ctl.sel, ctl.oe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
