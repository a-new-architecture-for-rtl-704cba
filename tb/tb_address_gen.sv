// tb_address_gen: checks that the address counter resets to 0, counts
// 0..PNW-1 and wraps, one step per clock, and that the decoded output is the
// one-hot form of the address.
module tb_address_gen;
  localparam int PNW = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] addr;
  logic [PNW-1:0] dec;
  int checks = 0, failures = 0;
  int expect_a;

  address_gen #(.PNW(PNW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    expect_a = 0;
    for (int i = 0; i < 5 * PNW; i++) begin
      checks++;
      if (int'(addr) != expect_a || dec != PNW'(1) << expect_a) begin
        failures++;
        $display("FAIL step %0d: addr %0d dec %b expected %0d", i, addr, dec, expect_a);
      end
      @(negedge clk);
      expect_a = (expect_a + 1) % PNW;
    end
    rst <= 1'b1;
    @(negedge clk);
    checks++;
    if (addr != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
