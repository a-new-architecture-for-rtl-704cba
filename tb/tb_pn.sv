// tb_pn: drives one PN with a hand-written memory and checks the
// accumulator behaviour cycle by cycle.
//
// Memory (PNW = 6): a0 weight 3, a1 weight -5, a2 x word, a3 weight 7,
// a4 x word, a5 y word. Over each cycle the PN must forward
//   3*x0 - 5*x1 + li2 + 7*x3 + li4
// at address 5 (oe = 1, lo = sum) and keep lo at 0 otherwise; the sum
// starts from zero in every cycle. A second PN with THETA_LI must add its
// own weight field times 1.0 (2^(XW-1)) at its x word.
module tb_pn;
  localparam int PNW = 6, WW = 8, XW = 8, ACC_W = 20;
  localparam logic [PNW*(WW+2)-1:0] ROM = {
    {8'sd0, 2'b01}, {8'sd0, 2'b10}, {8'sd7, 2'b00},
    {8'sd0, 2'b10}, {-8'sd5, 2'b00}, {8'sd3, 2'b00}};
  localparam logic [PNW*(WW+2)-1:0] ROM_T = {
    {8'sd0, 2'b01}, {-8'sd9, 2'b10}, {8'sd2, 2'b00},
    {8'sd0, 2'b00}, {8'sd0, 2'b00}, {8'sd0, 2'b00}};

  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] addr;
  logic [XW-1:0] x;
  logic signed [ACC_W-1:0] li, lo, lo_t;
  logic oe, oe_t;
  int checks = 0, failures = 0;
  int sum, sum_t;

  pn #(.PNW(PNW), .WW(WW), .XW(XW), .ACC_W(ACC_W), .ROM(ROM)) dut (.*);
  pn #(.PNW(PNW), .WW(WW), .XW(XW), .ACC_W(ACC_W), .THETA_LI(1'b1), .ROM(ROM_T)) dut_t (
    .clk(clk), .rst(rst), .addr(addr), .x(x), .li(li), .lo(lo_t), .oe(oe_t));

  always #5 clk = ~clk;

  initial begin
    addr = 0; x = 0; li = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 40; c++) begin
      sum = 0;
      sum_t = 0;
      for (int a = 0; a < PNW; a++) begin
        addr = 3'(a);
        x  = XW'($urandom_range(0, 255));
        li = ACC_W'(int'($urandom_range(0, 4000)) - 2000);
        #1;
        checks++;
        if (a == 5) begin
          if (!oe || (c > 0 && int'(lo) != sum) || !oe_t || (c > 0 && int'(lo_t) != sum_t)) begin
            failures++;
            $display("FAIL cycle %0d: lo %0d expected %0d, theta lo %0d expected %0d", c, lo, sum, lo_t, sum_t);
          end
        end else if (oe || lo != 0 || oe_t || lo_t != 0) begin
          failures++;
          $display("FAIL cycle %0d addr %0d: output driven outside y step", c, a);
        end
        case (a)
          0: sum += 3 * int'(x);
          1: sum += -5 * int'(x);
          2: sum += int'(li);
          3: sum += 7 * int'(x);
          4: sum += int'(li);
          default: ;
        endcase
        case (a)
          0, 1, 2: sum_t += 0;
          3: sum_t += 2 * int'(x);
          4: sum_t += -9 * (1 << (XW - 1));
          default: ;
        endcase
        @(negedge clk);
      end
    end
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
