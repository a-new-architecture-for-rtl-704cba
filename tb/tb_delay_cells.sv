// tb_delay_cells: delay cells in front of a 20-input output layer with
// 4-PN tree neurons and 7-word memories (K = 4, PNW = 7), the previous
// layer firing at address 2 (PHASE = 2).
//
// By the tree timing (local step tau = addr - 2): bus 0 carries inputs 1-5
// at tau 1-5, bus 1 inputs 6-10 at tau 2-6, bus 2 inputs 11-16 at tau 1-6
// and bus 3 inputs 17-20 at tau 3-6. The previous layer's outputs are valid
// only in its fire step; at all other steps y_prev is random. Buses 1 and 3
// belong to PNs deeper in the tree and must take the captured copy.
module tb_delay_cells;
  localparam int N_IN = 20, PNW = 7, K = 4, XW = 8, PHASE = 2;
  localparam int FIRST [K] = '{0, 5, 10, 16};
  localparam int TAU0  [K] = '{1, 2, 1, 3};
  localparam int CNT   [K] = '{5, 5, 6, 4};
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] addr;
  logic [XW-1:0] y_prev [N_IN];
  logic fire_prev;
  logic [XW-1:0] bus [K];
  logic [K-1:0] synch;
  int checks = 0, failures = 0;
  int xs [N_IN];
  int e;
  bit have;

  delay_cells #(.N_IN(N_IN), .PNW(PNW), .K(K), .XW(XW), .PHASE(PHASE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    addr = 0;
    fire_prev = 0;
    have = 0;
    for (int j = 0; j < N_IN; j++) y_prev[j] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 100; c++) begin
      for (int s = 0; s < PNW; s++) begin
        int tau;
        addr = 3'((s + PHASE) % PNW);
        tau = s;
        fire_prev = (tau == 0);
        if (tau == 0) begin
          if (s == 0 && c > 0) have = 1;
          for (int j = 0; j < N_IN; j++) begin
            xs[j] = int'($urandom_range(0, 255));
            y_prev[j] = XW'(xs[j]);
          end
        end else begin
          for (int j = 0; j < N_IN; j++) y_prev[j] = XW'($urandom_range(0, 255));
        end
        #1;
        for (int b = 0; b < K; b++) begin
          e = (tau >= TAU0[b] && tau < TAU0[b] + CNT[b]) ? xs[FIRST[b] + tau - TAU0[b]] : 0;
          checks++;
          if (int'(bus[b]) != e) begin
            failures++;
            $display("FAIL cycle %0d tau %0d bus %0d: %0d expected %0d", c, tau, b, bus[b], e);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
