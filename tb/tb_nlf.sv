// tb_nlf: sweeps the net input of a one-step and a three-step NLF and a
// nine-step NLF and compares with a reference that counts the breakpoints
// passed (breakpoints at multiples of 2^B centred on zero; levels 0 and
// 1.0 / 2^(S-k)).
module tb_nlf;
  localparam int ACC_W = 20, XW = 8;
  localparam int FULL = 1 << (XW - 1);
  logic signed [ACC_W-1:0] net;
  logic [XW-1:0] y1, y3, y9;
  int checks = 0, failures = 0;

  nlf #(.ACC_W(ACC_W), .XW(XW), .S(1), .B(4))  u1 (.net(net), .y(y1));
  nlf #(.ACC_W(ACC_W), .XW(XW), .S(3), .B(10)) u3 (.net(net), .y(y3));
  nlf #(.ACC_W(ACC_W), .XW(XW), .S(9), .B(6))  u9 (.net(net), .y(y9));

  function automatic int ref_y(input int v, input int s, input int b);
    int k;
    k = 0;
    for (int m = 1; m <= s; m++) if (v >= (m - (s + 1) / 2) * (1 << b)) k++;
    return (k == 0) ? 0 : (FULL >> (s - k));
  endfunction

  task automatic check(input int v);
    net = ACC_W'(v);
    #1;
    checks++;
    if (int'(y1) != ref_y(v, 1, 4) || int'(y3) != ref_y(v, 3, 10) || int'(y9) != ref_y(v, 9, 6)) begin
      failures++;
      $display("FAIL net %0d: %0d %0d %0d", v, y1, y3, y9);
    end
  endtask

  initial begin
    for (int v = -3000; v <= 3000; v += 7) check(v);
    check(0); check(-1); check(1023); check(1024); check(-1024); check(-1025);
    check(-(1 << 19)); check((1 << 19) - 1);
    for (int i = 0; i < 2000; i++) check(int'($urandom_range(0, 1 << 20)) - (1 << 19));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
