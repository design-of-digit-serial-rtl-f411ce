// tb_ds_constmult: self-checking test of the sequential digit-serial constant
// multiplier.
//
// With d = 2, N = 8 and C = 29: random signed 8-bit inputs are streamed as
// 7-digit sign-extended words (least significant digit first, init in the
// last digit). Checks
//  * the digit-serial product word equals C*x modulo 2^14,
//  * after the K = ceil(N/d) = 4 input digits the partial product store holds
//    C times the first K input digits read as an unsigned number (K cycles
//    of latency; for d = 2 that is the unsigned 8-bit input),
//  * the store width is bitlen(C) + N = 13 bits.
// A second instance with d = 3, N = 8, C = 5 covers an odd digit count and a
// constant whose (2^d-1)*C multiple is close to a power of two.
module tb_ds_constmult;
  localparam int unsigned D = 2, N = 8, L = 7;
  localparam int unsigned D2 = 3, L2 = 5;
  localparam longint unsigned C = 29, C2 = 5;
  localparam int unsigned K  = (N + D - 1) / D;
  localparam int unsigned K2 = (N + D2 - 1) / D2;

  logic          clk = 1'b0;
  logic          init, init2;
  logic [D-1:0]  x, p;
  logic [D2-1:0] x2, p2;
  logic [12:0]   pps;
  logic [3 + D2 + (K2-1)*D2 - 1:0] pps2;
  int            checks = 0, failures = 0;

  ds_constmult #(.D(D),  .N(N), .C(C))  dut  (.clk(clk), .init(init),  .x(x),  .p(p),  .pps(pps));
  ds_constmult #(.D(D2), .N(N), .C(C2)) dut2 (.clk(clk), .init(init2), .x(x2), .p(p2), .pps(pps2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One word through the first instance.
  task automatic run1(input logic signed [N-1:0] xs);
    logic [D*L-1:0] xw, got;
    longint         exp;
    xw  = (D*L)'(longint'(xs));
    exp = longint'(C) * longint'(xs);
    for (int k = 0; k < int'(L); k++) begin
      @(negedge clk);
      x    = xw[k*D +: D];
      init = (k == int'(L) - 1);
      #1 got[k*D +: D] = p;
      if (k == int'(K))
        check(longint'(pps) == longint'(C) * longint'(xw[K*D-1:0]),
              $sformatf("store after %0d digits: %0d for x=%0d", K, pps, xw[K*D-1:0]));
    end
    check(got == (D*L)'(exp), $sformatf("serial product %0d * %0d: got %h", C, xs, got));
  endtask

  task automatic run2(input logic signed [N-1:0] xs);
    logic [D2*L2-1:0] xw, got;
    longint           exp;
    xw  = (D2*L2)'(longint'(xs));
    exp = longint'(C2) * longint'(xs);
    for (int k = 0; k < int'(L2); k++) begin
      @(negedge clk);
      x2    = xw[k*D2 +: D2];
      init2 = (k == int'(L2) - 1);
      #1 got[k*D2 +: D2] = p2;
      if (k == int'(K2))
        check(longint'(pps2) == longint'(C2) * longint'(xw[K2*D2-1:0]),
              $sformatf("store(5) after %0d digits: %0d for x=%0d", K2, pps2, xw[K2*D2-1:0]));
    end
    check(got == (D2*L2)'(exp), $sformatf("serial product %0d * %0d: got %h", C2, xs, got));
  endtask

  initial begin
    x = '0; x2 = '0; init = 1'b1; init2 = 1'b1;
    repeat (2) @(posedge clk);
    check($bits(pps) == 13, "store width");
    run1(8'sd127); run1(-8'sd128); run1(-8'sd1); run1(8'sd0);
    for (int n = 0; n < 200; n++) run1(N'($urandom));
    @(negedge clk) init = 1'b1;
    run2(8'sd127); run2(-8'sd128); run2(-8'sd1);
    for (int n = 0; n < 200; n++) run2(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
