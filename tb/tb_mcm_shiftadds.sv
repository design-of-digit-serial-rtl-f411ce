// tb_mcm_shiftadds: self-checking test of the shift-adds digit-serial MCM
// network.
//
// The default network (7x = 8x - x, 29x = 4*7x + x, 43x = 29x + 2*7x) is run
// with d = 2 on signed 16-bit inputs in 11-digit words, and the same network
// bit-serially (d = 1, 22-digit words). Every node word is compared with
// c * x modulo 2^(d*L). The shift flip-flop count of the d = 2 network is
// checked against the five of the hand-drawn design (three for x << 3, two
// for 7x << 2, shared with 7x << 1).
module tb_mcm_shiftadds;
  localparam int unsigned N = 16;
  localparam int unsigned D1 = 2, L1 = 11;
  localparam int unsigned D2 = 1, L2 = 22;
  localparam longint CONSTS [4] = '{1, 7, 29, 43};

  logic             clk = 1'b0;
  logic             init1, init2;
  logic [D1-1:0]    x1;
  logic [D2-1:0]    x2;
  logic [3:0][D1-1:0] node1;
  logic [3:0][D2-1:0] node2;
  int               checks = 0, failures = 0;

  mcm_shiftadds #(.D(D1)) dut1 (.clk(clk), .init(init1), .x(x1), .node(node1));
  mcm_shiftadds #(.D(D2)) dut2 (.clk(clk), .init(init2), .x(x2), .node(node2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run1(input logic signed [N-1:0] xs);
    logic [D1*L1-1:0] xw;
    logic [3:0][D1*L1-1:0] got;
    xw = (D1*L1)'(longint'(xs));
    for (int k = 0; k < int'(L1); k++) begin
      @(negedge clk);
      x1    = xw[k*D1 +: D1];
      init1 = (k == int'(L1) - 1);
      #1 for (int n = 0; n < 4; n++) got[n][k*D1 +: D1] = node1[n];
    end
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (got[n] != (D1*L1)'(CONSTS[n] * longint'(xs))) begin
        failures++;
        $display("FAIL d=2: %0d * %0d gave %h", CONSTS[n], xs, got[n]);
      end
    end
  endtask

  task automatic run2(input logic signed [N-1:0] xs);
    logic [D2*L2-1:0] xw;
    logic [3:0][D2*L2-1:0] got;
    xw = (D2*L2)'(longint'(xs));
    for (int k = 0; k < int'(L2); k++) begin
      @(negedge clk);
      x2    = xw[k*D2 +: D2];
      init2 = (k == int'(L2) - 1);
      #1 for (int n = 0; n < 4; n++) got[n][k*D2 +: D2] = node2[n];
    end
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (got[n] != (D2*L2)'(CONSTS[n] * longint'(xs))) begin
        failures++;
        $display("FAIL d=1: %0d * %0d gave %h", CONSTS[n], xs, got[n]);
      end
    end
  endtask

  initial begin
    x1 = '0; x2 = '0; init1 = 1'b1; init2 = 1'b1;
    repeat (2) @(posedge clk);
    checks++;
    if ($bits(dut1.g_node[0].u_shift.g_chain.hist) + $bits(dut1.g_node[1].u_shift.g_chain.hist) != 5) begin
      failures++;
      $display("FAIL: shift flip-flop count");
    end
    run1(16'sd32767); run1(-16'sd32768); run1(-16'sd1);
    for (int n = 0; n < 300; n++) run1(N'($urandom));
    run2(16'sd32767); run2(-16'sd32768); run2(-16'sd1);
    for (int n = 0; n < 300; n++) run2(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
