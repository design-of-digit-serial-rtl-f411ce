// tb_filter4_mcm: a multiplier block of the size of a large benchmark filter,
// as a stand-alone digit-serial MCM design, at d = 1, 2, 4 and 8.
//
// The targets are the 200 generated coefficients of tb_filter4_sized,
// h_j = ((7919 j + 13) mod 6001) - 3000, each multiplied by 16, so that the
// largest has 16 bits; with a 16-bit input every product then has 32 bits and
// one word takes ceil(32 / d) = 32, 16, 8 and 4 cycles. The network is the
// prefix-sharing binary decomposition described in tb_filter4_shiftadds
// (334 operations for 195 odd constants). Every target is even and about half
// are negative, so each product passes through a shift chain and, where
// needed, a subtraction from zero before its storage. Every product of every
// sample is checked, and so is the cycle count of each word.
module tb_filter4_mcm;
  import ds_pkg::*;

  localparam int unsigned NT     = 200;
  localparam int unsigned MAXOPS = 1000;
  typedef int coef_t [NT];
  typedef aop_t [MAXOPS-1:0] net_t;

  function automatic coef_t gen(int scale);
    coef_t h;
    for (int j = 0; j < int'(NT); j++) h[j] = scale * (((7919 * j + 13) % 6001) - 3000);
    return h;
  endfunction

  localparam coef_t HF  = gen(1);
  localparam coef_t TGT = gen(16);

  // Builds the network for the odd parts of HF; returns the operation list,
  // or with count_only the number of operations in element 0's node field.
  function automatic net_t build(bit count_only);
    net_t       ops;
    int         node_of [4096];
    int         n = 0;
    longint unsigned c, p, q;
    for (int v = 0; v < 4096; v++) node_of[v] = -1;
    node_of[1] = 0;
    ops = '0;
    for (int j = 0; j < int'(NT); j++) begin
      c = odd_part((HF[j] < 0) ? longint'(-HF[j]) : longint'(HF[j]));
      if (c == 0 || node_of[c] >= 0) continue;
      for (int k = 1; k < 12; k++) begin
        if (c[k]) begin
          p = c % (64'd1 << (k + 1));
          q = c % (64'd1 << k);
          if (node_of[p] < 0) begin
            ops[n] = aop(0, SHIFT_W'(k), NODE_W'(node_of[q]), 0, 1'b0);
            n++;
            node_of[p] = n;
          end
        end
      end
    end
    if (count_only) begin
      ops = '0;
      ops[0].u = NODE_W'(n);
    end
    return ops;
  endfunction

  localparam net_t        CNT_NET = build(1'b1);
  localparam int unsigned NOPS    = int'(CNT_NET[0].u);
  localparam net_t        NET     = build(1'b0);
  localparam aop_t [NOPS-1:0] OPS = NET[NOPS-1:0];
  localparam int unsigned NS = 40;

  logic clk = 1'b0;
  logic rst;
  int   c[4], f[4];
  logic d[4];
  int   checks = 0, failures = 0;

  mcm_harness #(.D(1), .N(16), .NOPS(NOPS), .OPS(OPS), .NT(NT), .TGT(TGT), .NSAMP(NS)) h1 (
    .clk(clk), .rst(rst), .checks(c[0]), .failures(f[0]), .done(d[0]));
  mcm_harness #(.D(2), .N(16), .NOPS(NOPS), .OPS(OPS), .NT(NT), .TGT(TGT), .NSAMP(NS)) h2 (
    .clk(clk), .rst(rst), .checks(c[1]), .failures(f[1]), .done(d[1]));
  mcm_harness #(.D(4), .N(16), .NOPS(NOPS), .OPS(OPS), .NT(NT), .TGT(TGT), .NSAMP(NS)) h4 (
    .clk(clk), .rst(rst), .checks(c[2]), .failures(f[2]), .done(d[2]));
  mcm_harness #(.D(8), .N(16), .NOPS(NOPS), .OPS(OPS), .NT(NT), .TGT(TGT), .NSAMP(NS)) h8 (
    .clk(clk), .rst(rst), .checks(c[3]), .failures(f[3]), .done(d[3]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40 * 32 + 1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst = 1'b1;
    check(NOPS == 334, $sformatf("network size %0d operations", NOPS));
    check(h1.BW == 16 && h1.L == 32 && h2.L == 16 && h4.L == 8 && h8.L == 4,
          "word lengths 32, 16, 8, 4");
    $display("operations %0d, largest target %0d bits, cycles per word: %0d %0d %0d %0d",
             NOPS, h1.BW, h1.L, h2.L, h4.L, h8.L);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int i = 0; i < 4; i++) begin
      checks   += c[i];
      failures += f[i];
      check(c[i] >= int'(NS), "harness ran all samples");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
