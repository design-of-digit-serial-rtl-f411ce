// tb_filter4_shiftadds: the 200-tap, 35-bit-output filter of tb_filter4_sized
// with the shift-adds multiplier block, at the two extreme digit sizes d = 1
// and d = 8 (tb_filter4_sized covers d = 2 and 4 with constant multipliers).
//
// Coefficients: h_j = ((7919 j + 13) mod 6001) - 3000 (sum |h| = 300587, so
// the output is ceil(log2 300587) + 16 = 35 bits). The A-operation list is
// built here by a simple binary decomposition that shares low-order prefixes:
// every odd constant c is reached through the chain of its odd prefixes
// c mod 2^(k+1), each formed as (x << k) + (c mod 2^k), and a prefix already
// in the network is reused. This is far from an area-optimal network (it
// needs 334 operations for 195 distinct odd constants), but it has the size
// and shape of a real one: hundreds of digit-serial adders, one 11-bit shift
// chain on x with every tap in use, and deep adder chains. Every output is
// checked against the direct filter sum, and the word lengths must be 35 and 5
// cycles.
module tb_filter4_shiftadds;
  import ds_pkg::*;

  localparam int unsigned NT     = 200;
  localparam int unsigned MAXOPS = 1000;
  typedef int coef_t [NT];
  typedef aop_t [MAXOPS-1:0] net_t;

  function automatic coef_t gen();
    coef_t h;
    for (int j = 0; j < int'(NT); j++) h[j] = ((7919 * j + 13) % 6001) - 3000;
    return h;
  endfunction

  localparam coef_t HF = gen();

  // Builds the network; returns the operation list, or with count_only the
  // number of operations in element 0's node field.
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
  int   c[2], f[2];
  logic d[2];
  int   checks = 0, failures = 0;

  fir_harness #(.D(1), .N(16), .NTAP(NT), .H(HF), .NOPS(NOPS), .OPS(OPS), .NSAMP(NS)) h1 (
    .clk(clk), .rst(rst), .checks(c[0]), .failures(f[0]), .done(d[0]));
  fir_harness #(.D(8), .N(16), .NTAP(NT), .H(HF), .NOPS(NOPS), .OPS(OPS), .NSAMP(NS)) h8 (
    .clk(clk), .rst(rst), .checks(c[1]), .failures(f[1]), .done(d[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40 * 36 + 1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1] + 1);
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
    check(h1.L == 35 && h8.L == 5, "word lengths 35 and 5");
    $display("operations %0d, output width %0d, cycles per output: %0d %0d",
             NOPS, h1.BWY, h1.L, h8.L);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (d[0] && d[1]);
    for (int i = 0; i < 2; i++) begin
      checks   += c[i];
      failures += f[i];
      check(c[i] >= int'(NS), "harness ran all samples");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
