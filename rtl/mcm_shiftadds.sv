// mcm_shiftadds: digit-serial multiple constant multiplication (MCM) block
// under the shift-adds architecture.
//
// The network is given as a list of A-operations (see ds_pkg::aop_t). Node 0
// is the input x; node n (n >= 1) is the result of operation OPS[n-1],
// (node[u] << lu) +/- (node[v] << lv), so node n carries the digit-serial
// product c_n * x for the constant c_n the list builds. Each operation becomes
// one digit-serial adder or subtractor. Left shifts cost flip-flops in a
// digit-serial design, so every node gets a single shift chain (ds_shift)
// sized for the largest shift any operation takes of it; smaller shifts of the
// same node are taps of that chain and are free.
//
// The operation list is what an MCM optimisation algorithm (exact CSE or the
// graph-based heuristic) produces; it is a parameter here. The default list is
// the three-operation network 7x = (x<<3) - x, 29x = (7x<<2) + x,
// 43x = 29x + (7x<<1) with d = 2, which needs five shift flip-flops in total.
//
// Constant values of the nodes are checked at elaboration: every operand must
// be an earlier node and every subtraction must have a positive result.
//
// Timing: all node outputs are combinational in x and the stored carries and
// shift bits; one digit per cycle. `init` must be high in the last cycle of
// every word and during reset. The input must be sign extended to the full
// word length, and the word must be long enough for the largest product.
module mcm_shiftadds
  import ds_pkg::*;
#(
  parameter int unsigned D    = 2,                       // digit size d
  parameter int unsigned NOPS = 3,                       // number of A-operations
  parameter aop_t [NOPS-1:0] OPS = {aop(2, 0, 1, 1, 1'b0), // 43 = 29 + 7<<1
                                    aop(1, 2, 0, 0, 1'b0), // 29 = 7<<2 + 1
                                    aop(0, 3, 0, 0, 1'b1)} //  7 = 1<<3 - 1
) (
  input  logic                  clk,
  input  logic                  init,
  input  logic [D-1:0]          x,
  output logic [NOPS:0][D-1:0]  node      // node[n] = c_n * x, node[0] = x
);

  // Largest shift taken of node n by any operation.
  function automatic int unsigned max_shift(int unsigned n);
    int unsigned m = 0;
    for (int i = 0; i < NOPS; i++) begin
      if (OPS[i].u == NODE_W'(n) && 32'(OPS[i].lu) > m) m = 32'(OPS[i].lu);
      if (OPS[i].v == NODE_W'(n) && 32'(OPS[i].lv) > m) m = 32'(OPS[i].lv);
    end
    return m;
  endfunction

  function automatic int unsigned max_all();
    int unsigned m = 0;
    for (int n = 0; n <= NOPS; n++)
      if (max_shift(n) > m) m = max_shift(n);
    return m;
  endfunction

  // Index of the first operation that uses a node not computed yet or does
  // not give a positive constant, or -1 if the list is well formed.
  function automatic int first_bad_op();
    longint val [NOPS+1];
    val[0] = 1;
    for (int i = 0; i < NOPS; i++) begin
      if (int'(OPS[i].u) > i || int'(OPS[i].v) > i) return i;
      if (OPS[i].sub) val[i+1] = (val[OPS[i].u] << OPS[i].lu) - (val[OPS[i].v] << OPS[i].lv);
      else            val[i+1] = (val[OPS[i].u] << OPS[i].lu) + (val[OPS[i].v] << OPS[i].lv);
      if (val[i+1] <= 0) return i;
    end
    return -1;
  endfunction

  localparam int unsigned MLS_ALL = max_all();
  localparam int          BAD_OP  = first_bad_op();

  if (BAD_OP >= 0) begin : g_bad_list
    $error("mcm_shiftadds: operation %0d uses a node not computed yet or does not give a positive constant", BAD_OP);
  end

  logic [NOPS:0][MLS_ALL:0][D-1:0] shifted;   // shifted[n][ls] = node n << ls

  assign node[0] = x;

  for (genvar n = 0; n <= NOPS; n++) begin : g_node
    localparam int unsigned MLS = max_shift(n);
    logic [MLS:0][D-1:0] taps;

    ds_shift #(.D(D), .MLS(MLS)) u_shift (
      .clk (clk),
      .init(init),
      .a   (node[n]),
      .taps(taps)
    );

    for (genvar ls = 0; ls <= MLS_ALL; ls++) begin : g_tap
      if (ls <= MLS) begin : g_used
        assign shifted[n][ls] = taps[ls];
      end else begin : g_unused
        assign shifted[n][ls] = '0;
      end
    end
  end

  for (genvar i = 0; i < NOPS; i++) begin : g_op
    if (OPS[i].sub) begin : g_sub
      ds_sub #(.D(D)) u_sub (
        .clk (clk),
        .init(init),
        .a   (shifted[OPS[i].u][OPS[i].lu]),
        .b   (shifted[OPS[i].v][OPS[i].lv]),
        .s   (node[i+1])
      );
    end else begin : g_add
      ds_add #(.D(D)) u_add (
        .clk (clk),
        .init(init),
        .a   (shifted[OPS[i].u][OPS[i].lu]),
        .b   (shifted[OPS[i].v][OPS[i].lv]),
        .s   (node[i+1])
      );
    end
  end

endmodule
