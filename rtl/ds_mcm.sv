// ds_mcm: complete digit-serial MCM design: multiplies one input x by several
// constants at once and returns the products in parallel.
//
// Structure: a word-framing counter (ds_ctrl), the shift-adds MCM network
// (mcm_shiftadds) and, for each target constant c, a storage shift register
// (ds_storage) that turns the digit-serial product c*x back into a parallel
// word.
//
// Word length: the input is a signed N-bit x, sign extended by the source to
// L = ceil((BW + N) / d) digits, where BW is the bit length of the largest
// target. One input sample is taken every L cycles. The product c*x has
// bw_cx = bitlen(c) + N bits and so ceil(bw_cx / d) digits; since targets have
// different lengths, the storage of c shifts only while the counter is below
// ceil(bw_cx / d) and then holds, so at the end of the word every storage block
// holds exactly the digits of its own product.
//
// Interface: drive digit k of the sign-extended x on `x` in the cycle where the
// counter is k (`first` marks digit 0). `valid` is high for one cycle, the
// cycle after digit L-1, and `prod[t]` then holds TGT[t] * x, sign extended to
// BW + N bits. The storage shifts again from the next cycle on.
// Reset (`rst`) is synchronous and active high.
//
// Targets may be any non-zero integers. A target t = sign * c * 2^e is taken
// from the network node that computes the odd constant c (checked at
// elaboration); the factor 2^e is a digit-serial left shift (ds_shift) and a
// negative sign a digit-serial subtraction from zero (two's complement), both
// ahead of the storage. The product then has bitlen(|t|) + N bits.
module ds_mcm
  import ds_pkg::*;
#(
  parameter int unsigned D    = 2,       // digit size d
  parameter int unsigned N    = 16,      // input width
  parameter int unsigned NOPS = 3,
  parameter aop_t [NOPS-1:0] OPS = {aop(2, 0, 1, 1, 1'b0), // 43 = 29 + 7<<1
                                    aop(1, 2, 0, 0, 1'b0), // 29 = 7<<2 + 1
                                    aop(0, 3, 0, 0, 1'b1)}, //  7 = 1<<3 - 1
  parameter int unsigned NT   = 2,       // number of target constants
  parameter int          TGT [NT] = '{29, 43},  // signed, non-zero
  localparam int unsigned BW  = max_bitlen(),
  localparam int unsigned L   = ceil_div(BW + N, D),      // latency in cycles
  localparam int unsigned PW  = BW + N,
  localparam int unsigned CW  = (L > 1) ? $clog2(L) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [D-1:0]          x,        // input digit
  output logic                  first,    // this cycle takes digit 0
  output logic                  valid,    // prod holds the products of the last word
  output logic [NT-1:0][PW-1:0] prod
);

  function automatic int unsigned max_bitlen();
    int unsigned m = 0;
    for (int t = 0; t < NT; t++)
      if (bitlen(mag(t)) > m) m = bitlen(mag(t));
    return m;
  endfunction

  function automatic longint unsigned mag(int t);
    return (TGT[t] < 0) ? longint'(-TGT[t]) : longint'(TGT[t]);
  endfunction

  // Node of the network that computes constant c, or NOPS+1 if none does.
  // The node constants are evaluated once per call, in one pass.
  function automatic int unsigned find_node(longint c);
    longint val [NOPS+1];
    val[0] = 1;
    if (c == 1) return 0;
    for (int i = 0; i < NOPS; i++) begin
      if (OPS[i].sub) val[i+1] = (val[OPS[i].u] << OPS[i].lu) - (val[OPS[i].v] << OPS[i].lv);
      else            val[i+1] = (val[OPS[i].u] << OPS[i].lu) + (val[OPS[i].v] << OPS[i].lv);
      if (val[i+1] == c) return i + 1;
    end
    return NOPS + 1;
  endfunction

  logic [CW-1:0]         cnt;
  logic                  last, init;
  logic [NOPS:0][D-1:0]  node;

  ds_ctrl #(.L(L), .CW(CW)) u_ctrl (
    .clk  (clk),
    .rst  (rst),
    .cnt  (cnt),
    .first(first),
    .last (last),
    .init (init)
  );

  mcm_shiftadds #(.D(D), .NOPS(NOPS), .OPS(OPS)) u_mcm (
    .clk (clk),
    .init(init),
    .x   (x),
    .node(node)
  );

  for (genvar t = 0; t < NT; t++) begin : g_tgt
    localparam longint unsigned C = odd_part(mag(t));
    localparam int unsigned E    = even_shift(mag(t));
    localparam int unsigned NODE = find_node(longint'(C));
    localparam int unsigned BWC  = bitlen(mag(t)) + N;    // bits of t*x
    localparam int unsigned KC   = ceil_div(BWC, D);      // digits of t*x
    logic [D*KC-1:0] word;
    logic [D-1:0]    scaled;                               // |t| * x
    logic [D-1:0]    digit;                                // t * x

    if (NODE > NOPS || TGT[t] == 0) begin : g_missing
      $error("ds_mcm: target %0d is not computed by the operation list", TGT[t]);
    end else begin : g_build
      if (E == 0) begin : g_odd
        assign scaled = node[NODE];
      end else begin : g_even
        logic [E:0][D-1:0] taps;
        ds_shift #(.D(D), .MLS(E)) u_shift (
          .clk (clk),
          .init(init),
          .a   (node[NODE]),
          .taps(taps)
        );
        assign scaled = taps[E];
      end

      if (TGT[t] < 0) begin : g_neg
        ds_sub #(.D(D)) u_neg (
          .clk (clk),
          .init(init),
          .a   ('0),
          .b   (scaled),
          .s   (digit)
        );
      end else begin : g_pos
        assign digit = scaled;
      end

      ds_storage #(.D(D), .NDIG(KC)) u_store (
        .clk  (clk),
        .shift(32'(cnt) < KC),
        .digit(digit),
        .word (word)
      );
    end

    assign prod[t] = PW'(signed'(word[BWC-1:0]));
  end

  always_ff @(posedge clk) begin
    if (rst) valid <= 1'b0;
    else     valid <= last;
  end

endmodule
