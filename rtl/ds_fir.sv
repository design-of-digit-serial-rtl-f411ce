// ds_fir: digit-serial FIR filter in transposed form with a shared multiplier
// block.
//
// y(n) = sum_j H[j] * x(n-j). The multiplier block forms every product
// H[j] * x(n) from the current input only; the products then run through a
// chain of adders and one-sample delay registers:
//   s[NTAP-1] = p[NTAP-1],  s[j] = z^-1(s[j+1]) + p[j],  y = s[0].
// Everything is digit-serial: d bits per clock, least significant digit first.
//
// Multiplier block: every coefficient is split as H = sign * c * 2^e with c
// positive and odd. With ARCH = ARCH_SHIFT_ADDS the products c*x come from the
// shared add/subtract/shift network mcm_shiftadds described by OPS; with
// ARCH = ARCH_CONST_MULT every distinct c gets its own sequential constant
// multiplier (ds_constmult). c = 1 is the input itself. The factor 2^e is a
// digit-serial left shift (ds_shift), one chain per odd constant shared by all
// its even multiples, and the sign is absorbed into the chain:
// a negative coefficient makes its chain adder a subtractor. A zero coefficient
// only passes the delayed sum on.
//
// Word length: the output has bw_y = ceil(log2(sum |H|)) + N bits, and each
// sample occupies L = ceil(bw_y / d) cycles; the input must be the signed N-bit
// sample sign extended to L digits. All arithmetic is modulo 2^(d*L), which is
// exact because every partial sum fits in bw_y bits. (When sum |H| is a power
// of two and all coefficients are negative, the single input value -2^(N-1)
// gives y = 2^(N-1) * sum |H|, one bit beyond bw_y.)
//
// Interface: drive digit k of x(n) while the counter is at k (`first` marks
// digit 0). `y_valid` is high for one cycle, the cycle after digit L-1, with
// the parallel output `y` of that sample. The latency of one output is L
// cycles. Reset (`rst`) is synchronous and active high and clears the delay
// registers, so the filter starts from a zero history.
module ds_fir
  import ds_pkg::*;
#(
  parameter int unsigned D    = 2,                   // digit size d
  parameter int unsigned N    = 16,                  // input width
  parameter arch_e       ARCH = ARCH_SHIFT_ADDS,
  parameter int unsigned NTAP = 2,
  parameter int          H [NTAP] = '{29, 43},      // h0, h1, ...
  parameter int unsigned NOPS = 3,
  parameter aop_t [NOPS-1:0] OPS = {aop(2, 0, 1, 1, 1'b0), // 43 = 29 + 7<<1
                                    aop(1, 2, 0, 0, 1'b0), // 29 = 7<<2 + 1
                                    aop(0, 3, 0, 0, 1'b1)}, //  7 = 1<<3 - 1
  localparam int unsigned BWY = $clog2(sum_abs()) + N,  // output width
  localparam int unsigned L   = ceil_div(BWY, D),       // latency in cycles
  localparam int unsigned CW  = (L > 1) ? $clog2(L) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [D-1:0]          x,          // input digit
  output logic                  first,      // this cycle takes digit 0
  output logic                  y_valid,
  output logic signed [BWY-1:0] y
);

  function automatic longint sum_abs();
    longint s = 0;
    for (int j = 0; j < NTAP; j++) s += (H[j] < 0) ? -H[j] : H[j];
    return (s < 2) ? 2 : s;
  endfunction

  function automatic longint unsigned mag(int j);
    return (H[j] < 0) ? longint'(-H[j]) : longint'(H[j]);
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

  // First coefficient with the same odd part as coefficient j.
  function automatic int unsigned first_same(int j);
    for (int k = 0; k < j; k++)
      if (odd_part(mag(k)) == odd_part(mag(j))) return k;
    return j;
  endfunction

  // Largest power-of-two factor among the coefficients sharing j's odd part.
  function automatic int unsigned max_even(int j);
    int unsigned m = 0;
    for (int k = 0; k < NTAP; k++)
      if (H[k] != 0 && odd_part(mag(k)) == odd_part(mag(j)) && even_shift(mag(k)) > m)
        m = even_shift(mag(k));
    return m;
  endfunction

  function automatic int unsigned max_even_all();
    int unsigned m = 0;
    for (int k = 0; k < NTAP; k++)
      if (even_shift(mag(k)) > m) m = even_shift(mag(k));
    return m;
  endfunction

  localparam int unsigned E_ALL = max_even_all();

  logic [CW-1:0]             cnt;
  logic                      last, init;
  logic [NTAP-1:0][D-1:0]    odd_prod;   // c_j * x, c_j the odd part of |H[j]|
  logic [NTAP-1:0][D-1:0]    prod;       // |H[j]| * x
  logic [NTAP-1:0][E_ALL:0][D-1:0] shifted; // shifted[j][e] = odd_prod[j] << e
  logic [NTAP-1:0][D-1:0]    sum;        // s[j]
  logic [NTAP-1:0][D-1:0]    dly;        // z^-1 s[j]

  ds_ctrl #(.L(L), .CW(CW)) u_ctrl (
    .clk  (clk),
    .rst  (rst),
    .cnt  (cnt),
    .first(first),
    .last (last),
    .init (init)
  );

  // ---------------------------------------------------------------- multiplier block
  if (ARCH == ARCH_SHIFT_ADDS) begin : g_shift_adds
    logic [NOPS:0][D-1:0] node;

    mcm_shiftadds #(.D(D), .NOPS(NOPS), .OPS(OPS)) u_mcm (
      .clk (clk),
      .init(init),
      .x   (x),
      .node(node)
    );

    for (genvar j = 0; j < NTAP; j++) begin : g_tap
      localparam int unsigned NODE = find_node(longint'(odd_part(mag(j))));
      if (H[j] == 0) begin : g_zero
        assign odd_prod[j] = '0;
      end else if (NODE > NOPS) begin : g_missing
        $error("ds_fir: coefficient %0d is not computed by the operation list", H[j]);
      end else begin : g_node
        assign odd_prod[j] = node[NODE];
      end
    end
  end else begin : g_const_mult
    for (genvar j = 0; j < NTAP; j++) begin : g_tap
      localparam longint unsigned C = odd_part(mag(j));
      localparam int unsigned     J0 = first_same(j);
      if (H[j] == 0) begin : g_zero
        assign odd_prod[j] = '0;
      end else if (C == 1) begin : g_unit
        assign odd_prod[j] = x;
      end else if (J0 != j) begin : g_shared
        assign odd_prod[j] = odd_prod[J0];
      end else begin : g_mult
        logic [ds_pkg::bitlen(C) + D + (ceil_div(N, D) - 1) * D - 1:0] pps_unused;
        ds_constmult #(.D(D), .N(N), .C(C)) u_cm (
          .clk (clk),
          .init(init),
          .x   (x),
          .p   (odd_prod[j]),
          .pps (pps_unused)
        );
      end
    end
  end

  // Even coefficients: left shift by the power of two. Coefficients with the
  // same odd part share one shift chain, sized for the largest shift among
  // them, whose taps give every smaller shift.
  for (genvar j = 0; j < NTAP; j++) begin : g_even
    localparam int unsigned E  = even_shift(mag(j));
    localparam int unsigned J0 = first_same(j);
    localparam int unsigned EM = max_even(j);
    if (J0 == j && EM > 0) begin : g_chain_owner
      logic [EM:0][D-1:0] taps;
      ds_shift #(.D(D), .MLS(EM)) u_shift (
        .clk (clk),
        .init(init),
        .a   (odd_prod[j]),
        .taps(taps)
      );
      for (genvar ls = 0; ls <= E_ALL; ls++) begin : g_tap
        if (ls <= EM) begin : g_used
          assign shifted[j][ls] = taps[ls];
        end else begin : g_unused
          assign shifted[j][ls] = '0;
        end
      end
    end else begin : g_no_chain
      assign shifted[j][0] = odd_prod[j];
      if (E_ALL > 0) begin : g_zero
        assign shifted[j][E_ALL:1] = '0;
      end
    end
    assign prod[j] = shifted[J0][E];
  end

  // ---------------------------------------------------------------- adder / register chain
  for (genvar j = 0; j < NTAP; j++) begin : g_chain
    logic [D-1:0] acc_in;                       // z^-1 s[j+1], or 0 at the far end
    if (j == NTAP - 1) begin : g_end
      assign acc_in = '0;
    end else begin : g_mid
      assign acc_in = dly[j+1];
    end

    if (H[j] == 0) begin : g_pass
      assign sum[j] = acc_in;
    end else if (H[j] > 0 && j == NTAP - 1) begin : g_first
      assign sum[j] = prod[j];
    end else if (H[j] > 0) begin : g_add
      ds_add #(.D(D)) u_add (
        .clk (clk),
        .init(init),
        .a   (acc_in),
        .b   (prod[j]),
        .s   (sum[j])
      );
    end else begin : g_sub
      ds_sub #(.D(D)) u_sub (
        .clk (clk),
        .init(init),
        .a   (acc_in),
        .b   (prod[j]),
        .s   (sum[j])
      );
    end

    if (j == 0) begin : g_out
      assign dly[j] = '0;
    end else begin : g_reg
      ds_wordreg #(.D(D), .L(L)) u_reg (
        .clk(clk),
        .clr(rst),
        .a  (sum[j]),
        .q  (dly[j])
      );
    end
  end

  // ---------------------------------------------------------------- output storage
  logic [D*L-1:0] word;

  ds_storage #(.D(D), .NDIG(L)) u_store (
    .clk  (clk),
    .shift(1'b1),
    .digit(sum[0]),
    .word (word)
  );

  assign y = word[BWY-1:0];

  always_ff @(posedge clk) begin
    if (rst) y_valid <= 1'b0;
    else     y_valid <= last;
  end

endmodule
