// ds_constmult: digit-serial multiplier by a fixed constant C, using the
// sequential (radix-2^d) multiplication algorithm.
//
// Every cycle one d-bit digit x_i of the input (least significant first)
// selects one of the 2^d precomputed multiples 0, C, 2C, ..., (2^d-1)C. The
// selected partial product is added to the upper part of the partial product
// store (PPS) shifted right by d bits, and the sum is written back to the top
// M bits of the PPS. The d bits that drop off the bottom of the sum are final
// product bits: they are given out as the digit-serial product `p` in the same
// cycle and are also shifted down into the lower part of the PPS. The adder
// cannot overflow because its PPS operand has d leading zeros.
//
// Widths: M = bitlen(C) + d bits for the adder, and the PPS holds
// M + (K-1)*d bits with K = ceil(N/d) input digits, which is bitlen(C) + N
// when d divides N. After the K digits of an unsigned N-bit x, the PPS holds
// C*x exactly (`pps`, valid in the cycle after digit K-1). When the input keeps
// running with sign-extension digits, `p` continues to give the digits of the
// two's complement product, which is how the FIR filter uses it.
//
// `init` clears the PPS; assert it in the last cycle of every word and during
// reset. Timing: p is combinational in x; one digit per cycle.
module ds_constmult #(
  parameter int unsigned     D = 2,     // digit size d
  parameter int unsigned     N = 16,    // input width
  parameter longint unsigned C = 29,    // the constant, positive
  localparam int unsigned    M = ds_pkg::bitlen(C) + D,
  localparam int unsigned    K = ds_pkg::ceil_div(N, D),
  localparam int unsigned    W = M + (K - 1) * D
) (
  input  logic         clk,
  input  logic         init,
  input  logic [D-1:0] x,               // input digit x_i
  output logic [D-1:0] p,               // product digit
  output logic [W-1:0] pps              // partial product store
);

  logic [M-1:0] mux_out;
  logic [M-1:0] sum;
  logic [M-1:0] top_q;                  // upper M bits of the PPS

  // Multiplexer whose data inputs are the constant multiples k*C.
  always_comb begin
    mux_out = '0;
    for (int k = 0; k < (1 << D); k++)
      if (x == D'(k)) mux_out = M'(longint'(k) * longint'(C));
  end

  assign sum = mux_out + (top_q >> D);
  assign p   = sum[D-1:0];

  always_ff @(posedge clk) begin
    if (init) top_q <= '0;
    else      top_q <= sum;
  end

  if (K > 1) begin : g_low
    logic [(K-1)*D-1:0] low_q;          // lower part of the PPS
    if (K > 2) begin : g_shift
      always_ff @(posedge clk) begin
        if (init) low_q <= '0;
        else      low_q <= {top_q[D-1:0], low_q[(K-1)*D-1:D]};
      end
    end else begin : g_single
      always_ff @(posedge clk) begin
        if (init) low_q <= '0;
        else      low_q <= top_q[D-1:0];
      end
    end
    assign pps = {top_q, low_q};
  end else begin : g_nolow
    assign pps = top_q;
  end

endmodule
