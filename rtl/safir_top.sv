// safir_top: the two digit-serial designs side by side.
//
//  * mcm_* : a digit-serial multiple constant multiplication design (ds_mcm)
//            that multiplies a signed 16-bit input by 29 and 43 with a shared
//            shift-adds network (7x = 8x - x, 29x = 4*7x + x, 43x = 29x + 2*7x)
//            and returns both products in parallel every 11 cycles.
//  * fir_* : a digit-serial transposed-form FIR filter (ds_fir) with
//            coefficients h0 = 29, h1 = 43 built on the same network; one
//            23-bit output every 12 cycles.
// Both use digit size d = 2 and input width N = 16. Each half has its own
// synchronous active-high reset and its own word counter; see ds_mcm and ds_fir
// for the digit timing of their ports.
module safir_top
  import ds_pkg::*;
#(
  parameter int unsigned D    = 2,
  parameter int unsigned N    = 16,
  parameter arch_e       ARCH = ARCH_SHIFT_ADDS,   // multiplier block of the filter
  localparam int unsigned MCM_PW = 6 + N,          // bitlen(43) + N
  localparam int unsigned FIR_BW = 7 + N           // ceil(log2(29 + 43)) + N
) (
  input  logic                   clk,
  // MCM design
  input  logic                   mcm_rst,
  input  logic [D-1:0]           mcm_x,
  output logic                   mcm_first,
  output logic                   mcm_valid,
  output logic [1:0][MCM_PW-1:0] mcm_prod,     // [0] = 29x, [1] = 43x
  // FIR filter
  input  logic                   fir_rst,
  input  logic [D-1:0]           fir_x,
  output logic                   fir_first,
  output logic                   fir_y_valid,
  output logic signed [FIR_BW-1:0] fir_y
);

  ds_mcm #(.D(D), .N(N)) u_mcm (
    .clk  (clk),
    .rst  (mcm_rst),
    .x    (mcm_x),
    .first(mcm_first),
    .valid(mcm_valid),
    .prod (mcm_prod)
  );

  ds_fir #(.D(D), .N(N), .ARCH(ARCH)) u_fir (
    .clk    (clk),
    .rst    (fir_rst),
    .x      (fir_x),
    .first  (fir_first),
    .y_valid(fir_y_valid),
    .y      (fir_y)
  );

endmodule
