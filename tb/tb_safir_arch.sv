// tb_safir_arch: the same end-to-end test as the default one, with the FIR
// filter's multiplier block built from sequential constant multipliers
// (one per constant, 29 and 43) instead of the shared shift-adds network.
// The MCM half is unchanged. Both must give identical results: 29x and 43x
// every 11 cycles, y(n) = 29 x(n) + 43 x(n-1) every 12 cycles, including
// extreme and negative samples and a mid-run reset of the filter.
module tb_safir_arch;
  localparam int unsigned NS = 400;

  logic             clk = 1'b0;
  logic             mcm_rst, fir_rst;
  logic [1:0]       mcm_x, fir_x;
  logic             mcm_first, mcm_valid, fir_first, fir_y_valid;
  logic [1:0][21:0] mcm_prod;
  logic signed [22:0] fir_y;

  int checks = 0, failures = 0;
  int n_neg = 0, n_ext = 0, n_two = 0, n_reset = 0, n_mcm = 0, n_fir = 0;
  bit mcm_done = 0, fir_done = 0;

  safir_top #(.ARCH(ds_pkg::ARCH_CONST_MULT)) dut (
    .clk(clk),
    .mcm_rst(mcm_rst), .mcm_x(mcm_x), .mcm_first(mcm_first), .mcm_valid(mcm_valid),
    .mcm_prod(mcm_prod),
    .fir_rst(fir_rst), .fir_x(fir_x), .fir_first(fir_first), .fir_y_valid(fir_y_valid),
    .fir_y(fir_y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
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

  function automatic logic signed [15:0] sample(int n);
    case (n % 50)
      0:       return 16'sh7fff;
      1:       return -16'sh8000;
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin : mcm_side
    logic signed [15:0] xs;
    logic [21:0]        xw;
    mcm_x = '0;
    @(negedge clk iff (!mcm_rst && mcm_first));
    for (int n = 0; n < int'(NS); n++) begin
      xs = sample(n);
      if (xs < 0) n_neg++;
      if (xs == 16'sh7fff || xs == -16'sh8000) n_ext++;
      xw = 22'(longint'(xs));
      check(mcm_first, "MCM: word starts on digit 0");
      for (int k = 0; k < 11; k++) begin
        mcm_x = xw[2*k +: 2];
        @(negedge clk);
        if (k < 10) check(!mcm_valid, "MCM: no valid in mid-word");
      end
      check(mcm_valid, "MCM: valid 11 cycles after digit 0");
      check(mcm_prod[0] == 22'(29 * longint'(xs)), $sformatf("MCM: 29 * %0d", xs));
      check(mcm_prod[1] == 22'(43 * longint'(xs)), $sformatf("MCM: 43 * %0d", xs));
      n_mcm++;
    end
    mcm_done = 1;
  end

  initial begin : fir_side
    logic signed [15:0] xs;
    longint             prev;
    logic [23:0]        xw;
    longint             exp;
    fir_x = '0;
    prev  = 0;
    @(negedge clk iff (!fir_rst && fir_first));
    for (int n = 0; n < int'(NS); n++) begin
      if (n == int'(NS) / 2) begin
        // Reset in the middle of the run: the delayed sample must be forgotten.
        fir_rst = 1'b1;
        @(negedge clk);
        fir_rst = 1'b0;
        prev = 0;
        n_reset++;
      end
      xs  = sample(n + 7);
      exp = 29 * longint'(xs) + 43 * prev;
      if (xs != 0 && prev != 0) n_two++;
      xw = 24'(longint'(xs));
      check(fir_first, "FIR: word starts on digit 0");
      for (int k = 0; k < 12; k++) begin
        fir_x = xw[2*k +: 2];
        @(negedge clk);
        if (k < 11) check(!fir_y_valid, "FIR: no output in mid-word");
      end
      check(fir_y_valid, "FIR: output 12 cycles after digit 0");
      check(longint'(fir_y) == exp, $sformatf("FIR: sample %0d y=%0d expected %0d", n, fir_y, exp));
      prev = longint'(xs);
      n_fir++;
    end
    fir_done = 1;
  end

  initial begin
    mcm_rst = 1'b1; fir_rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    mcm_rst = 1'b0; fir_rst = 1'b0;
    wait (mcm_done && fir_done);
    $display("events: mcm words %0d, fir outputs %0d, negative samples %0d, extreme samples %0d, two-sample outputs %0d, filter resets %0d",
             n_mcm, n_fir, n_neg, n_ext, n_two, n_reset);
    check(n_mcm == int'(NS) && n_fir == int'(NS), "all samples processed");
    check(n_neg > 0, "negative samples happened");
    check(n_ext > 0, "extreme samples happened");
    check(n_two > 0, "outputs from two non-zero samples happened");
    check(n_reset > 0, "filter reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
