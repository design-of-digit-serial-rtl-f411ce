// tb_ds_mcm: self-checking test of the complete digit-serial MCM design.
//
// Instance A is the default design (d = 2, N = 16, targets 29 and 43): the
// latency must be ceil((6 + 16) / 2) = 11 cycles, and each valid pulse must
// deliver 29x and 43x for the sample just streamed in. Instance B (d = 4,
// N = 12, targets 7 and -86) has an even and negative target, built by
// shifting 43x and subtracting it from zero, and targets of different lengths,
// so the storage of 7x stops shifting before the word ends; the test counts
// those hold cycles and checks that they happened.
module tb_ds_mcm;
  import ds_pkg::*;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;
  int   holds = 0;

  // ---- instance A
  logic [1:0]        xa;
  logic              first_a, valid_a;
  logic [1:0][21:0]  prod_a;
  ds_mcm dut_a (.clk(clk), .rst(rst), .x(xa), .first(first_a), .valid(valid_a), .prod(prod_a));

  // ---- instance B
  logic [3:0]        xb;
  logic              first_b, valid_b;
  logic [1:0][18:0]  prod_b;
  ds_mcm #(.D(4), .N(12), .NT(2), .TGT('{7, -86})) dut_b (
    .clk(clk), .rst(rst), .x(xb), .first(first_b), .valid(valid_b), .prod(prod_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  // Source and checker of instance A: one sample per word.
  initial begin : drive_a
    logic signed [15:0] xs;
    logic [21:0]        xw;
    int                 t_first;
    xa = '0;
    @(negedge clk iff (!rst && first_a));
    for (int n = 0; n < 300; n++) begin
      xs = (n == 0) ? 16'sh7fff : (n == 1) ? -16'sh8000 : 16'($urandom);
      xw = 22'(longint'(xs));
      check(first_a, "A: word starts on digit 0");
      t_first = $time;
      for (int k = 0; k < 11; k++) begin
        xa = xw[2*k +: 2];
        @(negedge clk);
      end
      check(valid_a, "A: valid 11 cycles after digit 0");
      check(($time - t_first) / 10 == 11, "A: latency of 11 cycles");
      check(prod_a[0] == 22'(29 * longint'(xs)), $sformatf("A: 29 * %0d gave %0d", xs, $signed(prod_a[0])));
      check(prod_a[1] == 22'(43 * longint'(xs)), $sformatf("A: 43 * %0d gave %0d", xs, $signed(prod_a[1])));
    end
  end

  initial begin : drive_b
    logic signed [11:0] xs;
    logic [19:0]        xw;
    xb = '0;
    @(negedge clk iff (!rst && first_b));
    for (int n = 0; n < 300; n++) begin
      xs = (n == 0) ? 12'sh7ff : (n == 1) ? -12'sh800 : 12'($urandom);
      xw = 20'(longint'(xs));
      check(first_b, "B: word starts on digit 0");
      for (int k = 0; k < 5; k++) begin           // ceil((7 + 12) / 4) = 5 digits
        xb = xw[4*k +: 4];
        @(negedge clk);
      end
      check(valid_b, "B: valid after 5 cycles");
      check(prod_b[0] == 19'(7 * longint'(xs)), $sformatf("B: 7 * %0d gave %0d", xs, $signed(prod_b[0])));
      check(prod_b[1] == 19'(-86 * longint'(xs)), $sformatf("B: -86 * %0d gave %0d", xs, $signed(prod_b[1])));
    end
  end

  // Count the cycles in which the storage of 7x in B holds: 7x has
  // ceil((3 + 12) / 4) = 4 digits, the word has 5.
  always @(posedge clk) if (!rst && dut_b.cnt >= 3'd4) holds++;

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (11 * 300 + 5) @(posedge clk);
    check(holds > 0, "B: storage hold for the shorter product happened");
    $display("hold cycles: %0d", holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
