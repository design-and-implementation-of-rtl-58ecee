// Self-checking testbench of puncturer.
//
// Three instances run side by side: the transmitter's rate-3/4 pattern
// (X 1 0 1, Y 1 1 0, default parameters), the 2 x 2 matrix P = [1 0; 1 1]
// that deletes the first bit of every second coded group (rate 2/3), and
// an all-ones matrix (no puncturing, as for BPSK). Each is checked bit by
// bit against the matrix, first under random traffic, then at full rate,
// where one output bit per cycle is required. The kept/deleted ratio of
// each instance is checked against its code rate.
module puncturer_tb;
  logic clk = 1'b0, rst_n = 1'b0, full_rate = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int c[3], f[3], k[3], d[3], fr[3], pd[3];

  puncturer_chk #(.N(2), .P(3), .PATTERN(ofdm_pkg::PUNC_34)) u0 (
    .clk, .rst_n, .full_rate, .checks (c[0]), .failures (f[0]), .kept (k[0]),
    .deleted (d[0]), .frames (fr[0]), .pending (pd[0]));
  puncturer_chk #(.N(2), .P(2), .PATTERN({2'b11, 2'b01})) u1 (
    .clk, .rst_n, .full_rate, .checks (c[1]), .failures (f[1]), .kept (k[1]),
    .deleted (d[1]), .frames (fr[1]), .pending (pd[1]));
  puncturer_chk #(.N(2), .P(1), .PATTERN(2'b11)) u2 (
    .clk, .rst_n, .full_rate, .checks (c[2]), .failures (f[2]), .kept (k[2]),
    .deleted (d[2]), .frames (fr[2]), .pending (pd[2]));

  initial begin
    #500000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) @(negedge clk);
    full_rate = 1'b1;
    repeat (600) @(negedge clk);
    full_rate = 1'b0;
    repeat (500) @(negedge clk);
    // the full-rate phase has no frame ends: the pattern ratio must show
    // in the totals (kept:deleted = 4:2 for 3/4, 3:1 for 2/3, all kept)
    expect_true(d[0] * 2 > k[0] * 9 / 10 && d[0] * 2 < k[0] * 11 / 10, "3/4 ratio");
    expect_true(d[1] * 3 > k[1] * 9 / 10 && d[1] * 3 < k[1] * 11 / 10, "2/3 ratio");
    expect_true(d[2] == 0 && k[2] > 1000, "no puncturing");
    for (int i = 0; i < 3; i++) begin
      expect_true(fr[i] > 10, "frame ends seen");
      expect_true(pd[i] <= 2, "queue drained");
      checks   += c[i];
      failures += f[i];
    end
    $display("kept/deleted %0d/%0d %0d/%0d %0d/%0d", k[0], d[0], k[1], d[1], k[2], d[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
