// Self-checking testbench of interleaver.
//
// Runs the BPSK (1 RAM), QPSK (2), 16-QAM (4, the default parameters) and
// 64-QAM (6) interleavers with the full 192-bit halves and the 12-column
// matrix, and a 16-QAM interleaver with a 16-column matrix, through random traffic, a full-rate phase, a phase with the
// output stalled (both halves fill, the writer must wait) and random
// traffic again, checking every output symbol against the permutation.
module interleaver_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] mode = 2'd0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int c[5], f[5], b[5], o[5], s[5];

  interleaver_chk #(.NB(1)) u1 (.clk, .rst_n, .mode, .checks (c[0]), .failures (f[0]),
    .blocks_out (b[0]), .overlap (o[0]), .stalls (s[0]));
  interleaver_chk #(.NB(2)) u2 (.clk, .rst_n, .mode, .checks (c[1]), .failures (f[1]),
    .blocks_out (b[1]), .overlap (o[1]), .stalls (s[1]));
  interleaver_chk #(.NB(4)) u4 (.clk, .rst_n, .mode, .checks (c[2]), .failures (f[2]),
    .blocks_out (b[2]), .overlap (o[2]), .stalls (s[2]));
  interleaver_chk #(.NB(6)) u6 (.clk, .rst_n, .mode, .checks (c[3]), .failures (f[3]),
    .blocks_out (b[3]), .overlap (o[3]), .stalls (s[3]));
  // 16-column matrix (the IEEE 802.16 first permutation) for 16-QAM
  interleaver_chk #(.NB(4), .COLS(16)) u16 (.clk, .rst_n, .mode, .checks (c[4]), .failures (f[4]),
    .blocks_out (b[4]), .overlap (o[4]), .stalls (s[4]));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (8000) @(negedge clk);
    mode = 2'd1;
    repeat (6000) @(negedge clk);
    mode = 2'd2;
    repeat (3000) @(negedge clk);
    mode = 2'd0;
    repeat (8000) @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (b[i] < 3 || o[i] == 0 || s[i] == 0) begin
        failures++;
        $display("FAIL instance %0d: blocks %0d overlap %0d stalls %0d", i, b[i], o[i], s[i]);
      end
      $display("instance %0d: blocks %0d overlap cycles %0d stall cycles %0d", i, b[i], o[i], s[i]);
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
