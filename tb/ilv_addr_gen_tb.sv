// Self-checking testbench of ilv_addr_gen: the 16-QAM generator (four
// RAMs, read increment 3, default parameters), the QPSK generator (two
// RAMs, increment 6) and the BPSK generator (one RAM, increment 12), each
// under random write requests and read takes.
module ilv_addr_gen_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int c[3], f[3], b[3];

  ilv_addr_gen_chk #(.NB(4), .INC(3))  u4 (.clk, .rst_n, .checks (c[0]), .failures (f[0]), .blocks (b[0]));
  ilv_addr_gen_chk #(.NB(2), .INC(6))  u2 (.clk, .rst_n, .checks (c[1]), .failures (f[1]), .blocks (b[1]));
  ilv_addr_gen_chk #(.NB(1), .INC(12)) u1 (.clk, .rst_n, .checks (c[2]), .failures (f[2]), .blocks (b[2]));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (20000) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (b[i] < 10) begin
        failures++;
        $display("FAIL instance %0d read only %0d blocks", i, b[i]);
      end
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
