// Self-checking testbench of zero_padding (NFFT = 256, ND = 192): random
// data points under random valid/ready gaps; every output carrier is
// compared with the layout (data d on carrier d-96 for d < 96, d-95
// otherwise, zeros elsewhere), out_first must mark carrier -128, and at
// full rate a symbol must take exactly 256 cycles.
module zero_padding_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, out_first;
  logic signed [3:0] in_i = '0, in_q = '0, out_i, out_q;
  logic full_rate = 1'b0;

  zero_padding dut (.clk, .rst_n, .in_valid, .in_ready, .in_i, .in_q,
                    .out_valid, .out_ready, .out_i, .out_q, .out_first);

  logic [7:0] sent[$];     // {i, q} of accepted data points
  int m = 0;               // output carrier index, k = m - 128
  int sym = 0, cyc = 0, sym_start = 0;
  logic acc = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at m=%0d", what, m);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    acc <= in_valid && in_ready;
    if (in_valid && in_ready) sent.push_back({in_i, in_q});
    if (out_valid && out_ready) begin
      int k;
      k = m - 128;
      check(out_first == (m == 0), "out_first");
      if (k >= -96 && k <= 96 && k != 0) begin
        logic [7:0] e;
        e = (sent.size() > 0) ? sent.pop_front() : 8'hxx;
        check({out_i, out_q} == e, "data carrier");
      end else begin
        check(out_i == 0 && out_q == 0, "zero carrier");
      end
      if (m == 0) sym_start = cyc;
      if (m == 255 && full_rate) check(cyc - sym_start == 255, "256 cycles per symbol");
      m = (m + 1) % 256;
      if (m == 0) sym++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    out_ready = full_rate || ($urandom_range(0, 3) != 0);
    if (!in_valid || acc) begin
      in_valid = full_rate || ($urandom_range(0, 3) != 0);
      in_i = 4'($urandom);
      in_q = 4'($urandom);
    end
  end

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (sym == 4);
    @(negedge clk);
    full_rate = 1'b1;
    wait (sym == 8);
    @(posedge clk);
    check(sent.size() <= 1, "no data left behind");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
