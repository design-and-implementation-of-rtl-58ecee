// Self-checking testbench of mapper: every symbol value of BPSK, QPSK,
// 16-QAM (default parameters) and 64-QAM is mapped and compared with
// explicit per-axis Gray tables (BPSK/QPSK: 0 -> -1, 1 -> +1; 16-QAM:
// 00 -3, 01 -1, 11 +1, 10 +3), then random symbols under back-pressure
// check the handshake and the one-cycle latency.
module mapper_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  // per-axis level tables, index = axis bits with the first bit as MSB
  int lv1 [2] = '{-1, 1};
  int lv2 [4] = '{-3, -1, 3, 1};                  // 00 01 10 11
  int lv3 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};    // 000 .. 111

  logic in_valid = 1'b0, out_ready = 1'b1;
  logic [5:0] sym = '0;
  logic r1, r2, r4, r6, v1, v2, v4, v6;
  logic signed [3:0] i1, q1, i2, q2, i4, q4, i6, q6;

  mapper #(.NB(1)) m1 (.clk, .rst_n, .in_valid, .in_ready (r1), .in_sym (sym[0:0]),
    .out_valid (v1), .out_ready, .out_i (i1), .out_q (q1));
  mapper #(.NB(2)) m2 (.clk, .rst_n, .in_valid, .in_ready (r2), .in_sym (sym[1:0]),
    .out_valid (v2), .out_ready, .out_i (i2), .out_q (q2));
  mapper           m4 (.clk, .rst_n, .in_valid, .in_ready (r4), .in_sym (sym[3:0]),
    .out_valid (v4), .out_ready, .out_i (i4), .out_q (q4));
  mapper #(.NB(6)) m6 (.clk, .rst_n, .in_valid, .in_ready (r6), .in_sym (sym[5:0]),
    .out_valid (v6), .out_ready, .out_i (i6), .out_q (q6));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s sym %b", what, sym);
    end
  endtask

  // expected outputs of the symbol held in 'sym'
  task automatic check_outputs(logic [5:0] s);
    check(v1 && v2 && v4 && v6, "valid one cycle after input");
    check(int'(i1) == lv1[s[0]]   && q1 == 0,               "BPSK");
    check(int'(i2) == lv1[s[1]]   && int'(q2) == lv1[s[0]], "QPSK");
    check(int'(i4) == lv2[s[3:2]] && int'(q4) == lv2[s[1:0]], "16-QAM");
    check(int'(i6) == lv3[s[5:3]] && int'(q6) == lv3[s[2:0]], "64-QAM");
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [5:0] held;
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // exhaustive, one symbol per cycle
    for (int s = 0; s < 64; s++) begin
      in_valid = 1'b1;
      sym = 6'(s);
      @(negedge clk);
      check_outputs(6'(s));
    end
    in_valid = 1'b0;
    @(negedge clk);
    check(!v4, "valid drops without input");
    // back-pressure: output must hold while out_ready is low
    n = 0;
    repeat (2000) begin
      in_valid  = 1'b1;
      sym       = 6'($urandom);
      held      = sym;
      out_ready = 1'b0;
      @(negedge clk);
      repeat ($urandom_range(0, 3)) begin
        check(!r4, "in_ready low while output is held");
        sym = 6'($urandom);            // not accepted
        @(negedge clk);
      end
      in_valid = 1'b0;
      check_outputs(held);
      out_ready = 1'b1;
      @(negedge clk);
      n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
