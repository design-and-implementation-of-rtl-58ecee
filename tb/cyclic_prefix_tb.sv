// Self-checking testbench of cyclic_prefix (256-sample symbols, 64-sample
// prefix): random symbols under random back-pressure; each output symbol
// must be the last 64 input samples followed by all 256, with out_first
// on the first prefix sample.
module cyclic_prefix_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  logic in_valid = 1'b0, in_ready, in_first = 1'b0, out_valid, out_ready = 1'b0, out_first;
  logic signed [15:0] in_i = '0, in_q = '0, out_i, out_q;

  cyclic_prefix dut (.clk, .rst_n, .in_valid, .in_ready, .in_i, .in_q, .in_first,
                     .out_valid, .out_ready, .out_i, .out_q, .out_first);

  logic [31:0] symq[$];    // accepted samples
  int idx = 0;             // input sample index
  int oc = 0;              // output index within a symbol
  int syms = 0;
  logic acc = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at oc=%0d", what, oc);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    acc <= in_valid && in_ready;
    if (in_valid && in_ready) begin
      symq.push_back({in_i, in_q});
      idx = (idx + 1) % 256;
    end
    if (out_valid && out_ready) begin
      int s;
      s = (oc < 64) ? 192 + oc : oc - 64;
      check(symq.size() >= 256 && {out_i, out_q} == symq[s], "sample");
      check(out_first == (oc == 0), "out_first");
      oc++;
      if (oc == 320) begin
        oc = 0;
        syms++;
        for (int i = 0; i < 256; i++) void'(symq.pop_front());
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    out_ready = ($urandom_range(0, 3) != 0);
    if (!in_valid || acc) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_i     = 16'($urandom);
      in_q     = 16'($urandom);
      in_first = (idx == 0);
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
    wait (syms == 10);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
