// Self-checking testbench of ifft (NFFT = 256). Each symbol of random
// 4-bit points (plus one single-tone symbol) is transformed and every
// output sample is compared twice: exactly, with an integer model that
// rounds cos/sin(2*pi*t/256) to 12 bits and shifts the sum right by 8, and
// approximately (within 6 LSB) with a floating-point inverse DFT scaled by
// 2047. With the output always taken a symbol must take 256 load cycles
// plus 256*257 compute and output cycles.
module ifft_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  localparam int N = 256;
  localparam real PI = 3.141592653589793;
  int checks = 0, failures = 0;

  logic in_valid = 1'b0, in_first = 1'b0, in_ready, out_valid, out_ready = 1'b1, out_first;
  logic signed [3:0] in_i = '0, in_q = '0;
  logic signed [15:0] out_i, out_q;

  ifft dut (.clk, .rst_n, .in_valid, .in_ready, .in_i, .in_q, .in_first,
            .out_valid, .out_ready, .out_i, .out_q, .out_first);

  int xr [N], xi [N];         // frequency points by bin
  int ctab [N], stab [N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int rnd(real x);
    return $rtoi(x + ((x >= 0.0) ? 0.5 : -0.5));
  endfunction

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic run_symbol(int kind, bit random_ready);
    int t0, t1;
    // load in subcarrier order -128 .. 127
    t0 = int'($time / 10);
    for (int m = 0; m < N; m++) begin
      int k, b;
      k = m - N / 2;
      b = (k + N) % N;
      if (kind == 0) begin
        xr[b] = $urandom_range(0, 15) - 8;
        xi[b] = $urandom_range(0, 15) - 8;
      end else begin
        xr[b] = (k == 5) ? 7 : 0;
        xi[b] = (k == 5) ? -3 : 0;
      end
      in_valid = 1'b1;
      in_i = 4'(xr[b]);
      in_q = 4'(xi[b]);
      in_first = (m == 0);
      check(in_ready, "ready to load");
      @(negedge clk);
    end
    in_valid = 1'b0;
    for (int n = 0; n < N; n++) begin
      longint sr, si, er, ei;
      real rr, ri;
      out_ready = random_ready ? ($urandom_range(0, 1) == 1) : 1'b1;
      while (!(out_valid && out_ready)) begin
        @(negedge clk);
        out_ready = random_ready ? ($urandom_range(0, 1) == 1) : 1'b1;
      end
      sr = 0; si = 0; rr = 0.0; ri = 0.0;
      for (int k = 0; k < N; k++) begin
        int t;
        t = (k * n) % N;
        sr += xr[k] * ctab[t] - xi[k] * stab[t];
        si += xr[k] * stab[t] + xi[k] * ctab[t];
        rr += xr[k] * $cos(2.0 * PI * k * n / N) - xi[k] * $sin(2.0 * PI * k * n / N);
        ri += xr[k] * $sin(2.0 * PI * k * n / N) + xi[k] * $cos(2.0 * PI * k * n / N);
      end
      er = sr >>> 8;
      ei = si >>> 8;
      check(out_i == 16'(er) && out_q == 16'(ei), "exact sample");
      check(int'(out_i) - rnd(rr * 2047.0 / N) <= 6 && rnd(rr * 2047.0 / N) - int'(out_i) <= 6 &&
            int'(out_q) - rnd(ri * 2047.0 / N) <= 6 && rnd(ri * 2047.0 / N) - int'(out_q) <= 6,
            "float sample");
      check(out_first == (n == 0), "out_first");
      @(negedge clk);
    end
    t1 = int'($time / 10);
    if (!random_ready) check(t1 - t0 == N + N * (N + 1), "cycles per symbol");
  endtask

  initial begin
    for (int t = 0; t < N; t++) begin
      ctab[t] = rnd($cos(2.0 * PI * t / N) * 2047.0);
      stab[t] = rnd($sin(2.0 * PI * t / N) * 2047.0);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_symbol(1, 1'b0);
    run_symbol(0, 1'b0);
    run_symbol(0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
