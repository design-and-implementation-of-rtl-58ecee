// Stimulus and checker for one puncturer instance (used by puncturer_tb).
//
// Drives random coded groups with random valid gaps, random frame ends
// and random output back-pressure, predicts the kept bits from the
// puncturing matrix and compares them in order, including the out_last
// marker. While full_rate is high the input is always valid and the output
// always ready, and every cycle after the first must carry an output bit.
module puncturer_chk #(
  parameter int unsigned N = 2,
  parameter int unsigned P = 3,
  parameter logic [N*P-1:0] PATTERN = '1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic full_rate,
  output int   checks,
  output int   failures,
  output int   kept,
  output int   deleted,
  output int   frames,
  output int   pending
);
  logic         in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [N-1:0] in_bits = '0;
  logic         out_valid, out_ready = 1'b0, out_bit, out_last;

  puncturer #(.N(N), .P(P), .PATTERN(PATTERN)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_bits, .in_last,
    .out_valid, .out_ready, .out_bit, .out_last);

  logic [1:0] expq[$];   // {last, bit}
  logic acc = 1'b0;      // input accepted at the last clock edge
  always @(posedge clk) begin
    acc     <= in_valid && in_ready;
    pending <= expq.size();
  end
  int col = 0;
  int fr_cycles = 0;

  initial begin
    checks = 0; failures = 0; kept = 0; deleted = 0; frames = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      int nk, cnt;
      nk = 0;
      for (int i = 0; i < N; i++) nk += PATTERN[i*P + col];
      cnt = 0;
      for (int i = 0; i < N; i++) begin
        if (PATTERN[i*P + col]) begin
          cnt++;
          expq.push_back({in_last && cnt == nk, in_bits[i]});
          kept++;
        end else begin
          deleted++;
        end
      end
      if (in_last) frames++;
      col = (in_last || col == P - 1) ? 0 : col + 1;
    end
    if (out_valid && out_ready) begin
      logic [1:0] e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL N=%0d P=%0d unexpected output", N, P);
      end else begin
        e = expq.pop_front();
        if ({out_last, out_bit} !== e) begin
          failures++;
          $display("FAIL N=%0d P=%0d got %b exp %b", N, P, {out_last, out_bit}, e);
        end
      end
    end
    if (full_rate) begin
      fr_cycles++;
      if (fr_cycles > 2) begin
        checks++;
        if (!out_valid) begin
          failures++;
          $display("FAIL N=%0d P=%0d bubble at full rate", N, P);
        end
      end
    end else begin
      fr_cycles = 0;
    end
  end

  always @(negedge clk) begin
    if (full_rate) begin
      out_ready = 1'b1;
      if (!in_valid || acc) begin
        in_valid = 1'b1;
        in_bits  = N'($urandom);
        in_last  = 1'b0;
      end
    end else begin
      out_ready = ($urandom_range(0, 3) != 0);
      // a new group only after the previous one was accepted
      if (!in_valid || acc) begin
        in_valid = ($urandom_range(0, 3) != 0);
        in_bits  = N'($urandom);
        in_last  = ($urandom_range(0, 15) == 0);
      end
    end
  end
endmodule
