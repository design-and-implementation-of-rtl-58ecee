// Self-checking testbench of conv_encoder.
//
// Two encoders share one input stream: the transmitter's rate-1/2 code
// G = [1+D^2, 1+D+D^2] (default parameters) and the rate-1/3 code with
// G1 = (1,1,1), G2 = (0,1,1), G3 = (1,0,1). A reference model written from
// the output equations (n1 = m1+m0+m-1, n2 = m0+m-1, n3 = m1+m-1; x = m1+m-1,
// y = m1+m0+m-1) predicts every coded group, including the two zero-tail
// steps after each frame's last bit. Random valid and ready gaps exercise
// the handshake; a directed phase checks the one-cycle latency.
module conv_encoder_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  logic in_valid = 1'b0, in_bit = 1'b0, in_last = 1'b0, out_ready = 1'b0;
  logic in_ready2, in_ready3, ov2, ov3, ol2, ol3;
  logic [1:0] ob2;
  logic [2:0] ob3;

  conv_encoder dut2 (
    .clk, .rst_n, .in_valid, .in_ready (in_ready2), .in_bit, .in_last,
    .out_valid (ov2), .out_ready, .out_bits (ob2), .out_last (ol2));

  conv_encoder #(.N(3), .K(3), .GENS({3'b101, 3'b110, 3'b111})) dut3 (
    .clk, .rst_n, .in_valid, .in_ready (in_ready3), .in_bit, .in_last,
    .out_valid (ov3), .out_ready, .out_bits (ob3), .out_last (ol3));

  // input accepted at the last clock edge
  logic acc = 1'b0;
  always @(posedge clk) acc <= in_valid && in_ready2;

  // reference model
  logic m0 = 1'b0, mm1 = 1'b0;      // m0, m-1
  logic [5:0] expq[$];              // {last, n3, n2, n1, y, x}
  int tails = 0;

  function automatic logic [4:0] ref_out(logic m1, logic a, logic b);
    logic x, y, n1, n2, n3;
    x  = m1 ^ b;
    y  = m1 ^ a ^ b;
    n1 = m1 ^ a ^ b;
    n2 = a ^ b;
    n3 = m1 ^ b;
    return {n3, n2, n1, y, x};
  endfunction

  task automatic model_step(logic m1, logic last);
    expq.push_back({last, ref_out(m1, m0, mm1)});
    mm1 = m0;
    m0  = m1;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_ready2 !== in_ready3) begin
      failures++;
      $display("FAIL in_ready mismatch");
    end
    if (in_valid && in_ready2) begin
      model_step(in_bit, 1'b0);
      if (in_last) begin
        model_step(1'b0, 1'b0);
        model_step(1'b0, 1'b1);
        tails++;
      end
    end
    if (ov2 && out_ready) begin
      logic [5:0] e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = expq.pop_front();
        if (ob2 !== e[1:0] || ob3 !== e[4:2] || ol2 !== e[5] || ol3 !== e[5] || !ov3) begin
          failures++;
          $display("FAIL got %b %b last %b exp %b %b last %b", ob2, ob3, ol2, e[1:0], e[4:2], e[5]);
        end
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed: latency of one cycle with out_ready high
    out_ready = 1'b1;
    @(negedge clk);
    in_valid = 1'b1; in_bit = 1'b1; in_last = 1'b0;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!ov2 || ob2 !== 2'b11) begin
      failures++;
      $display("FAIL latency: valid %b bits %b", ov2, ob2);
    end
    // random frames
    for (int f = 0; f < 20; f++) begin
      n = 1 + $urandom_range(0, 40);
      for (int i = 0; i < n; i++) begin
        in_valid = 1'b1;
        in_bit   = 1'($urandom);
        in_last  = (i == n - 1);
        // hold until accepted
        do begin
          out_ready = ($urandom_range(0, 3) != 0);
          @(negedge clk);
        end while (!acc);
        in_valid = 1'b0;
        in_last  = 1'b0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    end
    out_ready = 1'b1;
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0 || tails != 20) begin
      failures++;
      $display("FAIL leftover %0d tails %0d", expq.size(), tails);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
