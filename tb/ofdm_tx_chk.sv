// Stimulus, reference model and checker of the transmitter (used by
// ofdm_tx_tb and ofdm_tx_full_tb). It is connected to the ports of an
// ofdm_tx instance built for NBPSC bits per symbol.
//
// Stimulus: frames of random data bits with random lengths, random input
// gaps and random output back-pressure, with one phase in which the
// output is stopped long enough to fill both interleaver halves.
// Model, written from the chain's definition rather than the RTL: encoder
// x = m1+m-1, y = m1+m0+m-1 with two zero tail steps per frame; rate 3/4
// puncturing keeps X1 Y1 Y2 X3 (pattern restarting with each frame), BPSK
// keeps everything; each block of NBPSC*192 coded bits is permuted (output
// bit j = c*ROWS + r takes input bit r*12 + c) and mapped with Gray tables;
// the 192 points are placed on carriers -96..-1, 1..96, transformed by an
// integer inverse DFT (twiddles round(2047*cos/sin), sum shifted right by
// 8) and given a 64-sample cyclic prefix. Every output sample is compared. Mechanism counters: frame tails,
// deleted bits, frames ending off the puncturing period, cycles in which
// the interleaver writes and reads together, blocks read from each half,
// and stall cycles. A mechanism that never happens counts as a failure.
module ofdm_tx_chk #(
  parameter int unsigned NBPSC  = 4,
  parameter int unsigned BLOCKS = 12       // complete blocks to check
) (
  input  logic              clk,
  output logic              rst_n,
  output logic              in_valid,
  input  logic              in_ready,
  output logic              in_bit,
  output logic              in_last,
  input  logic              out_valid,
  output logic              out_ready,
  input  logic signed [15:0] out_i,
  input  logic signed [15:0] out_q,
  input  logic              out_first,
  input  logic              ilv_wr_block_done,
  input  logic              ilv_rd_block_done,
  input  logic              ilv_stalled,
  input  logic              ilv_wr_half,
  input  logic              ilv_rd_half,
  input  logic              coded_last,
  output int                checks,
  output int                failures,
  output logic              done
);
  localparam int unsigned BLK  = NBPSC * 192;
  localparam int unsigned ROWS = BLK / 12;
  localparam int unsigned M    = (NBPSC > 1) ? NBPSC / 2 : 1;
  localparam bit          PUNCT = NBPSC != 1;

  int lv1 [2] = '{-1, 1};
  int lv2 [4] = '{-3, -1, 3, 1};
  int lv3 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};

  // model state
  logic m0 = 1'b0, mm1 = 1'b0;
  int   pcol = 0;
  logic coded[$];
  int   pt_i[$], pt_q[$];      // mapped points of the current symbol
  int   exp_i[$], exp_q[$];    // expected time samples
  int   ctab[256], stab[256];
  int   samples = 0;
  // mechanism counters
  int tails = 0, deleted = 0, restarts = 0, overlap = 0, stalls = 0;
  int half_rd[2] = '{0, 0};
  int coded_frames = 0, points = 0;   // points = whole symbols x 192
  logic acc = 1'b0;
  int   frame_left = 0;   // data bits of the current frame still to send
  logic stop_out = 1'b0, stop_in = 1'b0;

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    rst_n = 1'b0; in_valid = 1'b0; in_bit = 1'b0; in_last = 1'b0; out_ready = 1'b0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL NBPSC=%0d %s", NBPSC, what);
    end
  endtask

  function automatic int pam(int bits, int m);
    return (m == 1) ? lv1[bits] : (m == 2) ? lv2[bits] : lv3[bits];
  endfunction

  task automatic enc_step(logic m1);
    logic x, y;
    x = m1 ^ mm1;
    y = m1 ^ m0 ^ mm1;
    mm1 = m0;
    m0  = m1;
    if (!PUNCT || pcol == 0) begin
      coded.push_back(x); coded.push_back(y);
    end else if (pcol == 1) begin
      coded.push_back(y); deleted++;
    end else begin
      coded.push_back(x); deleted++;
    end
    if (PUNCT) pcol = (pcol == 2) ? 0 : pcol + 1;
  endtask

  task automatic make_block();
    logic b [BLK];
    for (int j = 0; j < BLK; j++) b[j] = coded[(j % ROWS) * 12 + j / ROWS];
    for (int t = 0; t < 192; t++) begin
      int vi, vq;
      vi = 0; vq = 0;
      if (NBPSC == 1) begin
        pt_i.push_back(lv1[b[t]]);
        pt_q.push_back(0);
      end else begin
        for (int i = 0; i < M; i++) vi = vi * 2 + int'(b[t*NBPSC + i]);
        for (int i = 0; i < M; i++) vq = vq * 2 + int'(b[t*NBPSC + M + i]);
        pt_i.push_back(pam(vi, M));
        pt_q.push_back(pam(vq, M));
      end
    end
    for (int j = 0; j < BLK; j++) void'(coded.pop_front());
    make_symbol();
  endtask

  // 192 points on carriers -96..-1, 1..96 of a 256-point symbol, inverse
  // DFT with 12-bit rounded twiddles and a right shift by 8, then the last
  // 64 samples repeated in front
  task automatic make_symbol();
    int xr[256], xi[256];
    int yr[256], yi[256];
    for (int k = 0; k < 256; k++) begin
      xr[k] = 0; xi[k] = 0;
    end
    for (int d = 0; d < 192; d++) begin
      int k;
      k = (d < 96) ? d - 96 : d - 95;
      xr[(k + 256) % 256] = pt_i[d];
      xi[(k + 256) % 256] = pt_q[d];
    end
    for (int n = 0; n < 256; n++) begin
      longint sr, si;
      sr = 0; si = 0;
      for (int k = 0; k < 256; k++) begin
        sr += xr[k] * ctab[(k * n) % 256] - xi[k] * stab[(k * n) % 256];
        si += xr[k] * stab[(k * n) % 256] + xi[k] * ctab[(k * n) % 256];
      end
      yr[n] = int'(sr >>> 8);
      yi[n] = int'(si >>> 8);
    end
    for (int m = 0; m < 320; m++) begin
      exp_i.push_back(yr[(m + 192) % 256]);
      exp_q.push_back(yi[(m + 192) % 256]);
    end
    for (int d = 0; d < 192; d++) begin
      void'(pt_i.pop_front());
      void'(pt_q.pop_front());
    end
  endtask

  function automatic int rnd(real x);
    return $rtoi(x + ((x >= 0.0) ? 0.5 : -0.5));
  endfunction

  initial
    for (int t = 0; t < 256; t++) begin
      ctab[t] = rnd($cos(2.0 * 3.141592653589793 * t / 256) * 2047.0);
      stab[t] = rnd($sin(2.0 * 3.141592653589793 * t / 256) * 2047.0);
    end

  always @(posedge clk) if (rst_n) begin
    acc <= in_valid && in_ready;
    if (in_valid && in_ready) begin
      frame_left--;
      enc_step(in_bit);
      if (in_last) begin
        enc_step(1'b0);
        enc_step(1'b0);
        tails++;
        if (PUNCT && pcol != 0) restarts++;
        pcol = 0;
      end
      if (coded.size() >= BLK) make_block();
    end
    if (coded_last) coded_frames++;
    if (ilv_rd_block_done) half_rd[!ilv_rd_half]++;   // half just left
    if (ilv_stalled) stalls++;
    if (in_valid && in_ready && out_valid && out_ready) overlap++;
    if (out_valid && out_ready) begin
      if (exp_i.size() == 0) check(1'b0, "output without a complete block");
      else begin
        int ei, eq;
        ei = exp_i.pop_front();
        eq = exp_q.pop_front();
        check(int'(out_i) == ei && int'(out_q) == eq, "time sample");
        check(out_first == (samples % 320 == 0), "symbol start");
      end
      samples++;
      if (samples % 320 == 0) points += 192;
    end
  end

  // stimulus
  always @(negedge clk) if (rst_n) begin
    out_ready = stop_out ? 1'b0 : ($urandom_range(0, 4) != 0);
    if (!in_valid || acc) begin
      if (stop_in) begin
        in_valid = 1'b0;
      end else begin
        if (frame_left == 0) frame_left = $urandom_range(1, 300);
        in_valid = ($urandom_range(0, 7) != 0);
        in_bit   = 1'($urandom);
        in_last  = (frame_left == 1);
      end
    end
  end

  initial begin
    int guard;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // random traffic, then the output stopped so both halves fill
    repeat (4 * BLK) @(negedge clk);
    stop_out = 1'b1;
    repeat (4 * BLK) @(negedge clk);
    stop_out = 1'b0;
    // continue until enough blocks were produced, then drain
    guard = 0;
    while (points < BLOCKS * 192 && guard < (BLOCKS + 2) * 90000) begin
      @(negedge clk);
      guard++;
    end
    stop_in = 1'b1;
    guard = 0;
    while (exp_i.size() != 0 && guard < 4 * 90000) begin
      @(negedge clk);
      guard++;
    end
    check(points >= BLOCKS * 192, "enough output points");
    check(exp_i.size() == 0 && samples % 320 == 0, "every complete block came out");
    check(tails > 0 && coded_frames == tails, "frame tails");
    check(!PUNCT || deleted > 0, "punctured bits");
    check(!PUNCT || restarts > 0, "puncturing restart at frame end");
    check(overlap > 0, "interleaver writes while reading");
    check(half_rd[0] > 0 && half_rd[1] > 0, "both buffer halves read");
    check(stalls > 0, "writer stalled on full buffers");
    $display("NBPSC=%0d: OFDM symbols %0d, points %0d, frames %0d, deleted bits %0d, restarts %0d, overlap cycles %0d, blocks from halves %0d/%0d, stall cycles %0d",
             NBPSC, samples / 320, points, tails, deleted, restarts, overlap, half_rd[0], half_rd[1], stalls);
    done = 1'b1;
  end
endmodule
