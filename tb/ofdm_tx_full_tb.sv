// Full-size testbench of ofdm_tx: the transmitter with all parameters at
// their defaults (16-QAM, rate 3/4, four 384-bit interleaver RAMs) carries
// random frames through 20 complete interleaver blocks (3840 I/Q points),
// every point checked by ofdm_tx_chk against an independent chain model.
module ofdm_tx_full_tb;
  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks, failures;
  logic rst_n, in_valid, in_ready, in_bit, in_last, out_valid, out_ready;
  logic signed [15:0] out_i, out_q;
  logic out_first;
  logic wrd, rdd, stl, wh, rh, cl, done;

  ofdm_tx u_dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_bit, .in_last,
    .out_valid, .out_ready, .out_i, .out_q, .out_first,
    .ilv_wr_block_done (wrd), .ilv_rd_block_done (rdd), .ilv_stalled (stl),
    .ilv_wr_half (wh), .ilv_rd_half (rh), .coded_last (cl));

  ofdm_tx_chk #(.NBPSC(4), .BLOCKS(20)) u_chk (
    .clk, .rst_n, .in_valid, .in_ready, .in_bit, .in_last,
    .out_valid, .out_ready, .out_i, .out_q, .out_first,
    .ilv_wr_block_done (wrd), .ilv_rd_block_done (rdd), .ilv_stalled (stl),
    .ilv_wr_half (wh), .ilv_rd_half (rh), .coded_last (cl),
    .checks, .failures, .done);

  initial begin
    #300000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
