// End-to-end testbench of ofdm_tx: the BPSK, QPSK and 16-QAM builds of the
// transmitter run side by side, each driven and checked point by point by
// ofdm_tx_chk against an independent model of the whole chain (encoder
// with zero tail, puncturing, block interleaving, Gray mapping).
module ofdm_tx_tb;
  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  for (genvar g = 0; g < 3; g++) begin : g_mod
    localparam int unsigned NB = (g == 0) ? 1 : (g == 1) ? 2 : 4;
    logic rst_n, in_valid, in_ready, in_bit, in_last, out_valid, out_ready;
    logic signed [15:0] out_i, out_q;
    logic out_first;
    logic wrd, rdd, stl, wh, rh, cl, done;
    int   c, f;

    ofdm_tx #(.NBPSC(NB)) u_dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_bit, .in_last,
      .out_valid, .out_ready, .out_i, .out_q, .out_first,
      .ilv_wr_block_done (wrd), .ilv_rd_block_done (rdd), .ilv_stalled (stl),
      .ilv_wr_half (wh), .ilv_rd_half (rh), .coded_last (cl));

    ofdm_tx_chk #(.NBPSC(NB), .BLOCKS(4)) u_chk (
      .clk, .rst_n, .in_valid, .in_ready, .in_bit, .in_last,
      .out_valid, .out_ready, .out_i, .out_q, .out_first,
      .ilv_wr_block_done (wrd), .ilv_rd_block_done (rdd), .ilv_stalled (stl),
      .ilv_wr_half (wh), .ilv_rd_half (rh), .coded_last (cl),
      .checks (c), .failures (f), .done);
  end

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (g_mod[0].done && g_mod[1].done && g_mod[2].done);
    @(negedge clk);
    checks   = g_mod[0].c + g_mod[1].c + g_mod[2].c;
    failures = g_mod[0].f + g_mod[1].f + g_mod[2].f;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
