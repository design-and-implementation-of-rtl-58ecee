// FEC and mapping front end of an IEEE 802.16 OFDM transmitter.
//
// Data bits pass through a convolutional encoder (rate 1/2,
// G = [1+D^2, 1+D+D^2], constraint length 3, zero tail after in_last),
// a puncturer (rate 3/4 for QPSK, 16-QAM and 64-QAM; all bits kept for
// BPSK), the double-buffered block interleaver (NBPSC RAMs of 384 bits,
// row-wise write, column-wise read, one NBPSC-bit symbol per read) and the
// constellation mapper, then through the OFDM back end: zero padding of
// the 192 points of each interleaver block onto a 256-carrier symbol, a
// 256-point inverse DFT and a 64-sample cyclic prefix. Time-domain I/Q
// samples leave on out_*, 320 per OFDM symbol. The symbol generator of
// the block diagram (between mapper and zero padding) is not included:
// its function is not defined, and the mapper feeds the zero padding
// directly.
//
// NBPSC selects the mapping at build time: 1 BPSK, 2 QPSK, 4 16-QAM
// (default), 6 64-QAM. One interleaver block carries NBPSC*192 coded bits,
// i.e. 192 mapped points; with rate 3/4 that is NBPSC*144 encoder steps
// (data bits plus the two tail bits), with BPSK 96.
//
// Interface: valid/ready stream of data bits in (in_last marks the last
// bit of a frame and triggers the zero tail), valid/ready stream of time
// samples out (out_first marks the first prefix sample of a symbol). The
// serial IFFT needs about 66 000 cycles per symbol, so it sets the
// throughput and holds the chain back through the handshakes. The block-done pulses, the stall flag and the write/read
// halves of the interleaver, and a pulse on the last coded bit of a frame
// (coded_last) are brought out for observation.
//
// The chain order and the per-modulation code rates are the document's;
// the streaming handshakes between stages and the OFDM sizes are this
// design's.
module ofdm_tx #(
  parameter int unsigned NBPSC = 4,
  parameter int unsigned DW    = ofdm_pkg::MAP_DW,
  parameter int unsigned OW    = ofdm_pkg::IFFT_OW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic                 in_bit,
  input  logic                 in_last,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [OW-1:0] out_i,
  output logic signed [OW-1:0] out_q,
  output logic                 out_first,
  output logic                 ilv_wr_block_done,
  output logic                 ilv_rd_block_done,
  output logic                 ilv_stalled,
  output logic                 ilv_wr_half,
  output logic                 ilv_rd_half,
  output logic                 coded_last
);

  import ofdm_pkg::*;

  localparam bit          PUNCT = uses_puncturing(NBPSC);
  localparam int unsigned PP    = PUNCT ? PUNC_P_34 : 1;
  localparam logic [CC_N*PP-1:0] PPAT = PUNCT ? (CC_N*PP)'(PUNC_34)
                                              : {(CC_N*PP){1'b1}};

  logic            enc_valid, enc_ready, enc_last;
  logic [CC_N-1:0] enc_bits;
  logic            pun_valid, pun_ready, pun_bit, pun_last;
  logic            ilv_valid, ilv_ready;
  logic            map_valid, map_ready, zp_valid, zp_ready, zp_first;
  logic signed [DW-1:0] map_i, map_q, zp_i, zp_q;
  logic            td_valid, td_ready, td_first;
  logic signed [OW-1:0] td_i, td_q;
  logic [NBPSC-1:0] ilv_sym;

  conv_encoder #(.N(CC_N), .K(CC_K), .GENS(CC_GENS)) u_enc (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_bit, .in_last,
    .out_valid (enc_valid), .out_ready (enc_ready),
    .out_bits  (enc_bits),  .out_last  (enc_last)
  );

  puncturer #(.N(CC_N), .P(PP), .PATTERN(PPAT)) u_punc (
    .clk, .rst_n,
    .in_valid  (enc_valid), .in_ready (enc_ready),
    .in_bits   (enc_bits),  .in_last  (enc_last),
    .out_valid (pun_valid), .out_ready (pun_ready),
    .out_bit   (pun_bit),   .out_last (pun_last)
  );

  interleaver #(.NB(NBPSC)) u_ilv (
    .clk, .rst_n,
    .in_valid  (pun_valid), .in_ready (pun_ready), .in_bit (pun_bit),
    .out_valid (ilv_valid), .out_ready (ilv_ready), .out_sym (ilv_sym),
    .wr_block_done (ilv_wr_block_done),
    .rd_block_done (ilv_rd_block_done),
    .stalled       (ilv_stalled),
    .wr_half       (ilv_wr_half),
    .rd_half       (ilv_rd_half)
  );

  // last coded bit of a frame entering the interleaver
  assign coded_last = pun_valid && pun_ready && pun_last;

  mapper #(.NB(NBPSC), .DW(DW)) u_map (
    .clk, .rst_n,
    .in_valid  (ilv_valid), .in_ready (ilv_ready), .in_sym (ilv_sym),
    .out_valid (map_valid), .out_ready (map_ready), .out_i (map_i), .out_q (map_q)
  );

  zero_padding #(.NFFT(OFDM_NFFT), .ND(OFDM_ND), .DW(DW)) u_zp (
    .clk, .rst_n,
    .in_valid  (map_valid), .in_ready  (map_ready), .in_i (map_i), .in_q (map_q),
    .out_valid (zp_valid),  .out_ready (zp_ready),  .out_i (zp_i), .out_q (zp_q),
    .out_first (zp_first)
  );

  ifft #(.NFFT(OFDM_NFFT), .DW(DW), .TW(IFFT_TW), .OW(OW)) u_ifft (
    .clk, .rst_n,
    .in_valid  (zp_valid), .in_ready  (zp_ready), .in_i (zp_i), .in_q (zp_q),
    .in_first  (zp_first),
    .out_valid (td_valid), .out_ready (td_ready), .out_i (td_i), .out_q (td_q),
    .out_first (td_first)
  );

  cyclic_prefix #(.NSYM(OFDM_NFFT), .NCP(OFDM_NCP), .DW(OW)) u_cp (
    .clk, .rst_n,
    .in_valid  (td_valid), .in_ready (td_ready), .in_i (td_i), .in_q (td_q),
    .in_first  (td_first),
    .out_valid, .out_ready, .out_i, .out_q, .out_first
  );

endmodule
