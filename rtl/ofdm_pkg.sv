// Shared constants and helpers of the IEEE 802.16 transmitter FEC chain.
//
// The interleaver geometry follows the buffer description: every bit
// plane (one per coded bit of a mapper symbol) has its own RAM of
// 2 x ILV_HALF = 384 bits, used as two ping-pong halves of 192 bits.
// ILV_COLS is the number of columns of the interleaving matrix; it is
// derived from the read-address increments of 6 (QPSK, two RAMs) and
// 3 (16-QAM, four RAMs), i.e. COLS = increment x number of RAMs = 12.
// The OFDM sizes (256-point IFFT, 192 data carriers, 1/4 prefix) are
// IEEE 802.16 values chosen for the back end of the chain.
// The puncturing patterns are rows of an n x p matrix (row = encoder
// output, column = input bit time); a 1 keeps the bit, a 0 deletes it.
package ofdm_pkg;

  // Bits written per RAM half (one interleaver block per RAM).
  localparam int unsigned ILV_HALF = 192;
  // Columns of the interleaving matrix (row-wise write, column-wise read).
  localparam int unsigned ILV_COLS = 12;

  // Rate-1/2 mother code G = [1+D^2, 1+D+D^2]; bit j of a generator is the
  // tap on the input delayed by j cycles. Generator i sits at [i*K +: K].
  localparam int unsigned CC_N = 2;
  localparam int unsigned CC_K = 3;
  localparam logic [CC_N*CC_K-1:0] CC_GENS = {3'b111, 3'b101};

  // Rate 3/4 puncturing of the rate-1/2 code: X = 1 0 1, Y = 1 1 0
  // (period 3). Bit (i*P + j) is row i (encoder output i), column j.
  localparam int unsigned PUNC_P_34 = 3;
  localparam logic [CC_N*PUNC_P_34-1:0] PUNC_34 = {3'b011, 3'b101};

  // OFDM symbol: one interleaver block of ILV_HALF mapped points fills the
  // data carriers of one NFFT-point symbol; cyclic prefix of NFFT/4.
  localparam int unsigned OFDM_NFFT = 256;
  localparam int unsigned OFDM_ND   = ILV_HALF;
  localparam int unsigned OFDM_NCP  = OFDM_NFFT / 4;
  // Word lengths: mapped levels, IFFT twiddles, time samples.
  localparam int unsigned MAP_DW = 4;
  localparam int unsigned IFFT_TW = 12;
  localparam int unsigned IFFT_OW = 16;

  // Code rate of a mapping: BPSK is sent at rate 1/2 (no puncturing),
  // QPSK, 16-QAM and 64-QAM at rate 3/4.
  function automatic bit uses_puncturing(int unsigned nbpsc);
    return nbpsc != 1;
  endfunction

endpackage
