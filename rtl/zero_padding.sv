// Zero padding: spreads the ND data points of one OFDM symbol over NFFT
// subcarriers and fills the rest with zeros.
//
// The output is the complete NFFT-point frequency vector in subcarrier
// order k = -NFFT/2 .. NFFT/2-1. Data point d goes to subcarrier
// k = d - ND/2 for d < ND/2 (negative frequencies) and k = d - ND/2 + 1
// otherwise, so the data occupy k = -ND/2..-1 and 1..ND/2; DC (k = 0) and
// the band edges stay zero. With NFFT = 256 and ND = 192 there are 32 zero
// carriers below and 31 above the data and one at DC. Zeros are inserted on
// the fly, so nothing is buffered: out_first marks subcarrier -NFFT/2.
//
// Interface: valid/ready in (one data point per beat) and out (one
// subcarrier per beat), combinational pass-through of the handshake while a
// data carrier is sent, one zero per cycle otherwise.
//
// The stage itself appears in the transmitter's block diagram; its sizes
// and carrier layout are this design's choice (ND = 192 matches one
// interleaver block of mapped points, NFFT = 256 the IEEE 802.16 OFDM
// symbol). Pilot carriers are not inserted.
module zero_padding #(
  parameter int unsigned NFFT = 256,
  parameter int unsigned ND   = 192,
  parameter int unsigned DW   = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q,
  output logic                 out_first
);

  localparam int unsigned KW = $clog2(NFFT);
  localparam int unsigned LO = NFFT / 2 - ND / 2;        // first data index
  localparam int unsigned HI = NFFT / 2 + ND / 2;        // last data index

  logic [KW-1:0] m;          // output index, subcarrier k = m - NFFT/2
  logic          is_data;

  assign is_data   = (m >= KW'(LO)) && (m <= KW'(HI)) && (m != KW'(NFFT / 2));
  assign out_valid = is_data ? in_valid : 1'b1;
  assign in_ready  = is_data && out_ready;
  assign out_i     = is_data ? in_i : '0;
  assign out_q     = is_data ? in_q : '0;
  assign out_first = m == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      m <= '0;
    else if (out_valid && out_ready) m <= (m == KW'(NFFT - 1)) ? '0 : m + KW'(1);
  end

  initial a_fit: assert (ND % 2 == 0 && ND < NFFT && HI < NFFT);

endmodule
