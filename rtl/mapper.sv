// Constellation mapper for BPSK, QPSK, 16-QAM and 64-QAM.
//
// An NB-bit symbol (out_sym[NB-1] = first bit b0) is mapped to integer
// constellation levels. BPSK puts b0 on I (0 -> -1, 1 -> +1) and Q = 0.
// For NB = 2, 4, 6 the first NB/2 bits select the I level and the last
// NB/2 bits the Q level, each as a Gray-coded PAM of M = 2^(NB/2) levels:
// level = 2*gray_to_binary(bits) - (M - 1), e.g. for 16-QAM 00 -> -3,
// 01 -> -1, 11 -> +1, 10 -> +3. No power normalisation is applied; the
// levels are odd integers in DW-bit two's complement.
//
// Interface: valid/ready in and out, output registered (one cycle of
// latency, one symbol per cycle).
//
// The document names the mapping stage and the modulation schemes; the
// Gray bit-to-level rule and the integer output format are this design's.
module mapper #(
  parameter int unsigned NB = 4,
  parameter int unsigned DW = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [NB-1:0]        in_sym,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q
);

  localparam int unsigned M = (NB > 1) ? NB / 2 : 1;   // bits per axis

  // Gray-coded PAM level of the M bits g (g[M-1] is the first bit).
  function automatic logic signed [DW-1:0] pam(logic [M-1:0] g);
    logic [M-1:0] b;
    b[M-1] = g[M-1];
    for (int i = M - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return DW'(2 * int'(b)) - DW'((1 << M) - 1);
  endfunction

  logic signed [DW-1:0] lvl_i, lvl_q;

  always_comb begin
    if (NB == 1) begin
      lvl_i = pam(M'(in_sym[NB-1]));
      lvl_q = '0;
    end else begin
      lvl_i = pam(in_sym[NB-1 -: M]);
      lvl_q = pam(in_sym[M-1:0]);
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i <= lvl_i;
        out_q <= lvl_q;
      end
    end
  end

  initial a_nb: assert (NB == 1 || NB == 2 || NB == 4 || NB == 6);

endmodule
