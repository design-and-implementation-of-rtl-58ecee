// Puncturer: removes coded bits of a rate-1/N code according to an N x P
// puncturing matrix and sends the kept bits out one per cycle.
//
// Each input beat is one group of N coded bits (one encoder step). Column
// j = (group index mod P) of the matrix says which of the N bits are kept
// (1) or deleted (0); the kept bits leave in order of the encoder output
// index, lowest first. Bit (i*P + j) of PATTERN is row i, column j. With
// the rate-1/2 code and PATTERN = X 101 / Y 110 the output is X1 Y1 Y2 X3
// (rate 3/4); an all-ones pattern turns the block into a plain serialiser
// (no puncturing, as used for BPSK). A group marked in_last restarts the
// pattern at column 0 for the next frame and marks its last kept bit.
//
// Interface: valid/ready in (N bits per beat), valid/ready out (1 bit per
// beat). A group is accepted while the last kept bit of the previous one
// leaves, so the output runs at one bit per cycle when the input keeps up.
//
// Matrix representation and the rate-3/4 and no-puncturing choices follow
// the document; the X 101 / Y 110 pattern itself and the serial output
// are this design's choices.
module puncturer #(
  parameter int unsigned N = ofdm_pkg::CC_N,
  parameter int unsigned P = ofdm_pkg::PUNC_P_34,
  parameter logic [N*P-1:0] PATTERN = ofdm_pkg::PUNC_34
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] in_bits,
  input  logic         in_last,
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_bit,
  output logic         out_last
);

  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  data;        // current group
  logic [N-1:0]  keep;        // kept bits of the group not yet sent
  logic          grp_last;
  logic [PW-1:0] col;         // pattern column of the next group
  logic [IW-1:0] sel;         // lowest pending bit
  logic [N-1:0]  col_mask;
  logic [N-1:0]  keep_next;   // keep after the current bit leaves
  logic          in_fire, out_fire;

  always_comb begin
    sel = '0;
    for (int i = N - 1; i >= 0; i--)
      if (keep[i]) sel = IW'(i);
    keep_next = keep;
    keep_next[sel] = 1'b0;
    for (int i = 0; i < N; i++)
      col_mask[i] = PATTERN[i*P + int'(col)];
  end

  assign out_valid = keep != '0;
  assign out_bit   = data[sel];
  assign out_last  = grp_last && (keep_next == '0);
  assign out_fire  = out_valid && out_ready;
  assign in_ready  = !out_valid || (out_ready && keep_next == '0);
  assign in_fire   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data     <= '0;
      keep     <= '0;
      grp_last <= 1'b0;
      col      <= '0;
    end else begin
      if (out_fire) keep <= keep_next;
      if (in_fire) begin
        // A pattern column that keeps nothing would lose the in_last marker.
        a_col_nonzero: assert (col_mask != '0);
        data     <= in_bits;
        keep     <= col_mask;
        grp_last <= in_last;
        if (in_last || col == PW'(P - 1)) col <= '0;
        else                               col <= col + PW'(1);
      end
    end
  end

endmodule
