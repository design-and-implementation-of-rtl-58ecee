// Non-recursive, non-systematic convolutional encoder of rate 1/N and
// constraint length K.
//
// A shift register holds the K-1 previous input bits; each output is the
// modulo-2 sum (XOR) of the taps its generator polynomial selects out of
// the window {previous bits, new bit}. Bit j of a generator is the tap on
// the input delayed by j cycles, so the encoder of Fig. 2 style with
// G1 = (1,1,1), G2 = (0,1,1), G3 = (1,0,1) is GENS = {3'b101, 3'b110, 3'b111}
// and the default, G = [1+D^2, 1+D+D^2], is {3'b111, 3'b101}. The registers
// start at zero. After an input marked in_last the encoder keeps running
// for K-1 more steps with zero input, so the register returns to the zero
// state (the zero tail); out_last marks the final tail output.
//
// Interface: valid/ready stream in (one bit per beat) and out (N coded
// bits per beat, output i in out_bits[i]). The output is registered: one
// cycle latency, one input bit per cycle when out_ready stays high. During
// the K-1 tail steps in_ready is low.
//
// The encoder structure and the generator polynomials are the document's;
// the stream handshake and the in_last-triggered tail are this design's.
module conv_encoder #(
  parameter int unsigned N = ofdm_pkg::CC_N,
  parameter int unsigned K = ofdm_pkg::CC_K,
  parameter logic [N*K-1:0] GENS = ofdm_pkg::CC_GENS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_bit,
  input  logic         in_last,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [N-1:0] out_bits,
  output logic         out_last
);

  localparam int unsigned TW = (K > 2) ? $clog2(K) : 1;

  logic [K-2:0]  sr;          // sr[0] = newest previous bit
  logic [TW-1:0] tail_cnt;    // tail steps still to run
  logic          step;        // an encoder step happens this cycle
  logic          step_bit;
  logic          step_last;
  logic [K-1:0]  window;
  logic [N-1:0]  coded;

  wire can_out = !out_valid || out_ready;

  assign in_ready  = can_out && (tail_cnt == '0);
  assign step      = can_out && ((tail_cnt != '0) || in_valid);
  assign step_bit  = (tail_cnt != '0) ? 1'b0 : in_bit;
  assign step_last = (tail_cnt == TW'(1));

  always_comb begin
    window = {sr, step_bit};
    for (int i = 0; i < N; i++)
      coded[i] = ^(window & GENS[i*K +: K]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      tail_cnt  <= '0;
      out_valid <= 1'b0;
      out_bits  <= '0;
      out_last  <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (step) begin
        sr        <= window[K-2:0];
        out_valid <= 1'b1;
        out_bits  <= coded;
        out_last  <= step_last;
        if (tail_cnt != '0)
          tail_cnt <= tail_cnt - TW'(1);
        else if (in_last)
          tail_cnt <= TW'(K - 1);
      end
    end
  end

endmodule
