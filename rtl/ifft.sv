// Inverse DFT of one OFDM symbol, computed serially with one complex
// multiply-accumulate unit.
//
// LOAD: the NFFT frequency points arrive in subcarrier order
// k = -NFFT/2 .. NFFT/2-1 (as zero_padding sends them) and are stored at
// bin k mod NFFT, i.e. the index with its MSB inverted. in_first marks
// subcarrier -NFFT/2 and re-aligns the load index.
// CALC: for each time sample n = 0..NFFT-1 the unit accumulates
//   x[n] = sum_k X[k] * exp(+j*2*pi*k*n/NFFT)
// over NFFT cycles, stepping the twiddle index by n (mod NFFT) each cycle.
// OUT: the sum is divided by NFFT (arithmetic shift) and presented on
// out_*; the next sample starts when it is taken. After sample NFFT-1 the
// unit returns to LOAD. out_first marks x[0].
//
// Twiddles are cos/sin of 2*pi*t/NFFT rounded to TW-bit two's complement
// with full scale 2^(TW-1)-1; the table is computed at elaboration. Output
// samples carry that scale: out = round-down(x[n] * (2^(TW-1)-1)).
//
// Timing: NFFT input beats, then NFFT*(NFFT+1) cycles plus output stalls
// per symbol (65 792 cycles for NFFT = 256). The transform is named in the
// transmitter's block diagram; its size, word lengths and this serial
// architecture (the smallest one, not a fast one) are this design's.
module ifft #(
  parameter int unsigned NFFT = 256,
  parameter int unsigned DW   = 4,     // input width
  parameter int unsigned TW   = 12,    // twiddle width
  parameter int unsigned OW   = 16     // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  input  logic                 in_first,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [OW-1:0] out_i,
  output logic signed [OW-1:0] out_q,
  output logic                 out_first
);

  localparam int unsigned KW = $clog2(NFFT);
  localparam int unsigned PW = DW + TW + 1;            // product + sum
  localparam int unsigned AW = PW + KW;                // accumulator

  typedef logic signed [TW-1:0] tw_t;
  typedef enum logic [1:0] {LOAD, CALC, OUT} state_t;

  function automatic tw_t tw_round(real x);
    return tw_t'($rtoi(x + ((x >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic tw_t [NFFT-1:0] cos_table();
    for (int t = 0; t < NFFT; t++)
      cos_table[t] = tw_round($cos(2.0 * 3.141592653589793 * real'(t) / real'(NFFT))
                              * real'((1 << (TW - 1)) - 1));
  endfunction

  function automatic tw_t [NFFT-1:0] sin_table();
    for (int t = 0; t < NFFT; t++)
      sin_table[t] = tw_round($sin(2.0 * 3.141592653589793 * real'(t) / real'(NFFT))
                              * real'((1 << (TW - 1)) - 1));
  endfunction

  localparam tw_t [NFFT-1:0] COS = cos_table();
  localparam tw_t [NFFT-1:0] SIN = sin_table();

  logic signed [DW-1:0] xr [NFFT];
  logic signed [DW-1:0] xi [NFFT];

  state_t               state;
  logic [KW-1:0]        cnt;     // load index / k
  logic [KW-1:0]        lidx;    // load index after re-alignment
  logic [KW-1:0]        n;       // time sample
  logic [KW-1:0]        ph;      // twiddle index k*n mod NFFT
  logic signed [AW-1:0] acc_r, acc_i;
  logic signed [PW-1:0] ar, ai, pr, pi;
  tw_t                  c, s;

  assign c  = COS[ph];
  assign s  = SIN[ph];
  // (xr + j xi)(c + j s)
  assign ar = PW'(xr[cnt]);
  assign ai = PW'(xi[cnt]);
  assign pr = ar * PW'(c) - ai * PW'(s);
  assign pi = ar * PW'(s) + ai * PW'(c);

  assign lidx      = in_first ? '0 : cnt;
  assign in_ready  = state == LOAD;
  assign out_valid = state == OUT;
  assign out_i     = OW'(acc_r >>> KW);
  assign out_q     = OW'(acc_i >>> KW);
  assign out_first = n == '0;

  always_ff @(posedge clk)
    if (state == LOAD && in_valid) begin
      xr[{~lidx[KW-1], lidx[KW-2:0]}] <= in_i;
      xi[{~lidx[KW-1], lidx[KW-2:0]}] <= in_q;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOAD;
      cnt   <= '0;
      n     <= '0;
      ph    <= '0;
      acc_r <= '0;
      acc_i <= '0;
    end else begin
      case (state)
        LOAD: if (in_valid) begin
          cnt <= lidx + KW'(1);
          if (lidx == KW'(NFFT - 1)) begin
            state <= CALC;
            n     <= '0;
            ph    <= '0;
            acc_r <= '0;
            acc_i <= '0;
          end
        end
        CALC: begin
          acc_r <= acc_r + AW'(pr);
          acc_i <= acc_i + AW'(pi);
          ph    <= ph + n;
          cnt   <= cnt + KW'(1);
          if (cnt == KW'(NFFT - 1)) state <= OUT;
        end
        default: if (out_ready) begin     // OUT
          acc_r <= '0;
          acc_i <= '0;
          ph    <= '0;
          n     <= n + KW'(1);
          state <= (n == KW'(NFFT - 1)) ? LOAD : CALC;
        end
      endcase
    end
  end

endmodule
