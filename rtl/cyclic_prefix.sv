// Cyclic prefix insertion: repeats the last NCP samples of each OFDM
// symbol in front of it.
//
// LOAD stores the NSYM samples of one symbol (in_first marks sample 0 and
// re-aligns the write index). SEND then emits samples NSYM-NCP .. NSYM-1
// followed by 0 .. NSYM-1, NSYM+NCP samples in all, and returns to LOAD.
// out_first marks the first prefix sample.
//
// Interface: valid/ready in and out, one sample per beat; input and output
// phases alternate, so a symbol costs NSYM + NSYM + NCP beats.
//
// The stage appears in the transmitter's block diagram; NSYM = 256 and
// NCP = 64 (prefix of 1/4 symbol, one of the IEEE 802.16 choices) and the
// single-buffer scheme are this design's.
module cyclic_prefix #(
  parameter int unsigned NSYM = 256,
  parameter int unsigned NCP  = 64,
  parameter int unsigned DW   = 16
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
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q,
  output logic                 out_first
);

  localparam int unsigned KW = $clog2(NSYM);
  localparam int unsigned CW = $clog2(NSYM + NCP);

  logic signed [DW-1:0] mem_i [NSYM];
  logic signed [DW-1:0] mem_q [NSYM];

  logic          sending;
  logic [KW-1:0] wr;        // load index
  logic [CW-1:0] oc;        // output count 0 .. NSYM+NCP-1
  logic [KW-1:0] rd;
  logic [KW-1:0] widx;

  assign in_ready  = !sending;
  assign out_valid = sending;
  // prefix reads NSYM-NCP+oc, body reads oc-NCP: both are (oc - NCP) mod NSYM
  assign rd        = KW'(oc + CW'(NSYM - NCP));
  assign out_i     = mem_i[rd];
  assign out_q     = mem_q[rd];
  assign out_first = sending && oc == '0;
  assign widx      = in_first ? '0 : wr;

  always_ff @(posedge clk)
    if (!sending && in_valid) begin
      mem_i[widx] <= in_i;
      mem_q[widx] <= in_q;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending <= 1'b0;
      wr      <= '0;
      oc      <= '0;
    end else if (!sending) begin
      if (in_valid) begin
        wr <= widx + KW'(1);
        if (widx == KW'(NSYM - 1)) begin
          sending <= 1'b1;
          oc      <= '0;
        end
      end
    end else if (out_ready) begin
      if (oc == CW'(NSYM + NCP - 1)) begin
        sending <= 1'b0;
        wr      <= '0;
      end
      oc <= oc + CW'(1);
    end
  end

  initial a_sizes: assert (NCP <= NSYM && (1 << KW) == NSYM);

endmodule
