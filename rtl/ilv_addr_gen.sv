// Address generator of the double-buffered block interleaver.
//
// The interleaver treats a block of NB*HALF coded bits as a matrix of
// COLS columns, written row by row and read column by column. NB RAMs
// (one per bit of a mapper symbol) each hold HALF bits per block, so RAM r
// holds the matrix columns c with c mod NB = r and a RAM row has
// W = COLS/NB entries. Each RAM has two halves for ping-pong buffering.
//
// Write side: one address is shared by all NB RAMs; group g (bits
// NB*g .. NB*g+NB-1 of the block) goes to address g of the current half.
// After HALF writes the half is marked full, which raises the read enable
// (rd_valid), and writing continues in the other half if it is free.
// Read side: for each column c = 0..COLS-1 and each run of NB rows, the
// generator issues NB addresses base, base+W, ..., base+(NB-1)*W in one
// read operation (base = s*COLS + c/NB) and selects RAM c mod NB, so RAM1,
// RAM2, ... are visited column by column in turn. With COLS = 12 the
// increment W is 12 (BPSK), 6 (QPSK), 3 (16-QAM) and 2 (64-QAM). After the
// last read of a half it is freed and reading moves to the other half.
//
// Interface: wr_req/wr_ack (a group is written in the cycle wr_ack is
// high), rd_valid/rd_take (one symbol read per take). Status outputs
// report the halves in use and one-cycle pulses at the end of a block.
//
// The matrix read-out, shared write address, increments and the start of
// reading after HALF writes follow the document; the full/free flags that
// stall the writer when both halves are full are this design's.
module ilv_addr_gen #(
  parameter int unsigned NB   = 4,
  parameter int unsigned HALF = ofdm_pkg::ILV_HALF,
  parameter int unsigned COLS = ofdm_pkg::ILV_COLS,
  parameter int unsigned AW   = $clog2(2 * HALF),
  parameter int unsigned SW   = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // write side
  input  logic                   wr_req,
  output logic                   wr_ack,
  output logic [AW-1:0]          wr_addr,
  // read side
  output logic                   rd_valid,
  input  logic                   rd_take,
  output logic [NB-1:0][AW-1:0]  rd_addr,
  output logic [SW-1:0]          rd_sel,
  // status
  output logic                   wr_half,
  output logic                   rd_half,
  output logic                   wr_block_done,
  output logic                   rd_block_done
);

  localparam int unsigned W   = COLS / NB;        // RAM row width
  localparam int unsigned NS  = HALF / COLS;      // symbols per column
  localparam int unsigned GW  = $clog2(HALF);
  localparam int unsigned QW  = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned NSW = (NS > 1) ? $clog2(NS) : 1;

  logic [1:0]     full;       // half h holds a complete, unread block
  logic [GW-1:0]  wr_cnt;
  logic [SW-1:0]  cm;         // column mod NB  (RAM select)
  logic [QW-1:0]  cq;         // column div NB  (column inside the RAM)
  logic [NSW-1:0] s;          // symbol (group of NB rows) in the column
  logic [AW-1:0]  base;
  logic           rd_fire, rd_last, wr_last;

  assign wr_ack   = wr_req && !full[wr_half];
  assign wr_addr  = (wr_half ? AW'(HALF) : AW'(0)) + AW'(wr_cnt);
  assign wr_last  = wr_cnt == GW'(HALF - 1);

  assign rd_valid = full[rd_half];
  assign rd_fire  = rd_valid && rd_take;
  assign rd_sel   = cm;
  assign rd_last  = (s == NSW'(NS - 1)) && (cm == SW'(NB - 1)) && (cq == QW'(W - 1));
  assign base     = (rd_half ? AW'(HALF) : AW'(0)) + AW'(s) * AW'(COLS) + AW'(cq);

  always_comb
    for (int i = 0; i < NB; i++)
      rd_addr[i] = base + AW'(i * W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full          <= '0;
      wr_cnt        <= '0;
      wr_half       <= 1'b0;
      rd_half       <= 1'b0;
      cm            <= '0;
      cq            <= '0;
      s             <= '0;
      wr_block_done <= 1'b0;
      rd_block_done <= 1'b0;
    end else begin
      wr_block_done <= wr_ack && wr_last;
      rd_block_done <= rd_fire && rd_last;
      // write address counter
      if (wr_ack) begin
        if (wr_last) begin
          wr_cnt  <= '0;
          wr_half <= !wr_half;
        end else begin
          wr_cnt  <= wr_cnt + GW'(1);
        end
      end
      // read address counters: s fastest, then column (cm, cq)
      if (rd_fire) begin
        if (s == NSW'(NS - 1)) begin
          s <= '0;
          if (cm == SW'(NB - 1)) begin
            cm <= '0;
            cq <= (cq == QW'(W - 1)) ? '0 : cq + QW'(1);
          end else begin
            cm <= cm + SW'(1);
          end
        end else begin
          s <= s + NSW'(1);
        end
        if (rd_last) rd_half <= !rd_half;
      end
      // full flags: set by the last write, cleared by the last read
      for (int h = 0; h < 2; h++) begin
        if (wr_ack && wr_last && wr_half == h[0])      full[h] <= 1'b1;
        else if (rd_fire && rd_last && rd_half == h[0]) full[h] <= 1'b0;
      end
    end
  end

  // Geometry rules the address arithmetic relies on.
  initial begin
    a_cols: assert (COLS % NB == 0);
    a_half: assert (HALF % COLS == 0);
  end

endmodule
