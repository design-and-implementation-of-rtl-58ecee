// Double-buffered block interleaver for NB coded bits per mapper symbol
// (NB = 1 BPSK, 2 QPSK, 4 16-QAM, 6 64-QAM).
//
// Coded bits arrive serially. A packer collects NB of them and writes
// them at one shared address into NB single-bit RAMs (bit r of the group
// into RAM r), so each RAM receives HALF = 192 bits per block of NB*192
// bits. Each RAM is 384 bits deep: two halves used as ping-pong buffers.
// When a half is full the address generator starts reading it column-wise
// (see ilv_addr_gen) while the next block is written into the other half.
// One read operation fetches NB locations, spaced COLS/NB apart, from a
// single RAM; they form one NB-bit symbol for the mapper.
//
// Net permutation: with ROWS = NB*192/COLS, input bit k = r*COLS + c of a
// block leaves as output bit j = c*ROWS + r (row-wise write, column-wise
// read of a ROWS x COLS matrix). Symbol bit order: out_sym[NB-1] is the
// first bit of the symbol in output order, out_sym[0] the last.
//
// Interface: in_valid/in_ready/in_bit (one bit per beat) and
// out_valid/out_ready/out_sym (one symbol per beat). The first symbol of a
// block can leave one cycle after its last group is written; a block is
// then read at one symbol per cycle. in_ready drops only when both halves
// hold unread blocks.
//
// RAM count, RAM size, shared write address and the column-wise read are
// the document's; the serial input with a packer and the 12-column matrix
// size inferred from the read increments are this design's reading.
module interleaver #(
  parameter int unsigned NB   = 4,
  parameter int unsigned HALF = ofdm_pkg::ILV_HALF,
  parameter int unsigned COLS = ofdm_pkg::ILV_COLS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          in_bit,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [NB-1:0] out_sym,
  // status for observation
  output logic          wr_block_done,
  output logic          rd_block_done,
  output logic          stalled,
  output logic          wr_half,
  output logic          rd_half
);

  localparam int unsigned AW = $clog2(2 * HALF);
  localparam int unsigned SW = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned CW = $clog2(NB + 1);

  logic [NB-1:0]          pk_data;
  logic [CW-1:0]          pk_cnt;
  logic                   grp_full, wr_ack, in_fire;
  logic [AW-1:0]          wr_addr;
  logic [NB-1:0][AW-1:0]  rd_addr;
  logic [SW-1:0]          rd_sel;
  logic [NB-1:0][NB-1:0]  ram_rd;   // [ram][port]

  assign grp_full = pk_cnt == CW'(NB);
  assign in_ready = !grp_full || wr_ack;
  assign in_fire  = in_valid && in_ready;
  assign stalled  = grp_full && !wr_ack;

  // serial-to-parallel packer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pk_cnt  <= '0;
      pk_data <= '0;
    end else if (grp_full && wr_ack) begin
      pk_cnt <= in_fire ? CW'(1) : CW'(0);
      if (in_fire) pk_data[0] <= in_bit;
    end else if (in_fire) begin
      pk_data[pk_cnt[SW-1:0]] <= in_bit;
      pk_cnt                  <= pk_cnt + CW'(1);
    end
  end

  ilv_addr_gen #(.NB(NB), .HALF(HALF), .COLS(COLS), .AW(AW), .SW(SW)) u_agen (
    .clk, .rst_n,
    .wr_req (grp_full),
    .wr_ack,
    .wr_addr,
    .rd_valid (out_valid),
    .rd_take  (out_ready),
    .rd_addr,
    .rd_sel,
    .wr_half,
    .rd_half,
    .wr_block_done,
    .rd_block_done
  );

  for (genvar r = 0; r < NB; r++) begin : g_ram
    ilv_ram #(.DEPTH(2 * HALF), .NRD(NB), .AW(AW)) u_ram (
      .clk,
      .wr_en   (wr_ack),
      .wr_addr (wr_addr),
      .wr_data (pk_data[r]),
      .rd_addr (rd_addr),
      .rd_data (ram_rd[r])
    );
  end

  always_comb
    for (int i = 0; i < NB; i++)
      out_sym[NB-1-i] = ram_rd[rd_sel][i];

endmodule
