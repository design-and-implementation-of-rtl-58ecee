// One interleaver buffer: a 1-bit-wide RAM of DEPTH words with one
// synchronous write port and NRD asynchronous read ports.
//
// With the default DEPTH = 384 the RAM holds two interleaver halves of
// 192 bits (double buffering): one half is written while the other is
// read. The several read ports let the address generator fetch NRD
// locations of the same RAM in one read operation, which is what forms a
// multi-bit mapper symbol from a single RAM. Reads are combinational, as
// in LUT-based (distributed) RAM; a write appears at the read ports from
// the next cycle on. The contents are not reset.
//
// Size (384 bits, Table I) and the one-RAM-per-bit organisation follow the
// document; the port arrangement and asynchronous read are this design's.
module ilv_ram #(
  parameter int unsigned DEPTH = 2 * ofdm_pkg::ILV_HALF,
  parameter int unsigned NRD   = 1,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic [AW-1:0]           wr_addr,
  input  logic                    wr_data,
  input  logic [NRD-1:0][AW-1:0]  rd_addr,
  output logic [NRD-1:0]          rd_data
);

  logic mem [DEPTH];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= wr_data;

  always_comb
    for (int i = 0; i < NRD; i++)
      rd_data[i] = mem[rd_addr[i]];

endmodule
