// Stimulus and checker for one interleaver instance (used by
// interleaver_tb).
//
// Feeds a serial bit stream and predicts the output with the block
// permutation written independently of the RTL: per block of NB*HALF
// bits, output bit j = c*ROWS + r carries input bit k = r*COLS + c
// (ROWS = NB*HALF/COLS), and every NB output bits form one symbol, first
// bit in the MSB. mode 0: random valid/ready; mode 1: input always valid,
// output always ready; mode 2: output stalled, so the writer must stop
// once both halves are full. Also checked: the first symbol is valid in
// the cycle the first block completes, a full-rate block leaves in HALF
// consecutive cycles, writing and reading overlap (double buffering), and
// the write stalls in mode 2.
module interleaver_chk #(
  parameter int unsigned NB   = 4,
  parameter int unsigned HALF = 192,
  parameter int unsigned COLS = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] mode,
  output int         checks,
  output int         failures,
  output int         blocks_out,
  output int         overlap,
  output int         stalls
);
  localparam int unsigned BLK  = NB * HALF;
  localparam int unsigned ROWS = BLK / COLS;

  logic          in_valid = 1'b0, in_ready, in_bit = 1'b0;
  logic          out_valid, out_ready = 1'b0;
  logic [NB-1:0] out_sym;
  logic          wr_done, rd_done, stalled, wr_half, rd_half;

  interleaver #(.NB(NB), .HALF(HALF), .COLS(COLS)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_bit,
    .out_valid, .out_ready, .out_sym,
    .wr_block_done (wr_done), .rd_block_done (rd_done), .stalled,
    .wr_half, .rd_half);

  logic inbits[$];       // accepted input bits not yet checked
  int   sym_idx = 0;     // symbol index inside the current output block
  logic acc = 1'b0;
  logic seen_out = 1'b0;
  int   cyc = 0;
  int   blk_start = 0;   // cycle of the first symbol of the block
  logic blk_full = 1'b0; // block started at full rate
  int   first_blocks = 0;

  initial begin
    checks = 0; failures = 0; blocks_out = 0; overlap = 0; stalls = 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL NB=%0d %s", NB, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    acc <= in_valid && in_ready;
    if (in_valid && in_ready) inbits.push_back(in_bit);
    if (in_valid && in_ready && out_valid && out_ready) overlap++;
    if (stalled && mode == 2) stalls++;
    // read enable exactly when the first block is complete
    if (!seen_out && (out_valid || wr_done)) begin
      check(out_valid && wr_done && first_blocks == 0, "read enable with first block");
      seen_out <= 1'b1;
    end
    if (wr_done) first_blocks++;
    cyc++;
    if (out_valid && out_ready) begin
      logic [NB-1:0] e;
      for (int i = 0; i < NB; i++) begin
        int j, c, r, k;
        j = sym_idx * NB + i;
        c = j / ROWS;
        r = j % ROWS;
        k = r * COLS + c;
        e[NB-1-i] = (k < inbits.size()) ? inbits[k] : 1'bx;
      end
      check(inbits.size() >= BLK && out_sym == e, "symbol value");
      if (sym_idx == 0) begin
        blk_start = cyc;
        blk_full  = (mode == 1);
      end
      sym_idx++;
      if (sym_idx == HALF) begin
        sym_idx = 0;
        blocks_out++;
        for (int i = 0; i < BLK; i++) void'(inbits.pop_front());
        if (blk_full && mode == 1) check(cyc - blk_start == HALF - 1, "full-rate block in HALF cycles");
      end
    end
  end

  always @(negedge clk) begin
    case (mode)
      2'd1: begin
        out_ready = 1'b1;
        if (!in_valid || acc) begin
          in_valid = 1'b1;
          in_bit   = 1'($urandom);
        end
      end
      2'd2: begin
        out_ready = 1'b0;
        if (!in_valid || acc) begin
          in_valid = 1'b1;
          in_bit   = 1'($urandom);
        end
      end
      default: begin
        out_ready = ($urandom_range(0, 3) != 0);
        if (!in_valid || acc) begin
          in_valid = ($urandom_range(0, 7) != 0);
          in_bit   = 1'($urandom);
        end
      end
    endcase
  end
endmodule
