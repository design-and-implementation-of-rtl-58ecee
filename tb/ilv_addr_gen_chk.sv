// Stimulus and checker for one ilv_addr_gen instance (used by
// ilv_addr_gen_tb).
//
// Random write requests and read takes. The model counts complete,
// unread blocks and predicts: write address = half*HALF + group; read
// enable exactly while a block is complete; the read addresses of symbol
// s in column c are half*HALF + s*COLS + c/NB + i*INC with INC = COLS/NB
// and the RAM select c mod NB, columns taken in order 0..COLS-1.
module ilv_addr_gen_chk #(
  parameter int unsigned NB  = 4,
  parameter int unsigned INC = 3     // expected read-address increment
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   blocks
);
  localparam int unsigned HALF = 192, COLS = 12, AW = 9;
  localparam int unsigned SW = (NB > 1) ? $clog2(NB) : 1;

  logic wr_req = 1'b0, wr_ack, rd_valid, rd_take = 1'b0;
  logic [AW-1:0] wr_addr;
  logic [NB-1:0][AW-1:0] rd_addr;
  logic [SW-1:0] rd_sel;
  logic wr_half, rd_half, wr_done, rd_done;

  ilv_addr_gen #(.NB(NB)) dut (
    .clk, .rst_n, .wr_req, .wr_ack, .wr_addr, .rd_valid, .rd_take,
    .rd_addr, .rd_sel, .wr_half, .rd_half,
    .wr_block_done (wr_done), .rd_block_done (rd_done));

  int nfull = 0, wh = 0, wg = 0, rh = 0, rs = 0, rc = 0;

  initial begin
    checks = 0; failures = 0; blocks = 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL NB=%0d %s", NB, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    check(rd_valid == (nfull > 0), "read enable");
    check(wr_ack == (wr_req && nfull < 2), "write acknowledge");
    if (wr_ack) begin
      check(int'(wr_addr) == wh * HALF + wg, "write address");
    end
    if (rd_valid && rd_take) begin
      for (int i = 0; i < NB; i++)
        check(int'(rd_addr[i]) == rh * HALF + rs * COLS + rc / NB + i * INC, "read address");
      if (NB > 1) check(int'(rd_addr[(NB > 1) ? 1 : 0]) - int'(rd_addr[0]) == INC, "increment");
      check(int'(rd_sel) == rc % NB, "RAM select");
    end
    // advance the model
    if (wr_ack) begin
      wg++;
      if (wg == HALF) begin
        wg = 0; wh = 1 - wh; nfull++;
      end
    end
    if (rd_valid && rd_take) begin
      rs++;
      if (rs == HALF / COLS) begin
        rs = 0; rc++;
        if (rc == COLS) begin
          rc = 0; rh = 1 - rh; nfull--; blocks++;
        end
      end
    end
  end

  always @(negedge clk) begin
    wr_req  = ($urandom_range(0, 3) != 0);
    rd_take = ($urandom_range(0, 2) == 0);
  end
endmodule
