// Self-checking testbench of ilv_ram: a 384-bit RAM with the default
// single read port and one with four read ports, written and read at
// random addresses and compared with a reference array. Also checks that
// a write shows at the read ports from the next cycle, not in its own.
module ilv_ram_tb;
  logic clk = 1'b0;
  always #5 clk = !clk;

  localparam int DEPTH = 384, AW = 9;
  int checks = 0, failures = 0;

  logic wr_en = 1'b0, wr_data = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  logic [0:0][AW-1:0] ra1 = '0;
  logic [3:0][AW-1:0] ra4 = '0;
  logic [0:0] rd1;
  logic [3:0] rd4;

  ilv_ram u1 (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr (ra1), .rd_data (rd1));
  ilv_ram #(.NRD(4)) u4 (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr (ra4), .rd_data (rd4));

  logic model [DEPTH];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // fill every location
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = 1'($urandom);
      model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // check the reads of the previous cycle's addresses after its write
      ra1[0] = AW'($urandom_range(0, DEPTH - 1));
      for (int i = 0; i < 4; i++) ra4[i] = AW'($urandom_range(0, DEPTH - 1));
      if ($urandom_range(0, 3) == 0) ra4[0] = wr_addr;   // re-read the last write
      #1;
      check(rd1[0] == model[ra1[0]], "port of single-port RAM");
      for (int i = 0; i < 4; i++) check(rd4[i] == model[ra4[i]], "port of four-port RAM");
      // new write: not visible before the clock edge
      wr_en   = ($urandom_range(0, 1) == 0);
      wr_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_data = !model[wr_addr];
      ra1[0]  = wr_addr;
      #1;
      check(rd1[0] == model[wr_addr], "write not visible in its own cycle");
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
