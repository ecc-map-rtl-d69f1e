// tb_map_table: self-checking test of the compact-index mapping table.
// Writes random compact indices and moved bits to all K entries, checks
// them back against a shadow array, checks that a write is visible on the
// read port only after the clock edge and that addresses >= K are ignored
// (read as zero, writes dropped).
module tb_map_table;
  localparam int K = 819, S = 32, AW = 10;
  int checks = 0, failures = 0;

  logic clk = 0;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [4:0]    rd_cidx, wr_cidx;
  logic          rd_moved, wr_en = 0, wr_moved;

  map_table #(.K(K), .S(S), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] shadow [K];
    for (int a = 0; a < K; a++) begin
      @(negedge clk);
      shadow[a] = 6'($urandom);
      wr_en = 1; wr_addr = AW'(a); {wr_moved, wr_cidx} = shadow[a];
    end
    @(negedge clk) wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      int a;
      a = $urandom_range(0, K - 1);
      @(negedge clk);
      rd_addr = AW'(a); #1;
      check({rd_moved, rd_cidx} == shadow[a], $sformatf("read %0d", a));
      if ($urandom_range(0, 1)) begin
        logic [5:0] v;
        v = 6'($urandom);
        wr_en = 1; wr_addr = AW'(a); {wr_moved, wr_cidx} = v; #1;
        check({rd_moved, rd_cidx} == shadow[a], "write not before edge");
        @(posedge clk); #1;
        wr_en = 0;
        shadow[a] = v;
        check({rd_moved, rd_cidx} == v, "write after edge");
      end
    end
    // out of range
    @(negedge clk) wr_en = 1; wr_addr = AW'(K); {wr_moved, wr_cidx} = 6'h3F;
    @(negedge clk) wr_en = 0; rd_addr = AW'(K); #1;
    check({rd_moved, rd_cidx} == 0, "out of range reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
