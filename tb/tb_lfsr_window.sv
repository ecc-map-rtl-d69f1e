// tb_lfsr_window: self-checking test of the index-randomisation cache.
// A reference Galois LFSR (x^10 + x^3 + 1, written out here) produces the
// expected sequence from the seed. Checks: busy lasts S+1 cycles after
// reset and S cycles after advance; after the fill nums[o] equals the
// o-th state from the seed; after each advance the window moved by S
// states; over 31 windows (992 indices) no number is zero or repeated;
// a zero seed is replaced by 1.
module tb_lfsr_window;
  localparam int M = 10, S = 32;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, advance = 0, busy;
  logic [M-1:0] seed;
  logic [S:0][M-1:0] nums;

  lfsr_window #(.M(M), .S(S)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [M-1:0] ref_step(input logic [M-1:0] s);
    logic [M-1:0] n;
    n = s << 1;
    if (s[M-1]) n = n ^ 10'b00_0000_1001;
    return n;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_idle(output int cycles);
    cycles = 0;
    while (busy) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  initial begin
    logic [M-1:0] r;
    logic [M-1:0] expect_base;
    bit seen [1024];
    int cyc;
    seed = 10'h2A5;
    #12 rst_n = 1; #1;
    wait_idle(cyc);
    check(cyc == S + 1, $sformatf("fill took %0d cycles", cyc));
    r = seed;
    for (int o = 0; o <= S; o++) begin
      check(nums[o] == r, $sformatf("fill nums[%0d]", o));
      r = ref_step(r);
    end
    for (int i = 0; i < 1024; i++) seen[i] = 0;
    expect_base = seed;
    for (int w = 0; w < 31; w++) begin
      r = expect_base;
      for (int o = 0; o < S; o++) begin
        check(nums[o] == r, $sformatf("window %0d nums[%0d]", w, o));
        check(nums[o] != 0 && !seen[nums[o]], $sformatf("distinct w%0d o%0d", w, o));
        seen[nums[o]] = 1;
        r = ref_step(r);
      end
      check(nums[S] == r, $sformatf("window %0d nums[S]", w));
      expect_base = r;
      @(negedge clk) advance = 1;
      @(negedge clk) advance = 0;
      #1;
      wait_idle(cyc);
      check(cyc == S - 1 || cyc == S, $sformatf("advance took %0d cycles", cyc));
    end
    // zero seed
    seed = '0; rst_n = 0; #12 rst_n = 1; #1;
    wait_idle(cyc);
    check(nums[0] == 10'd1, "zero seed replaced by 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
