// tb_ecc_map_device: end-to-end test of the ECC-Map controller with the
// behavioural media model, at reduced size (N = 64 lines, K = 51 logical
// lines, window S = 8, endurance 40 writes, so phi = 40 - 64/8 = 32,
// 32-bit lines).
// Phases: format; random reads and writes over all LLAs; a single LLA
// written repeatedly (forces regular remappings, collisions and catch-ups);
// a small hot set; then back to single-LLA writes until the media reports
// end of life. Every read is compared with a shadow copy of the logical
// contents and all LLAs are read back after each phase. Checks: format
// writes exactly K lines; read latency is 4 cycles; no read mismatches;
// the window base only grows in steps of S; each mechanism (in-place write,
// non-colliding and colliding remap, catch-up, internal copy, out-of-range
// access) occurs at least once.
module tb_ecc_map_device;
  localparam int M = 6, K = 51, S = 8, W_MAX = 40, DW = 32, SW = 3, WW = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [M-1:0] seed = 6'h2B;
  logic h_req_valid = 0, h_req_ready, h_req_we = 0, h_rsp_valid;
  logic [M-1:0] h_req_lla = '0;
  logic [DW-1:0] h_req_wdata = '0, h_rsp_rdata;
  logic m_req, m_we, m_ack;
  logic [M-1:0] m_addr;
  logic [DW-1:0] m_wdata, m_rdata;
  logic [SW-1:0] m_wmeta, m_rmeta;
  logic [WW-1:0] m_rwear;
  logic ready, ev_host_write, ev_remap_nc, ev_remap_col, ev_catchup, ev_copy;
  logic [31:0] base;
  logic eol;
  longint unsigned phys_writes;
  int unsigned max_wear;

  ecc_map_device #(.M(M), .K(K), .S(S), .W_MAX(W_MAX), .DATA_W(DW), .WEAR_W(WW)) dut (.*);

  nvm_media_model #(.M(M), .DATA_W(DW), .SW(SW), .WEAR_W(WW), .W_MAX(W_MAX)) media (
    .clk, .rst_n, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata), .wmeta(m_wmeta),
    .ack(m_ack), .rdata(m_rdata), .rmeta(m_rmeta), .rwear(m_rwear), .eol,
    .phys_writes, .max_wear);

  always #5 clk = ~clk;

  int n_hw = 0, n_nc = 0, n_col = 0, n_cu = 0, n_copy = 0, n_oor = 0, n_inplace = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_host_write) n_hw++;
    if (ev_remap_nc)   n_nc++;
    if (ev_remap_col)  n_col++;
    if (ev_catchup)    n_cu++;
    if (ev_copy)       n_copy++;
  end

  // base may only move forward in steps of S
  logic [31:0] base_prev;
  always @(posedge clk) begin
    if (rst_n && ready && base != base_prev) begin
      checks++;
      if (base != base_prev + S) begin
        failures++;
        $display("FAIL: base jumped %0d -> %0d", base_prev, base);
      end
    end
    base_prev <= base;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] shadow [K];

  task automatic host_op(input bit we, input int lla, input logic [DW-1:0] d,
                         output logic [DW-1:0] rd, output int lat);
    @(negedge clk);
    while (!h_req_ready) @(negedge clk);
    h_req_valid = 1; h_req_we = we; h_req_lla = M'(lla); h_req_wdata = d;
    @(negedge clk);
    h_req_valid = 0;
    lat = 0;
    rd = '0;
    if (!we && lla < K) begin
      while (!h_rsp_valid) begin @(negedge clk); lat++; end
      rd = h_rsp_rdata;
    end else if (!we) begin
      // out-of-range read: answered in the acceptance cycle
      rd = h_rsp_rdata;
    end
  endtask

  task automatic do_write(input int lla);
    logic [DW-1:0] d, rd;
    int lat;
    d = DW'($urandom);
    host_op(1, lla, d, rd, lat);
    if (lla < K) shadow[lla] = d;
  endtask

  task automatic do_read(input int lla);
    logic [DW-1:0] rd;
    int lat;
    host_op(0, lla, '0, rd, lat);
    check(rd == shadow[lla], $sformatf("read LLA %0d got %h want %h", lla, rd, shadow[lla]));
    // rsp_valid is registered on the 4th clock edge after acceptance
    check(lat == 4, $sformatf("read latency %0d", lat));
  endtask

  task automatic read_all();
    for (int l = 0; l < K; l++) do_read(l);
  endtask

  initial begin
    logic [DW-1:0] rd;
    int lat, hot, hw_before, phys_before;
    for (int l = 0; l < K; l++) shadow[l] = '0;
    #23 rst_n = 1;
    wait (ready);
    @(negedge clk);
    check(phys_writes == K, $sformatf("format wrote %0d lines", phys_writes));
    check(base == 1, "initial base 1");
    read_all();
    // out-of-range accesses are dropped
    host_op(1, K + 3, 32'hDEAD_BEEF, rd, lat);
    host_op(0, K + 3, '0, rd, lat);
    check(rd == 0, "out-of-range read answers zero");
    n_oor++;
    // random traffic
    for (int t = 0; t < 400; t++) begin
      int l;
      l = $urandom_range(0, K - 1);
      if ($urandom_range(0, 1)) do_write(l); else do_read(l);
    end
    @(negedge clk);
    while (!h_req_ready) @(negedge clk);
    hw_before = n_hw; phys_before = int'(phys_writes);
    do_write(5);
    @(negedge clk);
    while (!h_req_ready) @(negedge clk);
    n_inplace = (n_nc == 0 && n_col == 0 && n_cu == 0 &&
                 int'(phys_writes) == phys_before + 1) ? 1 : 0;
    check(n_inplace == 1, $sformatf("untriggered host write is one in-place write (nc %0d col %0d cu %0d phys %0d before %0d)", n_nc, n_col, n_cu, phys_writes, phys_before));
    read_all();
    // single-LLA hammering
    hot = $urandom_range(0, K - 1);
    for (int t = 0; t < 1500 && !eol; t++) begin
      do_write(hot);
      if (t % 50 == 0) do_read($urandom_range(0, K - 1));
    end
    if (!eol) read_all();
    // small hot set
    for (int t = 0; t < 1500 && !eol; t++) begin
      do_write($urandom_range(0, 3) * 7);
      if (t % 40 == 0) do_read($urandom_range(0, K - 1));
    end
    if (!eol) read_all();
    // single LLA until end of life
    while (!eol && n_hw < 200000) do_write(hot);
    check(eol, "device reached end of life");
    $display("host writes %0d, physical writes %0d, utilization %f", n_hw, phys_writes,
             real'(n_hw) / real'(W_MAX * (1 << M)));
    $display("remaps: non-colliding %0d colliding %0d catch-up %0d copies %0d base %0d",
             n_nc, n_col, n_cu, n_copy, base);
    check(n_nc > 0, "non-colliding remapping happened");
    check(n_col > 0, "colliding remapping happened");
    check(n_cu > 0, "catch-up happened");
    check(n_copy > 0, "internal copy happened");
    check(n_oor > 0, "out-of-range access happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
