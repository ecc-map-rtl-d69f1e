// tb_ecc_map_full: the ECC-Map controller at its default size (N = 1024
// lines, K = 819 logical lines, S = 32, w_max = 2048, phi = 2016, 4096-bit
// lines) with the behavioural media model. It formats the device, fills
// every logical line with distinct data, then writes one logical line
// repeatedly until the first catch-up has completed (about 32 regular
// remappings of that line, 64 k host writes), and finally reads every
// logical line back against a shadow copy. Checks: format writes K lines;
// no read mismatch; regular remapping and catch-up occur; base advances by
// S exactly once; the hot line's location never reaches w_max writes.
// It then keeps writing the same line until the medium reports end of life
// (about 1.9 M host writes, some 30 catch-ups) and checks that the
// utilization, host writes / (w_max * N), exceeds 0.85; at this size the
// published 1-LLA utilization is about 0.93.
module tb_ecc_map_full;
  localparam int M = 10, K = 819, S = 32, DW = 4096, SW = 5, WW = 16, W_MAX = 2048;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [M-1:0] seed = 10'h1C7;
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

  ecc_map_device dut (.*);

  nvm_media_model #(.M(M), .DATA_W(DW), .SW(SW), .WEAR_W(WW), .W_MAX(W_MAX)) media (
    .clk, .rst_n, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata), .wmeta(m_wmeta),
    .ack(m_ack), .rdata(m_rdata), .rmeta(m_rmeta), .rwear(m_rwear), .eol,
    .phys_writes, .max_wear);

  always #5 clk = ~clk;

  int n_hw = 0, n_nc = 0, n_col = 0, n_cu = 0, n_copy = 0, cu_cycles = 0;
  always @(posedge clk) if (rst_n && dut.cu_active) cu_cycles++;
  always @(posedge clk) if (rst_n) begin
    if (ev_host_write) n_hw++;
    if (ev_remap_nc)   n_nc++;
    if (ev_remap_col)  n_col++;
    if (ev_catchup)    n_cu++;
    if (ev_copy)       n_copy++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] shadow [K];

  function automatic logic [DW-1:0] pattern(input int lla, input int n);
    logic [DW-1:0] d;
    for (int w = 0; w < DW / 32; w++) d[w*32 +: 32] = 32'(lla * 65537 + n * 7919 + w);
    return d;
  endfunction

  task automatic host_op(input bit we, input int lla, input logic [DW-1:0] d,
                         output logic [DW-1:0] rd);
    @(negedge clk);
    while (!h_req_ready) @(negedge clk);
    h_req_valid = 1; h_req_we = we; h_req_lla = M'(lla); h_req_wdata = d;
    @(negedge clk);
    h_req_valid = 0;
    rd = '0;
    if (!we) begin
      while (!h_rsp_valid) @(negedge clk);
      rd = h_rsp_rdata;
    end
  endtask

  initial begin
    logic [DW-1:0] rd;
    int hot, n;
    #23 rst_n = 1;
    wait (ready);
    @(negedge clk);
    check(phys_writes == K, $sformatf("format wrote %0d lines", phys_writes));
    for (int l = 0; l < K; l++) begin
      shadow[l] = pattern(l, 0);
      host_op(1, l, shadow[l], rd);
    end
    hot = 417;
    n = 1;
    while (n_cu == 0 && n < 80000) begin
      shadow[hot] = pattern(hot, n);
      host_op(1, hot, shadow[hot], rd);
      n++;
    end
    @(negedge clk);
    while (!h_req_ready) @(negedge clk);
    for (int l = 0; l < K; l++) begin
      host_op(0, l, '0, rd);
      check(rd == shadow[l], $sformatf("read back LLA %0d", l));
    end
    $display("host writes %0d, physical writes %0d, regular remaps %0d (colliding %0d), catch-ups %0d, copies %0d, base %0d, max wear %0d, catch-up cycles %0d",
             n_hw, phys_writes, n_nc + n_col, n_col, n_cu, n_copy, base, max_wear, cu_cycles);
    check(n_nc + n_col > 0, "regular remapping happened");
    check(n_cu == 1, "one catch-up happened");
    check(base == 1 + S, "base advanced by S");
    check(!eol && max_wear <= W_MAX, "no line past w_max");
    while (!eol) begin
      h_req_wdata[31:0] = 32'(n);
      host_op(1, hot, h_req_wdata, rd);
      n++;
    end
    $display("end of life: host writes %0d, physical writes %0d, catch-ups %0d, utilization %.3f",
             n_hw, phys_writes, n_cu, real'(n_hw) / (real'(W_MAX) * 1024.0));
    check(real'(n_hw) / (real'(W_MAX) * 1024.0) > 0.85, "1-LLA utilization above 0.85");
    check(n_cu > 20, "catch-ups keep the window moving");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
