// tb_ecc_map_workloads: runs the four synthetic write workloads of the
// evaluation through the ECC-Map controller until the device reaches end
// of life, and reports the utilization = host writes / (w_max * N).
// Configuration: N = 1024, K = 819 (spare factor 0.2), S = 32, w_max = 128
// (size-to-endurance ratio 8, phi = 128 - 1024/32 = 96), 16-bit lines.
// Workloads: 1-LLA (one random LLA), stress (a random 3 % of the LLAs,
// uniform within the set), uniform (all LLAs), Zipf (LLA of rank i drawn
// with probability proportional to 1/i). The published utilizations for
// this configuration are 0.61, 0.73, 0.65 and 0.55; each run is checked to
// reach end of life and to land within 0.12 of its published value, and
// the logical contents are read back and compared after each run.
module tb_ecc_map_workloads;
  localparam int M = 10, K = 819, S = 32, W_MAX = 128, DW = 16, SW = 5, WW = 16;
  localparam int N = 1 << M;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [M-1:0] seed = 10'h155;
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

  int n_hw = 0, n_nc = 0, n_col = 0, n_cu = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_host_write && !eol) n_hw++;
    if (ev_remap_nc)   n_nc++;
    if (ev_remap_col)  n_col++;
    if (ev_catchup)    n_cu++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (60000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] shadow [K];
  real zipf_cdf [K];
  int  hot_set [$];

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

  function automatic int zipf_draw();
    real u;
    int lo, hi;
    u = real'($urandom) / 4294967296.0;
    lo = 0; hi = K - 1;
    while (lo < hi) begin
      int mid;
      mid = (lo + hi) / 2;
      if (zipf_cdf[mid] < u) lo = mid + 1; else hi = mid;
    end
    return lo;
  endfunction

  task automatic run(input int kind, input string name, input real published);
    logic [DW-1:0] rd, d;
    int one, l;
    real util;
    rst_n = 0;
    repeat (3) @(negedge clk);
    n_hw = 0; n_nc = 0; n_col = 0; n_cu = 0;
    rst_n = 1;
    wait (ready);
    for (int i = 0; i < K; i++) shadow[i] = '0;
    one = $urandom_range(0, K - 1);
    hot_set.delete();
    while (hot_set.size() < (3 * K + 99) / 100) begin
      l = $urandom_range(0, K - 1);
      if (!(l inside {hot_set})) hot_set.push_back(l);
    end
    while (!eol) begin
      case (kind)
        0: l = one;
        1: l = hot_set[$urandom_range(0, hot_set.size() - 1)];
        2: l = $urandom_range(0, K - 1);
        default: l = zipf_draw();
      endcase
      d = DW'($urandom);
      host_op(1, l, d, rd);
      shadow[l] = d;
    end
    @(negedge clk);
    while (!h_req_ready) @(negedge clk);
    util = real'(n_hw) / real'(W_MAX * N);
    $display("%-8s host writes %0d physical writes %0d utilization %.3f (published %.2f) regular remaps %0d (colliding %0d) catch-ups %0d",
             name, n_hw, phys_writes, util, published, n_nc + n_col, n_col, n_cu);
    check(util > published - 0.12 && util < published + 0.12,
          $sformatf("%s utilization %.3f vs %.2f", name, util, published));
    // the last write hit end of life: drop it from the comparison
    for (int i = 0; i < K; i++) begin
      if (i == l) continue;
      host_op(0, i, '0, rd);
      if (rd != shadow[i]) begin
        check(0, $sformatf("%s read back LLA %0d", name, i));
        break;
      end
    end
    checks++;
  endtask

  initial begin
    real h;
    h = 0.0;
    for (int i = 0; i < K; i++) h += 1.0 / real'(i + 1);
    zipf_cdf[0] = 1.0 / h;
    for (int i = 1; i < K; i++) zipf_cdf[i] = zipf_cdf[i-1] + 1.0 / (real'(i + 1) * h);
    #3;
    run(0, "1-LLA", 0.61);
    run(1, "stress", 0.73);
    run(2, "uniform", 0.65);
    run(3, "zipf", 0.55);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
