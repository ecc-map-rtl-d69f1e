// wl_harness: workload harness for utilization runs. Holds one ECC-Map
// controller and one media model, and a clocked host driver that issues a
// host write on every cycle the controller is ready, drawing the LLA from
// the selected workload (0 = one fixed LLA, 1 = random 3 % hot set,
// 2 = uniform, 3 = Zipf p(i) ~ 1/i over LLA rank i), until the medium
// reports end of life. A pulse on start (with rst_n high) begins a run after
// the controller is formatted; done rises at end of life with host_writes
// and phys_writes holding the counts. Reset the harness between runs.
// PHI_PCT sets the trigger threshold as a percentage of the optimised one
// (after any CAP_PCT cap), for threshold sweeps.
module wl_harness #(
  parameter int unsigned M       = 10,
  parameter int unsigned K       = 819,
  parameter int unsigned S       = 32,
  parameter int unsigned W_MAX   = 2048,
  parameter int unsigned CAP_PCT = 100,
  parameter int unsigned PHI_PCT = 100
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  int              kind,
  output logic            done,
  output int              host_writes,
  output longint unsigned phys_writes
);
  localparam int DW = 16, SW = $clog2(S), WW = 16;
  localparam int unsigned PHI =
    ecc_map_pkg::phi_opt(2**M, S, W_MAX, CAP_PCT) * PHI_PCT / 100;

  logic h_req_valid, h_req_ready, h_rsp_valid;
  logic [M-1:0] h_req_lla;
  logic [DW-1:0] h_rsp_rdata;
  logic m_req, m_we, m_ack;
  logic [M-1:0] m_addr;
  logic [DW-1:0] m_wdata, m_rdata;
  logic [SW-1:0] m_wmeta, m_rmeta;
  logic [WW-1:0] m_rwear;
  logic ready, ev_host_write, ev_remap_nc, ev_remap_col, ev_catchup, ev_copy;
  logic [31:0] base;
  logic eol;
  int unsigned max_wear;

  ecc_map_device #(.M(M), .K(K), .S(S), .W_MAX(W_MAX), .CAP_PCT(CAP_PCT),
                   .PHI(PHI), .DATA_W(DW), .WEAR_W(WW)) dut (
    .clk, .rst_n, .seed(M'('h155)), .h_req_valid, .h_req_ready, .h_req_we(1'b1),
    .h_req_lla, .h_req_wdata(DW'(host_writes)), .h_rsp_valid, .h_rsp_rdata,
    .m_req, .m_we, .m_addr, .m_wdata, .m_wmeta, .m_ack, .m_rdata, .m_rmeta, .m_rwear,
    .ready, .base, .ev_host_write, .ev_remap_nc, .ev_remap_col, .ev_catchup, .ev_copy);

  nvm_media_model #(.M(M), .DATA_W(DW), .SW(SW), .WEAR_W(WW), .W_MAX(W_MAX)) media (
    .clk, .rst_n, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata), .wmeta(m_wmeta),
    .ack(m_ack), .rdata(m_rdata), .rmeta(m_rmeta), .rwear(m_rwear), .eol,
    .phys_writes, .max_wear);

  real zipf_cdf [K];
  int  hot_set [];
  int  one;
  logic running;

  initial begin
    real h;
    h = 0.0;
    for (int i = 0; i < int'(K); i++) h += 1.0 / real'(i + 1);
    zipf_cdf[0] = 1.0 / h;
    for (int i = 1; i < int'(K); i++) zipf_cdf[i] = zipf_cdf[i-1] + 1.0 / (real'(i + 1) * h);
    hot_set = new[(3 * K + 99) / 100];
    for (int i = 0; i < hot_set.size(); i++) hot_set[i] = (i * 797 + 13) % K;
    one = 417 % K;
  end

  function automatic int draw(input int k);
    real u;
    int lo, hi, mid;
    case (k)
      0: return one;
      1: return hot_set[$urandom_range(0, hot_set.size() - 1)];
      2: return $urandom_range(0, K - 1);
      default: begin
        u = real'($urandom) / 4294967296.0;
        lo = 0; hi = K - 1;
        while (lo < hi) begin
          mid = (lo + hi) / 2;
          if (zipf_cdf[mid] < u) lo = mid + 1; else hi = mid;
        end
        return lo;
      end
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= 1'b0;
      done        <= 1'b0;
      host_writes <= 0;
      h_req_valid <= 1'b0;
      h_req_lla   <= '0;
    end else begin
      if (start && ready && !running && !done) begin
        running     <= 1'b1;
        h_req_valid <= 1'b1;
        h_req_lla   <= M'(draw(kind));
      end
      if (running) begin
        if (ev_host_write && !eol) host_writes <= host_writes + 1;
        if (h_req_valid && h_req_ready) h_req_lla <= M'(draw(kind));
        if (eol) begin
          running     <= 1'b0;
          h_req_valid <= 1'b0;
          done        <= 1'b1;
        end
      end
    end
  end
endmodule
