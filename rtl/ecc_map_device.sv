// ecc_map_device: ECC-Map wear-levelling controller of an endurance-limited
// memory device (top level).
//
// The device holds N = 2^M physical lines (PLAs) and exposes K < N logical
// lines (LLAs). Every LLA is placed by one member f_i of a family of
// mapping functions (cyclic-code encoders, ecc_map_fn); all LLAs use indices
// in a sliding window base..base+S-1, so the mapping table (map_table)
// stores only i mod S per LLA and a global base register completes it.
// Index i is randomised by an LFSR (lfsr_window) before entering f.
//
// Operations:
//  * format (after reset): every LLA is placed at f_base(LLA) and its
//    compact index is written to the table and to the line's metadata.
//  * host read: table -> index -> PLA -> media read -> response.
//  * host write: the mapped PLA is read for its wear estimate; if it is
//    above PHI (remap_trigger) the LLA is remapped first, otherwise it is
//    written in place.
//  * regular remapping: the LLA moves from index i to i+1. If f_{i+1}(LLA)
//    is free the data is written there (non-colliding). Otherwise the
//    occupant LLA' (index j, found by inverse mapping the stored metadata)
//    is moved to the first free f_{j+d}(LLA'), d = 1, 2, ... (one internal
//    copy), and then the host data is written at f_{i+1}(LLA).
//  * catch-up: when i+1, or j+d, would leave the window, base is advanced
//    by S and every LLA is moved to index base+S. Moves follow the chains
//    of the permutation f_base+S o f_old^-1 with one line buffer, so no data
//    is overwritten before it is read. Afterwards the pending host write
//    goes to the LLA's new PLA.
// A PLA is "in use" when the LLA obtained by inverse-mapping it with the
// index stored in its own metadata is below K, currently holds that index
// in the table and (during a catch-up) has not been moved yet. Because
// every placement writes the metadata, this test is exact, and vacated
// PLAs never need to be invalidated.
//
// Host interface: valid/ready request (we, lla, wdata), accepted only when
// the controller is idle and formatted; a read answers with a one-cycle
// rsp_valid pulse. Accesses to LLA >= K are dropped (reads answer zero).
// Media interface: req is held with we/addr/wdata/wmeta until ack; on the
// ack cycle of a read, rdata, rmeta (stored compact index) and rwear (wear
// estimate) are valid. Event outputs pulse for one cycle per occurrence.
//
// Follows the published architecture: mapping functions, window and compact index, trigger
// policy (host writes only), regular and catch-up remapping with base += S,
// LFSR randomisation, metadata stored on the line. This design's choices:
// the in-use test, the format pass, the catch-up move order and its moved
// bit, giving up a collision whose victim would leave the window in favour
// of a catch-up, no second trigger check on the remapped target, and all
// handshakes and widths.
module ecc_map_device
  import ecc_map_pkg::*;
#(
  parameter int unsigned M       = 10,      // log2 N, N = 1024 PLAs
  parameter int unsigned K       = 819,     // LLAs: spare factor (N-K)/N = 0.2
  parameter int unsigned S       = 32,      // mapping window size
  parameter int unsigned W_MAX   = 2048,    // endurance: N/w_max = 0.5
  parameter int unsigned CAP_PCT = 100,     // phi cap in % of w_max
  parameter int unsigned DATA_W  = 4096,    // line size in bits (512 B)
  parameter int unsigned WEAR_W  = 16,      // width of the wear estimate
  parameter int unsigned PHI     = phi_opt(1 << M, S, W_MAX, CAP_PCT),
  localparam int unsigned SW     = $clog2(S)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [M-1:0]      seed,          // LFSR seed (random source)
  // host side
  input  logic              h_req_valid,
  output logic              h_req_ready,
  input  logic              h_req_we,
  input  logic [M-1:0]      h_req_lla,
  input  logic [DATA_W-1:0] h_req_wdata,
  output logic              h_rsp_valid,
  output logic [DATA_W-1:0] h_rsp_rdata,
  // media side
  output logic              m_req,
  output logic              m_we,
  output logic [M-1:0]      m_addr,
  output logic [DATA_W-1:0] m_wdata,
  output logic [SW-1:0]     m_wmeta,
  input  logic              m_ack,
  input  logic [DATA_W-1:0] m_rdata,
  input  logic [SW-1:0]     m_rmeta,
  input  logic [WEAR_W-1:0] m_rwear,
  // status and events
  output logic              ready,         // format pass complete
  output logic [31:0]       base,          // current window base index
  output logic              ev_host_write, // a host write was completed
  output logic              ev_remap_nc,   // non-colliding regular remapping
  output logic              ev_remap_col,  // colliding regular remapping
  output logic              ev_catchup,    // catch-up remapping completed
  output logic              ev_copy        // internal-copy write issued
);

  typedef enum logic [4:0] {
    ST_FMT_WAIT, ST_FMT_TBL, ST_FMT_ISSUE, ST_FMT_ACK,
    ST_IDLE, ST_LOOK, ST_LOOK2, ST_HRD_ACK,
    ST_REMAP, ST_REMAP2, ST_R_REG,
    ST_VPROBE, ST_VPROBE2, ST_R_VICT, ST_VWR_ACK,
    ST_CHK_ACK, ST_CHK_INV, ST_CHK_TBL,
    ST_CU_START, ST_CU_SWEEP, ST_CU_RDOLD, ST_CU_RDOLD_ACK, ST_CU_TGT,
    ST_R_CU, ST_CU_WR_ACK, ST_CU_DONE, ST_CU_LFSR, ST_CU_FIN,
    ST_FIN_ISSUE, ST_FIN_ACK
  } state_t;

  state_t state, ret_state;

  logic              c_used, epoch, cu_active;

  // ---------------------------------------------------------------- blocks
  logic              lfsr_adv, lfsr_busy;
  logic [S:0][M-1:0] nums;

  lfsr_window #(.M(M), .S(S)) u_lfsr (
    .clk, .rst_n, .seed, .advance(lfsr_adv), .busy(lfsr_busy), .nums
  );

  logic [M-1:0]  f_lla, fwd_pla, c_pla, c_lla_w;
  logic [SW:0]   f_off;
  logic [SW-1:0] c_cidx, base_mod, c_off;

  assign base_mod = base[SW-1:0];
  assign c_off    = c_cidx - base_mod;

  ecc_map_fn #(.M(M)) u_fn (
    .fwd_lla(f_lla), .fwd_num(nums[f_off]), .fwd_pla,
    .inv_pla(c_pla), .inv_num(nums[{1'b0, c_off}]), .inv_lla(c_lla_w)
  );

  logic          tbl_we, tbl_moved_rd;
  logic [M-1:0]  tbl_raddr, tbl_waddr;
  logic [SW-1:0] tbl_cidx_rd, tbl_cidx_wr;

  map_table #(.K(K), .S(S), .AW(M)) u_tbl (
    .clk, .rd_addr(tbl_raddr), .rd_cidx(tbl_cidx_rd), .rd_moved(tbl_moved_rd),
    .wr_en(tbl_we), .wr_addr(tbl_waddr), .wr_cidx(tbl_cidx_wr), .wr_moved(epoch)
  );

  logic trig;
  logic h_we;

  remap_trigger #(.N(1 << M), .S(S), .W_MAX(W_MAX), .CAP_PCT(CAP_PCT),
                  .WEAR_W(WEAR_W), .PHI(PHI)) u_trig (
    .host_write(h_we), .wear(m_rwear), .trigger(trig)
  );

  // ------------------------------------------------------------- registers
  logic [M-1:0]      h_lla, x, cur, c_lla, v_lla;
  logic [DATA_W-1:0] h_wdata, c_data, buf_q, v_data;
  logic [SW:0]       h_off, d_off;
  logic [M-1:0]      p_cur, p_new, p_vt, fin_pla;
  logic [SW-1:0]     fin_cidx;

  // ----------------------------------------------------- table port decode
  always_comb begin
    unique case (state)
      ST_CHK_TBL:  tbl_raddr = c_lla;
      ST_CU_SWEEP: tbl_raddr = x;
      default:     tbl_raddr = h_lla;
    endcase
    tbl_we      = 1'b0;
    tbl_waddr   = h_lla;
    tbl_cidx_wr = fin_cidx;
    unique case (state)
      ST_FMT_TBL: begin
        tbl_we = 1'b1; tbl_waddr = x; tbl_cidx_wr = base_mod;
      end
      ST_R_VICT: begin
        tbl_we = !c_used; tbl_waddr = v_lla; tbl_cidx_wr = base_mod + d_off[SW-1:0];
      end
      ST_R_CU: begin
        tbl_we = 1'b1; tbl_waddr = cur; tbl_cidx_wr = base_mod;
      end
      ST_FIN_ISSUE: begin
        tbl_we = 1'b1; tbl_waddr = h_lla; tbl_cidx_wr = fin_cidx;
      end
      default: ;
    endcase
  end

  assign h_req_ready = (state == ST_IDLE);
  assign ready       = (state != ST_FMT_WAIT) && (state != ST_FMT_TBL) &&
                       (state != ST_FMT_ISSUE) && (state != ST_FMT_ACK);

  // in-use test result, available in ST_CHK_TBL
  logic used_now;
  assign used_now = (32'(c_lla) < K) && (tbl_cidx_rd == c_cidx) &&
                    !(cu_active && (tbl_moved_rd == epoch));

  // ------------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_FMT_WAIT;
      ret_state     <= ST_IDLE;
      base          <= 32'd1;          // index 0 is skipped (randomised setting)
      epoch         <= 1'b0;
      cu_active     <= 1'b0;
      x             <= '0;
      cur           <= '0;
      h_lla         <= '0;
      h_we          <= 1'b0;
      h_wdata       <= '0;
      h_off         <= '0;
      d_off         <= '0;
      f_lla         <= '0;
      f_off         <= '0;
      c_pla         <= '0;
      c_cidx        <= '0;
      c_lla         <= '0;
      c_data        <= '0;
      c_used        <= 1'b0;
      v_lla         <= '0;
      v_data        <= '0;
      buf_q         <= '0;
      p_cur         <= '0;
      p_new         <= '0;
      p_vt          <= '0;
      fin_pla       <= '0;
      fin_cidx      <= '0;
      m_req         <= 1'b0;
      m_we          <= 1'b0;
      m_addr        <= '0;
      m_wdata       <= '0;
      m_wmeta       <= '0;
      h_rsp_valid   <= 1'b0;
      h_rsp_rdata   <= '0;
      lfsr_adv      <= 1'b0;
      ev_host_write <= 1'b0;
      ev_remap_nc   <= 1'b0;
      ev_remap_col  <= 1'b0;
      ev_catchup    <= 1'b0;
      ev_copy       <= 1'b0;
    end else begin
      h_rsp_valid   <= 1'b0;
      lfsr_adv      <= 1'b0;
      ev_host_write <= 1'b0;
      ev_remap_nc   <= 1'b0;
      ev_remap_col  <= 1'b0;
      ev_catchup    <= 1'b0;
      ev_copy       <= 1'b0;

      unique case (state)
        // ---------------- format: place every LLA at f_base(LLA)
        ST_FMT_WAIT: if (!lfsr_busy) begin
          x     <= '0;
          state <= ST_FMT_TBL;
        end
        ST_FMT_TBL: begin
          f_lla <= x;
          f_off <= '0;
          state <= ST_FMT_ISSUE;
        end
        ST_FMT_ISSUE: begin
          m_req   <= 1'b1;
          m_we    <= 1'b1;
          m_addr  <= fwd_pla;
          m_wdata <= '0;
          m_wmeta <= base_mod;
          state   <= ST_FMT_ACK;
        end
        ST_FMT_ACK: if (m_ack) begin
          m_req <= 1'b0;
          x     <= x + 1'b1;
          state <= (32'(x) == K - 1) ? ST_IDLE : ST_FMT_TBL;
        end

        // ---------------- host access
        ST_IDLE: if (h_req_valid) begin
          h_lla   <= h_req_lla;
          h_we    <= h_req_we;
          h_wdata <= h_req_wdata;
          if (32'(h_req_lla) >= K) begin
            h_rsp_valid <= !h_req_we;
            h_rsp_rdata <= '0;
          end else begin
            state <= ST_LOOK;
          end
        end
        ST_LOOK: begin
          f_lla <= h_lla;
          f_off <= {1'b0, tbl_cidx_rd - base_mod};
          h_off <= {1'b0, tbl_cidx_rd - base_mod};
          state <= ST_LOOK2;
        end
        ST_LOOK2: begin
          p_cur  <= fwd_pla;
          m_req  <= 1'b1;
          m_we   <= 1'b0;
          m_addr <= fwd_pla;
          state  <= ST_HRD_ACK;
        end
        ST_HRD_ACK: if (m_ack) begin
          m_req <= 1'b0;
          if (!h_we) begin
            h_rsp_valid <= 1'b1;
            h_rsp_rdata <= m_rdata;
            state       <= ST_IDLE;
          end else if (trig) begin
            state <= ST_REMAP;
          end else begin
            fin_pla  <= p_cur;
            fin_cidx <= base_mod + h_off[SW-1:0];
            state    <= ST_FIN_ISSUE;
          end
        end

        // ---------------- regular remapping of the host LLA to i+1
        ST_REMAP: begin
          if (32'(h_off) + 1 >= S) begin
            state <= ST_CU_START;
          end else begin
            f_lla <= h_lla;
            f_off <= h_off + 1'b1;
            state <= ST_REMAP2;
          end
        end
        ST_REMAP2: begin
          p_new     <= fwd_pla;
          m_req     <= 1'b1;
          m_we      <= 1'b0;
          m_addr    <= fwd_pla;
          ret_state <= ST_R_REG;
          state     <= ST_CHK_ACK;
        end
        ST_R_REG: begin
          if (!c_used) begin
            ev_remap_nc <= 1'b1;
            fin_pla     <= p_new;
            fin_cidx    <= base_mod + h_off[SW-1:0] + 1'b1;
            state       <= ST_FIN_ISSUE;
          end else begin
            v_lla  <= c_lla;
            v_data <= c_data;
            d_off  <= {1'b0, c_off} + 1'b1;
            state  <= ST_VPROBE;
          end
        end
        // victim LLA' moves to the first free f_{j+d}(LLA')
        ST_VPROBE: begin
          if (32'(d_off) >= S) begin
            state <= ST_CU_START;
          end else begin
            f_lla <= v_lla;
            f_off <= d_off;
            state <= ST_VPROBE2;
          end
        end
        ST_VPROBE2: begin
          p_vt      <= fwd_pla;
          m_req     <= 1'b1;
          m_we      <= 1'b0;
          m_addr    <= fwd_pla;
          ret_state <= ST_R_VICT;
          state     <= ST_CHK_ACK;
        end
        ST_R_VICT: begin
          if (c_used) begin
            d_off <= d_off + 1'b1;
            state <= ST_VPROBE;
          end else begin
            m_req   <= 1'b1;
            m_we    <= 1'b1;
            m_addr  <= p_vt;
            m_wdata <= v_data;
            m_wmeta <= base_mod + d_off[SW-1:0];
            ev_copy <= 1'b1;
            state   <= ST_VWR_ACK;
          end
        end
        ST_VWR_ACK: if (m_ack) begin
          m_req        <= 1'b0;
          ev_remap_col <= 1'b1;
          fin_pla      <= p_new;
          fin_cidx     <= base_mod + h_off[SW-1:0] + 1'b1;
          state        <= ST_FIN_ISSUE;
        end

        // ---------------- in-use test of the PLA being read (subroutine)
        ST_CHK_ACK: if (m_ack) begin
          m_req  <= 1'b0;
          c_pla  <= m_addr;
          c_cidx <= m_rmeta;
          c_data <= m_rdata;
          state  <= ST_CHK_INV;
        end
        ST_CHK_INV: begin
          c_lla <= c_lla_w;
          state <= ST_CHK_TBL;
        end
        ST_CHK_TBL: begin
          c_used <= used_now;
          state  <= ret_state;
        end

        // ---------------- catch-up: base += S, all LLAs to the new base
        ST_CU_START: begin
          epoch     <= ~epoch;
          cu_active <= 1'b1;
          x         <= '0;
          state     <= ST_CU_SWEEP;
        end
        ST_CU_SWEEP: begin
          if (32'(x) >= K) begin
            state <= ST_CU_DONE;
          end else if (tbl_moved_rd == epoch) begin
            x <= x + 1'b1;
          end else begin
            cur   <= x;
            f_lla <= x;
            f_off <= {1'b0, tbl_cidx_rd - base_mod};
            state <= ST_CU_RDOLD;
          end
        end
        ST_CU_RDOLD: begin
          m_req  <= 1'b1;
          m_we   <= 1'b0;
          m_addr <= fwd_pla;
          state  <= ST_CU_RDOLD_ACK;
        end
        ST_CU_RDOLD_ACK: if (m_ack) begin
          m_req <= 1'b0;
          buf_q <= m_rdata;
          f_off <= (SW + 1)'(S);
          state <= ST_CU_TGT;
        end
        ST_CU_TGT: begin
          p_vt      <= fwd_pla;
          m_req     <= 1'b1;
          m_we      <= 1'b0;
          m_addr    <= fwd_pla;
          ret_state <= ST_R_CU;
          state     <= ST_CHK_ACK;
        end
        ST_R_CU: begin
          m_req   <= 1'b1;
          m_we    <= 1'b1;
          m_addr  <= p_vt;
          m_wdata <= buf_q;
          m_wmeta <= base_mod;
          ev_copy <= 1'b1;
          state   <= ST_CU_WR_ACK;
        end
        ST_CU_WR_ACK: if (m_ack) begin
          m_req <= 1'b0;
          if (c_used) begin
            // follow the chain: the displaced LLA moves next
            cur   <= c_lla;
            f_lla <= c_lla;
            buf_q <= c_data;
            state <= ST_CU_TGT;
          end else begin
            x     <= x + 1'b1;
            state <= ST_CU_SWEEP;
          end
        end
        ST_CU_DONE: begin
          base      <= base + S;
          cu_active <= 1'b0;
          lfsr_adv  <= 1'b1;
          state     <= ST_CU_LFSR;
        end
        ST_CU_LFSR: if (!lfsr_busy && !lfsr_adv) begin
          f_lla <= h_lla;
          f_off <= '0;
          state <= ST_CU_FIN;
        end
        ST_CU_FIN: begin
          ev_catchup <= 1'b1;
          fin_pla    <= fwd_pla;
          fin_cidx   <= base_mod;
          state      <= ST_FIN_ISSUE;
        end

        // ---------------- final host-data write
        ST_FIN_ISSUE: begin
          m_req   <= 1'b1;
          m_we    <= 1'b1;
          m_addr  <= fin_pla;
          m_wdata <= h_wdata;
          m_wmeta <= fin_cidx;
          state   <= ST_FIN_ACK;
        end
        ST_FIN_ACK: if (m_ack) begin
          m_req         <= 1'b0;
          ev_host_write <= 1'b1;
          state         <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ assertions
  // A media request is held, unchanged, until it is acknowledged; host
  // requests are only accepted once the format pass is complete.
  logic         a_hold_q, a_we_q;
  logic [M-1:0] a_addr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_hold_q <= 1'b0;
      a_we_q   <= 1'b0;
      a_addr_q <= '0;
    end else begin
      a_hold_q <= m_req && !m_ack;
      a_we_q   <= m_we;
      a_addr_q <= m_addr;
      if (a_hold_q)
        a_mreq_hold: assert (m_req && (m_addr == a_addr_q) && (m_we == a_we_q))
          else $error("media request changed before ack");
      if (h_req_ready)
        a_ready: assert (ready) else $error("host accepted before format");
    end
  end

endmodule
