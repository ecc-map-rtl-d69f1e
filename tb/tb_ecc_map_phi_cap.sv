// tb_ecc_map_phi_cap: effect of the trigger threshold at the reference
// size-to-endurance ratio N/w_max = 0.5, S = 32, spare factor 0.2,
// simulated at a quarter of the reference size (N = 256, K = 204,
// w_max = 512; utilization depends on the ratio, not the absolute size, and
// at N = 1024 the same runs take over 5 minutes). Each run goes until the
// medium reports end of life.
//  * Cap: with phi from the threshold formula (504 = (1 - 1/64) of w_max,
//    as at N = 1024) the Zipf workload is expected to reach a utilization of
//    about 0.4; with phi = min(phi_opt, 0.8 w_max) = 409 it is expected to
//    exceed 0.7. (At N = 1024, w_max = 2048 this RTL gave 0.449 and 0.731.)
//    Checks: uncapped Zipf in 0.3 .. 0.5, capped above 0.65, the cap
//    improves Zipf, and 1-LLA and stress lose less than 0.2 to it.
//  * Threshold 5 % above phi_opt (529 > w_max): a line can be driven past
//    w_max by host writes alone, so 1-LLA and stress end almost at once
//    (checked below 0.05) while uniform traffic, which rarely concentrates
//    on one line, keeps a utilization above 0.6.
//  * Threshold below phi_opt (65, 80, 90 % of it): 1-LLA utilization rises
//    with the threshold up to phi_opt (checked as never falling by more
//    than 0.03 from one step to the next), while Zipf does better at 80 %
//    than at phi_opt.
module tb_ecc_map_phi_cap;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic done [15];
  int hw [15];
  longint unsigned pw [15];

  // 0/1: Zipf, 2/3: 1-LLA, 4/5: stress; even = uncapped, odd = 80 % cap
  wl_harness #(.M(8), .K(204), .W_MAX(512), .CAP_PCT(100)) ua (.clk, .rst_n, .start, .kind(3),
    .done(done[0]), .host_writes(hw[0]), .phys_writes(pw[0]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .CAP_PCT(80))  ub (.clk, .rst_n, .start, .kind(3),
    .done(done[1]), .host_writes(hw[1]), .phys_writes(pw[1]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .CAP_PCT(100)) uc (.clk, .rst_n, .start, .kind(0),
    .done(done[2]), .host_writes(hw[2]), .phys_writes(pw[2]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .CAP_PCT(80))  ud (.clk, .rst_n, .start, .kind(0),
    .done(done[3]), .host_writes(hw[3]), .phys_writes(pw[3]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .CAP_PCT(100)) ue (.clk, .rst_n, .start, .kind(1),
    .done(done[4]), .host_writes(hw[4]), .phys_writes(pw[4]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .CAP_PCT(80))  uf (.clk, .rst_n, .start, .kind(1),
    .done(done[5]), .host_writes(hw[5]), .phys_writes(pw[5]));
  // 6..8: 1-LLA, stress, uniform with phi 5 % above phi_opt
  wl_harness #(.M(8), .K(204), .W_MAX(512), .PHI_PCT(105)) ug (.clk, .rst_n, .start, .kind(0),
    .done(done[6]), .host_writes(hw[6]), .phys_writes(pw[6]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .PHI_PCT(105)) uh (.clk, .rst_n, .start, .kind(1),
    .done(done[7]), .host_writes(hw[7]), .phys_writes(pw[7]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .PHI_PCT(105)) ui (.clk, .rst_n, .start, .kind(2),
    .done(done[8]), .host_writes(hw[8]), .phys_writes(pw[8]));
  // 9..11: 1-LLA and 12..14: Zipf with phi at 65, 80, 90 % of phi_opt
  wl_harness #(.M(8), .K(204), .W_MAX(512), .PHI_PCT(65)) t65 (.clk, .rst_n, .start, .kind(0),
    .done(done[9]), .host_writes(hw[9]), .phys_writes(pw[9]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .PHI_PCT(80)) t80 (.clk, .rst_n, .start, .kind(0),
    .done(done[10]), .host_writes(hw[10]), .phys_writes(pw[10]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .PHI_PCT(90)) t90 (.clk, .rst_n, .start, .kind(0),
    .done(done[11]), .host_writes(hw[11]), .phys_writes(pw[11]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .PHI_PCT(65)) z65 (.clk, .rst_n, .start, .kind(3),
    .done(done[12]), .host_writes(hw[12]), .phys_writes(pw[12]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .PHI_PCT(80)) z80 (.clk, .rst_n, .start, .kind(3),
    .done(done[13]), .host_writes(hw[13]), .phys_writes(pw[13]));
  wl_harness #(.M(8), .K(204), .W_MAX(512), .PHI_PCT(90)) z90 (.clk, .rst_n, .start, .kind(3),
    .done(done[14]), .host_writes(hw[14]), .phys_writes(pw[14]));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real u [15];
    string nm [15] = '{"zipf", "zipf capped", "1-LLA", "1-LLA capped", "stress", "stress capped",
                       "1-LLA phi+5%", "stress phi+5%", "uniform phi+5%",
                       "1-LLA phi*0.65", "1-LLA phi*0.80", "1-LLA phi*0.90",
                       "zipf phi*0.65", "zipf phi*0.80", "zipf phi*0.90"};
    real one_lla [4];
    #23 rst_n = 1;
    @(negedge clk) start = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] &&
          done[6] && done[7] && done[8] && done[9] && done[10] && done[11] &&
          done[12] && done[13] && done[14]);
    for (int i = 0; i < 15; i++) begin
      u[i] = real'(hw[i]) / (512.0 * 256.0);
      $display("%-14s host writes %0d physical %0d utilization %.3f", nm[i], hw[i], pw[i], u[i]);
    end
    check(ua.dut.PHI == 504 && ub.dut.PHI == 409, "thresholds");
    check(u[0] > 0.3 && u[0] < 0.5, "uncapped zipf about 0.4");
    check(u[1] > 0.65, "capped zipf above 0.7");
    check(u[1] > u[0], "cap improves zipf");
    check(u[2] - u[3] < 0.2, "cap costs 1-LLA little");
    check(u[4] - u[5] < 0.2, "cap costs stress little");
    check(ug.PHI == 529, "threshold 5 % above phi_opt");
    check(u[6] < 0.05, "1-LLA collapses above phi_opt");
    check(u[7] < 0.05, "stress collapses above phi_opt");
    check(u[8] > 0.6, "uniform holds above phi_opt");
    one_lla = '{u[9], u[10], u[11], u[2]};
    for (int i = 1; i < 4; i++)
      check(one_lla[i] > one_lla[i-1] - 0.03, $sformatf("1-LLA not falling at threshold step %0d", i));
    check(u[2] > u[9], "1-LLA best near phi_opt");
    check(u[13] > u[0], "zipf better at 80 % of phi_opt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
