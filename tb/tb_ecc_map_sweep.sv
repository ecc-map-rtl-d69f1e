// tb_ecc_map_sweep: utilization trends over the system variables of the
// evaluation, at N = 256 lines (a quarter of the reference size; results
// depend on N/w_max rather than on N). Each case runs until end of life.
//  * size-to-endurance ratio N/w_max = 0.5, 1, 2, 4, 8 (w_max = 512 .. 32),
//    S = 32, spare 0.2: 1-LLA utilization falls as the ratio grows, Zipf
//    does not fall; at ratio 8 1-LLA lies within 0.12 of the 0.61 published
//    for N = 1024 (size insensitivity).
//  * window size S = 16, 32, 64 at ratio 0.5, run at N = 512 (w_max = 1024):
//    1-LLA gains clearly from 16 to 32 and every S keeps utilization above
//    0.6; stress changes less than 1-LLA from 16 to 32. (Larger S leaves a threshold margin of only N/S writes, so at
//    N = 256 the S = 64 case loses utilization to the scatter of catch-up
//    copies; at N = 1024 the three sizes gave 0.75, 0.92 and 0.93.)
//  * spare factor 0.10, 0.15, 0.20, 0.25 (K = 230, 217, 204, 192) at
//    ratio 0.5: 1-LLA and Zipf gain from 0.10 to 0.15, and 1-LLA gains less
//    from 0.20 to 0.25 than from 0.10 to 0.15.
module tb_ecc_map_sweep;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  localparam int NC = 20;
  logic done [NC];
  int hw [NC];
  longint unsigned pw [NC];

  // ratio sweep, 1-LLA (0..4) and Zipf (5..9)
  wl_harness #(.M(8), .K(204), .W_MAX(512)) r0 (.clk, .rst_n, .start, .kind(0), .done(done[0]), .host_writes(hw[0]), .phys_writes(pw[0]));
  wl_harness #(.M(8), .K(204), .W_MAX(256)) r1 (.clk, .rst_n, .start, .kind(0), .done(done[1]), .host_writes(hw[1]), .phys_writes(pw[1]));
  wl_harness #(.M(8), .K(204), .W_MAX(128)) r2 (.clk, .rst_n, .start, .kind(0), .done(done[2]), .host_writes(hw[2]), .phys_writes(pw[2]));
  wl_harness #(.M(8), .K(204), .W_MAX(64))  r3 (.clk, .rst_n, .start, .kind(0), .done(done[3]), .host_writes(hw[3]), .phys_writes(pw[3]));
  wl_harness #(.M(8), .K(204), .W_MAX(32))  r4 (.clk, .rst_n, .start, .kind(0), .done(done[4]), .host_writes(hw[4]), .phys_writes(pw[4]));
  wl_harness #(.M(8), .K(204), .W_MAX(512)) z0 (.clk, .rst_n, .start, .kind(3), .done(done[5]), .host_writes(hw[5]), .phys_writes(pw[5]));
  wl_harness #(.M(8), .K(204), .W_MAX(256)) z1 (.clk, .rst_n, .start, .kind(3), .done(done[6]), .host_writes(hw[6]), .phys_writes(pw[6]));
  wl_harness #(.M(8), .K(204), .W_MAX(128)) z2 (.clk, .rst_n, .start, .kind(3), .done(done[7]), .host_writes(hw[7]), .phys_writes(pw[7]));
  wl_harness #(.M(8), .K(204), .W_MAX(64))  z3 (.clk, .rst_n, .start, .kind(3), .done(done[8]), .host_writes(hw[8]), .phys_writes(pw[8]));
  wl_harness #(.M(8), .K(204), .W_MAX(32))  z4 (.clk, .rst_n, .start, .kind(3), .done(done[9]), .host_writes(hw[9]), .phys_writes(pw[9]));
  // window size, 1-LLA at ratio 0.5 with N = 512 (10..11, 16)
  wl_harness #(.M(9), .K(409), .S(16), .W_MAX(1024)) s16 (.clk, .rst_n, .start, .kind(0), .done(done[10]), .host_writes(hw[10]), .phys_writes(pw[10]));
  wl_harness #(.M(9), .K(409), .S(64), .W_MAX(1024)) s64 (.clk, .rst_n, .start, .kind(0), .done(done[11]), .host_writes(hw[11]), .phys_writes(pw[11]));
  wl_harness #(.M(9), .K(409), .S(32), .W_MAX(1024)) s32 (.clk, .rst_n, .start, .kind(0), .done(done[16]), .host_writes(hw[16]), .phys_writes(pw[16]));
  // window size, stress at ratio 0.5 with N = 512 (17..18)
  wl_harness #(.M(9), .K(409), .S(16), .W_MAX(1024)) t16 (.clk, .rst_n, .start, .kind(1), .done(done[17]), .host_writes(hw[17]), .phys_writes(pw[17]));
  wl_harness #(.M(9), .K(409), .S(32), .W_MAX(1024)) t32 (.clk, .rst_n, .start, .kind(1), .done(done[18]), .host_writes(hw[18]), .phys_writes(pw[18]));
  // spare factor 0.25, 1-LLA (19)
  wl_harness #(.M(8), .K(192), .W_MAX(512)) p25 (.clk, .rst_n, .start, .kind(0), .done(done[19]), .host_writes(hw[19]), .phys_writes(pw[19]));
  // spare factor 0.10 and 0.15 (0.20 is r0 / z0), 1-LLA and Zipf, and 0.25 1-LLA
  wl_harness #(.M(8), .K(230), .W_MAX(512)) p10 (.clk, .rst_n, .start, .kind(0), .done(done[12]), .host_writes(hw[12]), .phys_writes(pw[12]));
  wl_harness #(.M(8), .K(217), .W_MAX(512)) p15 (.clk, .rst_n, .start, .kind(0), .done(done[13]), .host_writes(hw[13]), .phys_writes(pw[13]));
  wl_harness #(.M(8), .K(230), .W_MAX(512)) q10 (.clk, .rst_n, .start, .kind(3), .done(done[14]), .host_writes(hw[14]), .phys_writes(pw[14]));
  wl_harness #(.M(8), .K(217), .W_MAX(512)) q15 (.clk, .rst_n, .start, .kind(3), .done(done[15]), .host_writes(hw[15]), .phys_writes(pw[15]));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_done();
    for (int i = 0; i < NC; i++) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin
    real u [NC];
    int  wm [NC] = '{512, 256, 128, 64, 32, 512, 256, 128, 64, 32, 1024, 1024, 512, 512, 512, 512, 1024, 1024, 1024, 512};
    int  nl [NC] = '{256, 256, 256, 256, 256, 256, 256, 256, 256, 256, 512, 512, 256, 256, 256, 256, 512, 512, 512, 256};
    string nm [NC] = '{"1-LLA N/w=0.5", "1-LLA N/w=1", "1-LLA N/w=2", "1-LLA N/w=4", "1-LLA N/w=8",
                       "zipf N/w=0.5", "zipf N/w=1", "zipf N/w=2", "zipf N/w=4", "zipf N/w=8",
                       "1-LLA S=16", "1-LLA S=64", "1-LLA rho=0.10", "1-LLA rho=0.15",
                       "zipf rho=0.10", "zipf rho=0.15", "1-LLA S=32",
                       "stress S=16", "stress S=32", "1-LLA rho=0.25"};
    #23 rst_n = 1;
    @(negedge clk) start = 1;
    while (!all_done()) @(negedge clk);
    for (int i = 0; i < NC; i++) begin
      u[i] = real'(hw[i]) / (real'(wm[i]) * real'(nl[i]));
      $display("%-16s host writes %0d physical %0d utilization %.3f", nm[i], hw[i], pw[i], u[i]);
    end
    check(u[0] > u[4], "1-LLA falls from N/w=0.5 to 8");
    for (int i = 1; i < 5; i++) check(u[i] < u[i-1] + 0.03, $sformatf("1-LLA not rising at step %0d", i));
    check(u[9] > u[5] - 0.03, "zipf does not fall from N/w=0.5 to 8");
    check(u[4] > 0.49 && u[4] < 0.73, "1-LLA at N/w=8 near 0.61");
    check(u[16] > u[10] + 0.05, "1-LLA gains from S=16 to S=32");
    for (int i = 10; i < 17; i += (i == 11) ? 5 : 1) check(u[i] > 0.6, $sformatf("%s above 0.6", nm[i]));
    check(u[13] > u[12], "1-LLA gains from rho=0.10 to 0.15");
    check(u[15] > u[14], "zipf gains from rho=0.10 to 0.15");
    check(u[19] - u[0] < u[13] - u[12], "1-LLA gains less from rho=0.20 to 0.25");
    check((u[18] > u[17] ? u[18] - u[17] : u[17] - u[18]) < u[16] - u[10],
          "stress less sensitive to S than 1-LLA");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
