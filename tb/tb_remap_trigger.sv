// tb_remap_trigger: self-checking test of the trigger threshold and rule.
// Expected thresholds are worked out by hand from the threshold formula:
//   N=1024, S=32, w_max=2048: alpha = 1 - 1024/65536  -> phi = 2016
//   N=1024, S=32, w_max=128 : alpha = 1 - 1024/4096   -> phi = 96
//   same with an 80 % cap (w_max=2048)                -> phi = 1638
//   N=1024, S=32, w_max=8   : N/w_max >= S/3, alpha = 2/3 -> phi = 5
// The trigger must fire only for host writes with wear above phi.
module tb_remap_trigger;
  int checks = 0, failures = 0;

  logic hw;
  logic [15:0] wear;
  logic t0, t1, t2, t3;

  remap_trigger                                  u0 (.host_write(hw), .wear, .trigger(t0));
  remap_trigger #(.W_MAX(128))                   u1 (.host_write(hw), .wear, .trigger(t1));
  remap_trigger #(.CAP_PCT(80))                  u2 (.host_write(hw), .wear, .trigger(t2));
  remap_trigger #(.W_MAX(8))                     u3 (.host_write(hw), .wear, .trigger(t3));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic edge_check(input int phi, input int which);
    logic t;
    hw = 1; wear = 16'(phi); #1;
    t = (which == 0) ? t0 : (which == 1) ? t1 : (which == 2) ? t2 : t3;
    check(!t, $sformatf("inst %0d no trigger at wear=phi=%0d", which, phi));
    wear = 16'(phi + 1); #1;
    t = (which == 0) ? t0 : (which == 1) ? t1 : (which == 2) ? t2 : t3;
    check(t, $sformatf("inst %0d trigger at wear=phi+1", which));
    hw = 0; #1;
    t = (which == 0) ? t0 : (which == 1) ? t1 : (which == 2) ? t2 : t3;
    check(!t, $sformatf("inst %0d no trigger for non-host write", which));
  endtask

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(u0.PHI == 2016, $sformatf("phi default %0d", u0.PHI));
    check(u1.PHI == 96,   $sformatf("phi w128 %0d", u1.PHI));
    check(u2.PHI == 1638, $sformatf("phi cap80 %0d", u2.PHI));
    check(u3.PHI == 5,    $sformatf("phi w8 %0d", u3.PHI));
    edge_check(2016, 0);
    edge_check(96, 1);
    edge_check(1638, 2);
    edge_check(5, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
