// tb_ecc_map_fn: self-checking test of the forward/inverse mapping
// functions. At M = 6 (N = 64, code (63,57)) it checks exhaustively, for
// every mapping number 1..63 and every LLA: that [LLA | index | PLA] is a
// code word (independent long division by x^6+x+1), that the inverse
// mapping returns the LLA, that each f_i is injective (Property 1) and that
// one LLA never meets the same PLA under two numbers (Property 2). At the
// default M = 10 it checks code-word membership and the round trip on
// random inputs.
module tb_ecc_map_fn;
  int checks = 0, failures = 0;

  logic [5:0] s_lla, s_num, s_pla, s_ipla, s_inum, s_illa;
  ecc_map_fn #(.M(6)) u_s (.fwd_lla(s_lla), .fwd_num(s_num), .fwd_pla(s_pla),
                           .inv_pla(s_ipla), .inv_num(s_inum), .inv_lla(s_illa));

  logic [9:0] b_lla, b_num, b_pla, b_ipla, b_inum, b_illa;
  ecc_map_fn u_b (.fwd_lla(b_lla), .fwd_num(b_num), .fwd_pla(b_pla),
                  .inv_pla(b_ipla), .inv_num(b_inum), .inv_lla(b_illa));

  // remainder of a code word of length n (<= 1023) modulo g of degree r
  function automatic int unsigned rem_long(input logic [1022:0] cw, input int n,
                                           input logic [10:0] gfull, input int r);
    logic [1022:0] v;
    v = cw;
    for (int i = n - 1; i >= r; i--)
      if (v[i]) v = v ^ ({1012'b0, gfull} << (i - r));
    return int'(v[10:0]);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1022:0] cw;
    bit used [64];
    bit seen [64][64];
    for (int l = 0; l < 64; l++) for (int p = 0; p < 64; p++) seen[l][p] = 0;
    for (int n = 1; n < 64; n++) begin
      for (int p = 0; p < 64; p++) used[p] = 0;
      for (int l = 0; l < 64; l++) begin
        s_lla = 6'(l); s_num = 6'(n); #1;
        // code word [LLA | 45 zero bits | num | PLA], length 63
        cw = '0;
        cw[62:57] = s_lla; cw[11:6] = s_num; cw[5:0] = s_pla;
        check(rem_long(cw, 63, 11'h43, 6) == 0, $sformatf("cw n=%0d l=%0d", n, l));
        check(!used[s_pla], $sformatf("P1 n=%0d l=%0d", n, l));
        used[s_pla] = 1;
        check(!seen[l][s_pla], $sformatf("P2 n=%0d l=%0d", n, l));
        seen[l][s_pla] = 1;
        s_ipla = s_pla; s_inum = s_num; #1;
        check(s_illa == s_lla, $sformatf("inverse n=%0d l=%0d", n, l));
      end
    end
    for (int t = 0; t < 300; t++) begin
      b_lla = 10'($urandom); b_num = 10'($urandom_range(1, 1023)); #1;
      cw = '0;
      cw[1022:1013] = b_lla; cw[19:10] = b_num; cw[9:0] = b_pla;
      check(rem_long(cw, 1023, 11'h409, 10) == 0, $sformatf("big cw %0d", t));
      b_ipla = b_pla; b_inum = b_num; #1;
      check(b_illa == b_lla, $sformatf("big inverse %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
