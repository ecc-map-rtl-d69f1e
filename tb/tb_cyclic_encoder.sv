// tb_cyclic_encoder: self-checking test of the systematic cyclic encoder.
// Two instances: the (15,11) cyclic Hamming code with g = x^4+x+1, checked
// against hand-worked parities and exhaustively for divisibility, and the
// default (1023,1013) code with g = x^10+x^3+1, checked on random messages.
// The reference divides the whole code word by g(x) with a shift-and-XOR
// long division on a wide vector, written independently of the DUT, and
// also checks linearity (parity of a XOR b = parity a XOR parity b).
module tb_cyclic_encoder;
  int checks = 0, failures = 0;

  // ---- small code (15,11), g = x^4 + x + 1
  logic [10:0] s_msg;
  logic [3:0]  s_par;
  cyclic_encoder #(.K(11), .R(4), .G(4'h3)) u_small (.msg(s_msg), .parity(s_par));

  // ---- default code (1023,1013), g = x^10 + x^3 + 1
  logic [1012:0] b_msg;
  logic [9:0]    b_par;
  cyclic_encoder u_big (.msg(b_msg), .parity(b_par));

  function automatic logic [10:0] rem_long(input logic [1022:0] cw, input int n,
                                           input logic [10:0] gfull, input int r);
    logic [1022:0] v;
    v = cw;
    for (int i = n - 1; i >= r; i--)
      if (v[i]) v = v ^ ({1012'b0, gfull} << (i - r));
    return v[10:0];
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1022:0] cw;
    logic [1012:0] a, b;
    logic [9:0]    pa, pb;
    // hand-worked: u = x^10 -> x^14 mod (x^4+x+1) = x^3 + 1 (1001)
    s_msg = 11'b100_0000_0000; #1;
    check(s_par == 4'b1001, "x^10 parity");
    // u = 1 -> x^4 mod g = x + 1 (0011)
    s_msg = 11'd1; #1;
    check(s_par == 4'b0011, "1 parity");
    // exhaustive divisibility of the (15,11) code
    for (int u = 0; u < 2048; u++) begin
      s_msg = 11'(u); #1;
      cw = '0;
      cw[14:0] = {s_msg, s_par};
      check(rem_long(cw, 15, 11'h13, 4) == 0, $sformatf("small cw %0d", u));
    end
    // big code: random messages, divisibility and linearity
    for (int t = 0; t < 200; t++) begin
      for (int w = 0; w < 1013; w++) a[w] = $urandom_range(0, 1);
      for (int w = 0; w < 1013; w++) b[w] = $urandom_range(0, 1);
      b_msg = a; #1; pa = b_par;
      cw = {b_msg, b_par};
      check(rem_long(cw, 1023, 11'h409, 10) == 0, $sformatf("big cw %0d", t));
      b_msg = b; #1; pb = b_par;
      b_msg = a ^ b; #1;
      check(b_par == (pa ^ pb), $sformatf("linearity %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
