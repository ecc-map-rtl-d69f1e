// lfsr_window: mapping-index randomisation for ECC-Map.
//
// Running mapping indices 1, 2, 3, ... are replaced by the successive states
// of a maximal-length M-bit Galois LFSR (feedback polynomial = the primitive
// polynomial of ecc_map_pkg, period 2^M-1): index 1 maps to the seed and
// every LFSR step gives the number of the next index. The controller needs
// the numbers of the current window base..base+S-1 plus that of base+S (the
// target of a catch-up), so this block keeps a cache of S+1 consecutive
// states: nums[o] = LFSR(base+o), o = 0..S.
//
// Timing: the seed is loaded in the first cycle after reset (a zero seed is
// replaced by 1, the LFSR cannot leave 0) and the cache then fills in S
// cycles; busy is high for these S+1 cycles. A pulse
// on advance slides the window by S indices; the cache shifts by one entry
// per cycle and busy stays high for S cycles. advance is ignored while busy.
// Keeping a cache and cycling the LFSR forward follow the published architecture; the
// shift-register refill of one state per cycle is this design's choice.
module lfsr_window
  import ecc_map_pkg::*;
#(
  parameter int unsigned M = 10,   // LFSR width = log2 N
  parameter int unsigned S = 32    // window size
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [M-1:0]         seed,     // sampled once after reset
  input  logic                 advance,  // slide the window by S
  output logic                 busy,
  output logic [S:0][M-1:0]    nums      // nums[o] = LFSR(base + o)
);

  localparam logic [M-1:0] POLY = M'(prim_poly(M));
  localparam int unsigned  CW   = $clog2(S + 1);

  function automatic logic [M-1:0] lfsr_step(input logic [M-1:0] s);
    return {s[M-2:0], 1'b0} ^ (s[M-1] ? POLY : '0);
  endfunction

  logic [CW-1:0] steps_q;
  logic          loaded_q;

  assign busy = !loaded_q || (steps_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nums     <= '0;
      steps_q  <= CW'(S);
      loaded_q <= 1'b0;
    end else if (!loaded_q) begin
      nums[S]  <= (seed == '0) ? M'(1) : seed;
      loaded_q <= 1'b1;
    end else if (busy || advance) begin
      for (int o = 0; o < S; o++) nums[o] <= nums[o+1];
      nums[S] <= lfsr_step(nums[S]);
      steps_q <= busy ? steps_q - 1'b1 : CW'(S - 1);
    end
  end

endmodule
