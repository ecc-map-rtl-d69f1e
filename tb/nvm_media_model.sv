// nvm_media_model: behavioural model of an endurance-limited non-volatile
// line memory with 2^M lines (kind: behavioural model, not synthesizable
// intent). Each line holds DATA_W data bits, an SW-bit metadata field (the
// compact mapping index written with the line) and a write counter that
// stands in for the device's wear / reliability estimate.
//
// Handshake: req is held with we/addr/wdata/wmeta; LAT cycles later ack
// pulses for one cycle, a write takes effect and a read's rdata, rmeta and
// rwear (the line's write count) are presented. eol rises when a write
// would take a line past W_MAX writes (the end of the device's lifetime);
// that write is still counted. Reset clears data, metadata and wear.
module nvm_media_model #(
  parameter int unsigned M      = 10,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned SW     = 5,
  parameter int unsigned WEAR_W = 16,
  parameter int unsigned W_MAX  = 2048,
  parameter int unsigned LAT    = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  logic              we,
  input  logic [M-1:0]      addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [SW-1:0]     wmeta,
  output logic              ack,
  output logic [DATA_W-1:0] rdata,
  output logic [SW-1:0]     rmeta,
  output logic [WEAR_W-1:0] rwear,
  output logic              eol,
  output longint unsigned   phys_writes,
  output int unsigned       max_wear
);

  localparam int unsigned N = 1 << M;

  logic [DATA_W-1:0] data [N];
  logic [SW-1:0]     meta [N];
  int unsigned       wear [N];
  int unsigned       cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) begin
        data[i] <= '0;
        meta[i] <= '0;
        wear[i] <= 0;
      end
      cnt         <= 0;
      ack         <= 1'b0;
      rdata       <= '0;
      rmeta       <= '0;
      rwear       <= '0;
      eol         <= 1'b0;
      phys_writes <= 0;
      max_wear    <= 0;
    end else begin
      ack <= 1'b0;
      if (ack) begin
        cnt <= 0;
      end else if (req) begin
        if (cnt + 1 >= LAT) begin
          ack <= 1'b1;
          if (we) begin
            data[addr]  <= wdata;
            meta[addr]  <= wmeta;
            wear[addr]  <= wear[addr] + 1;
            phys_writes <= phys_writes + 1;
            if (wear[addr] + 1 > max_wear) max_wear <= wear[addr] + 1;
            if (wear[addr] >= W_MAX) eol <= 1'b1;
          end else begin
            rdata <= data[addr];
            rmeta <= meta[addr];
            rwear <= WEAR_W'(wear[addr]);
          end
        end else begin
          cnt <= cnt + 1;
        end
      end
    end
  end

endmodule
