// wrr_arbiter: weighted round robin arbiter for the channel of an output port.
//
// Only buffers that request (hold a word to send) take part, so an idle
// virtual channel costs no bandwidth. The buffer that won last keeps the
// channel while it still requests and has used fewer consecutive grants
// than its weight; then the search moves on to the next requesting buffer
// after it in index order, wrapping around. With all weights 1 this is
// plain round robin (A1 B1 C1 A2 B2 C2 ...); a buffer of weight w gets w
// grants in a row per turn, so each active buffer is guaranteed at least
// weight / (sum of active weights) of the channel. A weight of 0 counts as
// 1. A grant is issued in every cycle in which some buffer requests
// (gnt_valid, gnt_idx are combinational); the state moves at the clock edge.
module wrr_arbiter
  import sw_pkg::*;
#(
  parameter int N = 64,
  localparam int IW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        req,
  input  logic [WEIGHT_W-1:0] weight [N],
  output logic                gnt_valid,
  output logic [IW-1:0]       gnt_idx
);

  logic [IW-1:0]       cur;
  logic [WEIGHT_W-1:0] used;
  logic [WEIGHT_W-1:0] cur_w;
  logic                keep;
  logic [IW-1:0]       nxt;
  logic                found;

  assign cur_w = (weight[cur] == '0) ? WEIGHT_W'(1) : weight[cur];
  assign keep  = req[cur] && (used < cur_w);

  always_comb begin
    nxt   = cur;
    found = 1'b0;
    for (int i = 1; i <= N; i++) begin
      int j;
      j = int'(cur) + i;
      if (j >= N) j = j - N;
      if (!found && req[j]) begin
        nxt   = IW'(j);
        found = 1'b1;
      end
    end
  end

  assign gnt_valid = keep || found;
  assign gnt_idx   = keep ? cur : nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur  <= IW'(N - 1);
      used <= '0;
    end else begin
      a_gnt_req: assert (!gnt_valid || req[gnt_idx]);
      if (keep) begin
        used <= used + WEIGHT_W'(1);
      end else if (found) begin
        cur  <= nxt;
        used <= WEIGHT_W'(1);
      end
    end
  end

endmodule
