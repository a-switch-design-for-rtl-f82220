// sw_route_table: routing table and scheduling weights of one output stage.
//
// One entry per buffer (N = RAMs x buffers per RAM). The route entry is the
// output address of the buffer: the buffer-id, in the neighbouring switch,
// that its words are sent to (for the local port, an address handed to the
// network interface). An entry whose valid bit is clear keeps its buffer
// out of arbitration. The weight sets how many consecutive channel grants
// the buffer may take in its round robin turn. Entries are written one at a
// time through the configuration port and read in parallel. After reset
// every route is invalid and every weight is 1. The document describes the
// table's content; the write port and the reset values are this design's.
module sw_route_table
  import sw_pkg::*;
#(
  parameter int N = NMEMS * MAX_BUFS,
  localparam int IW = $clog2(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     route_we,
  input  logic                     weight_we,
  input  logic [IW-1:0]            widx,
  input  logic [7:0]               wvalue,
  output addr_t                    route  [N],
  output logic [WEIGHT_W-1:0]      weight [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        route[i]  <= '0;
        weight[i] <= WEIGHT_W'(1);
      end
    end else begin
      if (route_we)  route[widx]  <= addr_t'(wvalue[ADDR_W-1:0]);
      if (weight_we) weight[widx] <= wvalue[WEIGHT_W-1:0];
    end
  end

endmodule
