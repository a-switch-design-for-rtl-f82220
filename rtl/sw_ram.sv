// sw_ram: one RAM module of an output stage.
//
// One write port and one read port, as the switch's memory modules are
// described (one-read/one-write). The write happens at the clock edge when
// we is high. The read is synchronous: the address given while re is high
// appears on rdata in the next cycle and is held until the next read. The
// depth (32 words) and word width (4 bytes) follow the synthesized switch;
// the synchronous read is this design's choice, so that the RAM can map to
// a standard SRAM macro.
module sw_ram #(
  parameter int DEPTH = 32,
  parameter int WIDTH = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
