// noc_switch: five-port switch (north, east, south, west, local).
//
// Every port has an input stage and an output stage. A word entering on
// port q and addressed to buffer b of output port p is stored in RAM
// "p-q" (the RAM of output stage p that holds data from q), buffer b, and
// leaves through port p when that buffer wins the channel; it then carries
// the buffer's routing table entry as its address in the next switch. There
// is no path from a port back to itself.
//
// Each channel, in either direction, is an Address-line (addr_t: valid,
// port, buffer number), a 32-bit Data-line and a 1-bit Ack-line running the
// other way. Transactions take four pipelined cycles: arbitration, address,
// data plus ack, erase or retry. Through an idle switch a word's data cycle
// on the output link comes 3 cycles after its data cycle on the input link
// (it is written, then granted, addressed and sent).
//
// Configuration: one write per cycle through cfg (routing entry, weight or
// memory partition of one buffer/RAM of one output port). Port numbering
// and the configuration format are this design's choice.
module noc_switch
  import sw_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  // input channels
  input  addr_t             in_addr [NPORTS],
  input  word_t             in_data [NPORTS],
  output logic              in_ack  [NPORTS],
  // output channels
  output addr_t             out_addr [NPORTS],
  output word_t             out_data [NPORTS],
  input  logic              out_ack  [NPORTS]
);

  logic  [NPORTS-1:0] fwd_req [NPORTS];   // [input q][output p]
  logic  [BUF_W-1:0]  fwd_buf [NPORTS];
  word_t              fwd_data[NPORTS];
  logic  [NPORTS-1:0] fwd_ack [NPORTS];

  logic  [NMEMS-1:0]             o_req  [NPORTS];
  logic  [NMEMS-1:0][BUF_W-1:0]  o_buf  [NPORTS];
  word_t [NMEMS-1:0]             o_data [NPORTS];
  logic  [NMEMS-1:0]             o_ack  [NPORTS];

  for (genvar q = 0; q < NPORTS; q++) begin : g_in
    sw_input_stage #(.PORT(port_e'(q))) u_in (
      .clk, .rst_n,
      .addr_i   (in_addr[q]),
      .data_i   (in_data[q]),
      .ack_o    (in_ack[q]),
      .fwd_req  (fwd_req[q]),
      .fwd_buf  (fwd_buf[q]),
      .fwd_data (fwd_data[q]),
      .fwd_ack  (fwd_ack[q])
    );
    for (genvar p = 0; p < NPORTS; p++) begin : g_ack
      if (p == q) begin : g_self
        assign fwd_ack[q][p] = 1'b0;
      end else begin : g_other
        assign fwd_ack[q][p] = o_ack[p][mem_of(port_e'(p), port_e'(q))];
      end
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_out
    cfg_t pcfg;
    always_comb begin
      pcfg    = cfg;
      pcfg.we = cfg.we && cfg.port == port_e'(p);
    end

    for (genvar m = 0; m < NMEMS; m++) begin : g_src
      localparam int Q = int'(mem_src(port_e'(p), 2'(m)));
      assign o_req[p][m]  = fwd_req[Q][p];
      assign o_buf[p][m]  = fwd_buf[Q];
      assign o_data[p][m] = fwd_data[Q];
    end

    sw_output_stage #(.DEPTH(DEPTH)) u_out (
      .clk, .rst_n,
      .cfg     (pcfg),
      .in_req  (o_req[p]),
      .in_buf  (o_buf[p]),
      .in_data (o_data[p]),
      .in_ack  (o_ack[p]),
      .addr_o  (out_addr[p]),
      .data_o  (out_data[p]),
      .ack_i   (out_ack[p])
    );
  end

endmodule
