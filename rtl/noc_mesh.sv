// noc_mesh: ROWS x COLS mesh of five-port switches (4 x 4 by default, the
// platform the switch was evaluated on).
//
// Switch (r, c) has index r*COLS + c. Its east channel pair connects to the
// west channel pair of switch (r, c+1) and its south pair to the north pair
// of switch (r+1, c). The channels on the mesh boundary are idle: their
// inputs carry no address and their acks are low, so a buffer routed off
// the edge never drains. The local channel pair of every switch is brought
// out (loc_*) for a network interface and its processor.
//
// A transmission path is set up by configuration: the source names a
// buffer of its own switch's local port input as the address of each word,
// and every buffer on the way has, in its routing table, the buffer-id of
// the next buffer; the last one's route entry is handed to the receiving
// interface on loc_out_addr. cfg_sw selects the switch a configuration
// write goes to. Mesh size and configuration addressing are parameters and
// choices of this design; the topology is the document's.
module noc_mesh
  import sw_pkg::*;
#(
  parameter int ROWS  = 4,
  parameter int COLS  = 4,
  parameter int DEPTH = 32,
  localparam int NSW  = ROWS * COLS,
  localparam int SW_W = (NSW > 1) ? $clog2(NSW) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SW_W-1:0]  cfg_sw,
  input  cfg_t             cfg,
  // local port, processor to switch
  input  addr_t            loc_in_addr  [NSW],
  input  word_t            loc_in_data  [NSW],
  output logic             loc_in_ack   [NSW],
  // local port, switch to processor
  output addr_t            loc_out_addr [NSW],
  output word_t            loc_out_data [NSW],
  input  logic             loc_out_ack  [NSW]
);

  addr_t in_addr  [NSW][NPORTS];
  word_t in_data  [NSW][NPORTS];
  logic  in_ack   [NSW][NPORTS];
  addr_t out_addr [NSW][NPORTS];
  word_t out_data [NSW][NPORTS];
  logic  out_ack  [NSW][NPORTS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int I = r * COLS + c;
      cfg_t scfg;
      always_comb begin
        scfg    = cfg;
        scfg.we = cfg.we && int'(cfg_sw) == I;
      end

      noc_switch #(.DEPTH(DEPTH)) u_sw (
        .clk, .rst_n,
        .cfg      (scfg),
        .in_addr  (in_addr[I]),
        .in_data  (in_data[I]),
        .in_ack   (in_ack[I]),
        .out_addr (out_addr[I]),
        .out_data (out_data[I]),
        .out_ack  (out_ack[I])
      );

      // local port
      assign in_addr[I][P_L]  = loc_in_addr[I];
      assign in_data[I][P_L]  = loc_in_data[I];
      assign loc_in_ack[I]    = in_ack[I][P_L];
      assign loc_out_addr[I]  = out_addr[I][P_L];
      assign loc_out_data[I]  = out_data[I][P_L];
      assign out_ack[I][P_L]  = loc_out_ack[I];

      // north neighbour (r-1, c)
      if (r > 0) begin : g_n
        assign in_addr[I][P_N] = out_addr[I-COLS][P_S];
        assign in_data[I][P_N] = out_data[I-COLS][P_S];
        assign out_ack[I][P_N] = in_ack[I-COLS][P_S];
      end else begin : g_n_edge
        assign in_addr[I][P_N] = '0;
        assign in_data[I][P_N] = '0;
        assign out_ack[I][P_N] = 1'b0;
      end
      // south neighbour (r+1, c)
      if (r < ROWS - 1) begin : g_s
        assign in_addr[I][P_S] = out_addr[I+COLS][P_N];
        assign in_data[I][P_S] = out_data[I+COLS][P_N];
        assign out_ack[I][P_S] = in_ack[I+COLS][P_N];
      end else begin : g_s_edge
        assign in_addr[I][P_S] = '0;
        assign in_data[I][P_S] = '0;
        assign out_ack[I][P_S] = 1'b0;
      end
      // west neighbour (r, c-1)
      if (c > 0) begin : g_w
        assign in_addr[I][P_W] = out_addr[I-1][P_E];
        assign in_data[I][P_W] = out_data[I-1][P_E];
        assign out_ack[I][P_W] = in_ack[I-1][P_E];
      end else begin : g_w_edge
        assign in_addr[I][P_W] = '0;
        assign in_data[I][P_W] = '0;
        assign out_ack[I][P_W] = 1'b0;
      end
      // east neighbour (r, c+1)
      if (c < COLS - 1) begin : g_e
        assign in_addr[I][P_E] = out_addr[I+1][P_W];
        assign in_data[I][P_E] = out_data[I+1][P_W];
        assign out_ack[I][P_E] = in_ack[I+1][P_W];
      end else begin : g_e_edge
        assign in_addr[I][P_E] = '0;
        assign in_data[I][P_E] = '0;
        assign out_ack[I][P_E] = 1'b0;
      end
    end
  end

endmodule
