// sw_output_stage: output stage of one switch port.
//
// Holds four RAMs, one for each input direction other than this port, each
// with its buffer controller, plus the routing table, the ack controller,
// the weighted round robin arbiter and the 4-to-1 read multiplexer.
//
// Receiving: in the data cycle of a transaction the input stage that feeds
// RAM m presents (in_req[m], in_buf[m], in_data[m]); the ack controller
// answers in_ack[m] in the same cycle and the word is written if accepted.
//
// Sending, one transaction per buffer word, four pipelined cycles:
//   1 arbitration - buffers with a pending word and a valid route request
//                   the channel; the arbiter grants one;
//   2 address     - addr_o carries the route entry of the granted buffer
//                   (the buffer-id in the next switch); the RAM is read;
//   3 data        - data_o carries the word; ack_i is sampled;
//   4 ack         - a true ack erases the word, a false ack rolls the
//                   buffer back so the word is sent again.
// A new transaction can start every cycle, for the same buffer or another,
// so one virtual channel alone can fill the link. Words launched after a
// refused one are refused by the receiver as well (see sw_input_stage) and
// their acks are ignored here through the buffer's epoch bit.
//
// The four-cycle protocol, the parts and their roles follow the document;
// the pipelined send pointer and the rollback are this design's own way to
// keep words in order when a buffer downstream is full.
//
// Signals left unread on purpose: the port field of cfg (the switch has
// already steered the write to this port), the read address carried into
// the acknowledge stage (only buffer, RAM and epoch are needed there) and
// the buffer controllers' current-partition outputs (kept for observation).
module sw_output_stage
  import sw_pkg::*;
#(
  parameter int DEPTH = 32,
  localparam int AW   = $clog2(DEPTH),
  localparam int N    = NMEMS * MAX_BUFS,
  localparam int IW   = $clog2(N)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  cfg_t                          cfg,     // we already qualified for this port
  // from the input stages, data cycle
  input  logic  [NMEMS-1:0]             in_req,
  input  logic  [NMEMS-1:0][BUF_W-1:0]  in_buf,
  input  word_t [NMEMS-1:0]             in_data,
  output logic  [NMEMS-1:0]             in_ack,
  // output channel
  output addr_t                         addr_o,
  output word_t                         data_o,
  input  logic                          ack_i
);

  typedef struct packed {
    logic             v;
    logic [1:0]       mem;
    logic [BUF_W-1:0] bufn;
    logic             ep;
    logic [AW-1:0]    raddr;
  } txn_t;

  // ---------------- routing table ----------------
  addr_t               route  [N];
  logic [WEIGHT_W-1:0] weight [N];

  sw_route_table #(.N(N)) u_rt (
    .clk, .rst_n,
    .route_we  (cfg.we && cfg.kind == CFG_ROUTE),
    .weight_we (cfg.we && cfg.kind == CFG_WEIGHT),
    .widx      ({cfg.mem, cfg.bufn}),
    .wvalue    (cfg.value),
    .route, .weight
  );

  // ---------------- buffers ----------------
  logic [NMEMS-1:0][MAX_BUFS-1:0] full, pending, epoch;
  logic [NMEMS-1:0][AW-1:0]       wr_addr, snd_addr;
  logic [NMEMS-1:0][PART_W-1:0]   part;
  logic [NMEMS-1:0]               wr_en, snd_en, ack_valid, ram_re;
  word_t [NMEMS-1:0]              rdata;

  logic                gnt_valid;
  logic [IW-1:0]       gnt_idx;
  logic [1:0]          gnt_mem;
  logic [BUF_W-1:0]    gnt_buf;
  txn_t                s_a, s_d;
  txn_t                s_k;
  logic                s_k_ok;

  assign gnt_mem = gnt_idx[IW-1 -: 2];
  assign gnt_buf = gnt_idx[BUF_W-1:0];

  sw_ack_ctrl u_ack (
    .req (in_req), .req_buf (in_buf), .full,
    .ack (in_ack), .wr_en
  );

  for (genvar m = 0; m < NMEMS; m++) begin : g_mem
    assign snd_en[m]    = gnt_valid && gnt_mem == 2'(m);
    assign ack_valid[m] = s_k.v && s_k.mem == 2'(m);
    assign ram_re[m]    = s_a.v && s_a.mem == 2'(m);

    sw_buf_ctrl #(.DEPTH(DEPTH)) u_bc (
      .clk, .rst_n,
      .part_we   (cfg.we && cfg.kind == CFG_PART && cfg.mem == 2'(m)),
      .part_in   (cfg.value[PART_W-1:0]),
      .part      (part[m]),
      .wr_en     (wr_en[m]),
      .wr_buf    (in_buf[m]),
      .wr_addr   (wr_addr[m]),
      .snd_en    (snd_en[m]),
      .snd_buf   (gnt_buf),
      .snd_addr  (snd_addr[m]),
      .ack_valid (ack_valid[m]),
      .ack_buf   (s_k.bufn),
      .ack_epoch (s_k.ep),
      .ack_ok    (s_k_ok),
      .full      (full[m]),
      .pending   (pending[m]),
      .epoch     (epoch[m])
    );

    sw_ram #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_ram (
      .clk,
      .we    (wr_en[m]),
      .waddr (wr_addr[m]),
      .wdata (in_data[m]),
      .re    (ram_re[m]),
      .raddr (s_a.raddr),
      .rdata (rdata[m])
    );
  end

  // ---------------- arbitration (cycle 1) ----------------
  logic [N-1:0] req;
  always_comb begin
    for (int i = 0; i < N; i++)
      req[i] = pending[i / MAX_BUFS][i % MAX_BUFS] && route[i].valid;
  end

  wrr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .req, .weight, .gnt_valid, .gnt_idx
  );

  // ---------------- transaction pipeline ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_a    <= '0;
      s_d    <= '0;
      s_k    <= '0;
      s_k_ok <= 1'b0;
    end else begin
      s_a.v     <= gnt_valid;
      s_a.mem   <= gnt_mem;
      s_a.bufn  <= gnt_buf;
      s_a.ep    <= epoch[gnt_mem][gnt_buf];
      s_a.raddr <= snd_addr[gnt_mem];
      s_d       <= s_a;
      s_k       <= s_d;
      s_k_ok    <= ack_i;
    end
  end

  // cycle 2: address, cycle 3: data (4-to-1 multiplexer)
  assign addr_o = s_a.v ? route[{s_a.mem, s_a.bufn}] : '0;
  assign data_o = s_d.v ? rdata[s_d.mem] : '0;

endmodule
