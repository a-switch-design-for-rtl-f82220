// tb_noc_path_bw: guaranteed bandwidth of a whole transmission path.
// A 2 x 3 mesh (switches S1 S2 S3 on the top row, S4 S5 S6 below, index
// 0..5) carries six saturated paths, all with weight 1. Path T runs from
// the processor at S1 east to S2, east to S3, south to S6 and out to its
// processor. The five other paths are placed so that T meets
//   S1 east port: T, C1, C2          -> local share 1/3
//   S2 east port: T, C3              -> 1/2
//   S3 south port: T, C3, C4, C5     -> 1/4
//   S6 local port: T, C3, C4         -> 1/3
// so its guaranteed bandwidth is the smallest of these, 1/4 of a link.
// Every receiver accepts every word. Over a window of WIN cycles the
// testbench checks that every path delivers at least its own guaranteed
// share (the minimum over its links of 1 / number of paths on the link),
// that every word arrives in order, and that none is lost.
// The routes are chosen by hand here; they do not follow one routing rule.
// No ports; cycle watchdog. The printed local shares are the example's;
// the competing paths that produce them are this test's choice.
module tb_noc_path_bw;
  import sw_pkg::*;
  localparam int ROWS = 2, COLS = 3, NSW = ROWS * COLS;
  localparam int NP = 6;
  localparam int WIN = 4000;
  localparam int MARGIN = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [$clog2(NSW)-1:0] cfg_sw;
  cfg_t  cfg;
  addr_t loc_in_addr [NSW];
  word_t loc_in_data [NSW];
  logic  loc_in_ack  [NSW];
  addr_t loc_out_addr [NSW];
  word_t loc_out_data [NSW];
  logic  loc_out_ack  [NSW];
  logic  src_en [NSW];
  int    accept_pct [NSW];
  logic  rx_valid [NSW];
  addr_t rx_addr [NSW];
  word_t rx_data [NSW];
  int checks = 0, failures = 0;

  // path k: source switch, hop count, output port at each hop, guaranteed
  // share as 1/GDEN of a link
  localparam int    SRC  [NP] = '{0, 3, 0, 1, 2, 2};
  localparam int    NH   [NP] = '{4, 3, 2, 3, 2, 3};
  localparam port_e HOPS [NP][4] = '{
    '{P_E, P_E, P_S, P_L},   // T
    '{P_N, P_E, P_L, P_L},   // C1: S4 -> S1 -> S2
    '{P_E, P_L, P_L, P_L},   // C2: S1 -> S2
    '{P_E, P_S, P_L, P_L},   // C3: S2 -> S3 -> S6
    '{P_S, P_L, P_L, P_L},   // C4: S3 -> S6
    '{P_S, P_W, P_L, P_L}};  // C5: S3 -> S6 -> S5
  localparam int    GDEN [NP] = '{4, 3, 3, 4, 4, 4};
  localparam int    DST  [NP] = '{5, 1, 1, 5, 5, 4};

  int unsigned pushed [NP];
  int unsigned got    [NP];
  int unsigned cnt    [NP];
  logic counting = 0;

  noc_mesh #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  for (genvar s = 0; s < NSW; s++) begin : g_m
    tb_link_src  u_src (.clk, .rst_n, .enable(src_en[s]), .addr_o(loc_in_addr[s]), .data_o(loc_in_data[s]),
                        .ack_i(loc_in_ack[s]));
    tb_link_sink u_snk (.clk, .rst_n, .accept_pct(accept_pct[s]), .addr_i(loc_out_addr[s]), .data_i(loc_out_data[s]),
                        .ack_o(loc_out_ack[s]), .rx_valid(rx_valid[s]), .rx_addr(rx_addr[s]), .rx_data(rx_data[s]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int next_sw(int s, port_e p);
    case (p)
      P_N: return s - COLS;
      P_S: return s + COLS;
      P_E: return s + 1;
      P_W: return s - 1;
      default: return s;
    endcase
  endfunction

  function automatic port_e opposite(port_e p);
    case (p)
      P_N: return P_S;
      P_S: return P_N;
      P_E: return P_W;
      P_W: return P_E;
      default: return P_L;
    endcase
  endfunction

  function automatic addr_t mk(port_e p, int k);
    addr_t a;
    a.valid = 1; a.port = p; a.bufn = BUF_W'(k);
    return a;
  endfunction

  // path k uses buffer k in every RAM it passes
  function automatic addr_t first_addr(int k);
    return mk(HOPS[k][0], k);
  endfunction

  // keep every sender backlogged on each of its paths
  task automatic top_up(input int s);
    for (int k = 0; k < NP; k++)
      if (SRC[k] == s && pushed[k] < got[k] + 40)
        for (int i = 0; i < 16; i++) begin
          case (s)
            0: g_m[0].u_src.push(first_addr(k), {8'(k), 24'(pushed[k])});
            1: g_m[1].u_src.push(first_addr(k), {8'(k), 24'(pushed[k])});
            2: g_m[2].u_src.push(first_addr(k), {8'(k), 24'(pushed[k])});
            3: g_m[3].u_src.push(first_addr(k), {8'(k), 24'(pushed[k])});
            4: g_m[4].u_src.push(first_addr(k), {8'(k), 24'(pushed[k])});
            default: g_m[5].u_src.push(first_addr(k), {8'(k), 24'(pushed[k])});
          endcase
          pushed[k]++;
        end
  endtask

  function automatic int unsigned src_backlog(int s);
    case (s)
      0: return g_m[0].u_src.backlog();
      1: return g_m[1].u_src.backlog();
      2: return g_m[2].u_src.backlog();
      3: return g_m[3].u_src.backlog();
      4: return g_m[4].u_src.backlog();
      default: return g_m[5].u_src.backlog();
    endcase
  endfunction

  always @(negedge clk)
    if (rst_n && src_en[0]) for (int s = 0; s < NSW; s++) top_up(s);

  always @(posedge clk)
    if (rst_n)
      for (int s = 0; s < NSW; s++)
        if (rx_valid[s]) begin
          int k;
          k = int'(rx_data[s][31:24]);
          if (k >= NP || DST[k] != s || rx_addr[s] != mk(P_L, k) || rx_data[s][23:0] != 24'(got[k])) begin
            failures++;
            $display("FAIL: switch %0d got %h addr %h", s, rx_data[s], rx_addr[s]);
          end else begin
            got[k]++;
            if (counting) cnt[k]++;
          end
        end

  task automatic cfg_write(input int s, input cfg_kind_e kd, input port_e p, input int mem, input int b, input int v);
    @(negedge clk);
    cfg_sw = 3'(s);
    cfg = '0; cfg.we = 1; cfg.kind = kd; cfg.port = p; cfg.mem = 2'(mem);
    cfg.bufn = BUF_W'(b); cfg.value = 8'(v);
    @(negedge clk);
    cfg = '0;
  endtask

  initial begin
    cfg = '0; cfg_sw = '0;
    for (int s = 0; s < NSW; s++) begin src_en[s] = 0; accept_pct[s] = 100; end
    for (int k = 0; k < NP; k++) begin pushed[k] = 0; got[k] = 0; cnt[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 8 buffers of 4 words in every RAM, so buffer k exists for k < 6
    for (int s = 0; s < NSW; s++)
      for (int p = 0; p < NPORTS; p++)
        for (int m = 0; m < NMEMS; m++)
          cfg_write(s, CFG_PART, port_e'(p), m, 0, 3);
    // chain the buffers of each path
    for (int k = 0; k < NP; k++) begin
      int s;
      port_e din;
      s = SRC[k]; din = P_L;
      for (int h = 0; h < NH[k]; h++) begin
        port_e pout;
        addr_t nxt;
        pout = HOPS[k][h];
        nxt  = (pout == P_L) ? mk(P_L, k) : mk(HOPS[k][h+1], k);
        cfg_write(s, CFG_ROUTE, pout, int'(mem_of(pout, din)), k, int'(nxt));
        din = opposite(pout);
        s   = next_sw(s, pout);
      end
    end
    for (int s = 0; s < NSW; s++) src_en[s] = 1;

    repeat (300) @(posedge clk);
    counting = 1;
    repeat (WIN) @(posedge clk);
    counting = 0;
    for (int k = 0; k < NP; k++) begin
      $display("path %0d: %0d words in %0d cycles, guaranteed 1/%0d", k, cnt[k], WIN, GDEN[k]);
      chk(cnt[k] + MARGIN >= WIN / GDEN[k], $sformatf("path %0d below its guaranteed 1/%0d", k, GDEN[k]));
    end

    // drain: stop the senders and check every word arrived
    for (int s = 0; s < NSW; s++) src_en[s] = 0;
    repeat (400) @(posedge clk);
    for (int s = 0; s < NSW; s++) begin
      int unsigned sent_s, got_s;
      sent_s = 0; got_s = 0;
      for (int k = 0; k < NP; k++) if (SRC[k] == s) begin sent_s += pushed[k]; got_s += got[k]; end
      chk(got_s + src_backlog(s) == sent_s, $sformatf("words from switch %0d lost or duplicated", s));
    end
    for (int k = 0; k < NP; k++) chk(got[k] > 0, $sformatf("path %0d delivered nothing", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
