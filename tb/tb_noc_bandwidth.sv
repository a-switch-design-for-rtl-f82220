// tb_noc_bandwidth: bandwidth sharing of one output port under weighted
// round robin (the guaranteed-bandwidth workload).
// Three paths, A (entering on north), B (west) and C (local), each
// saturated by its sender, leave one switch through the east port, whose
// receiver accepts every word. The words of each path carry a sequence
// number. For each phase the testbench counts, over a window of WIN
// cycles, the words each path delivers on the east link and compares them
// with the guaranteed share: channel bandwidth x own weight / sum of the
// weights of the active paths.
//   1. weights 1,1,1: each path gets at least 1/3, and the link is busy
//      every cycle.
//   2. weights 2,1,1: A gets at least 1/2, B and C at least 1/4.
//   3. C idle, weights 1,1: A and B get at least 1/2 each, more than
//      their 1/3 guarantee of phase 1 (unused bandwidth is passed on).
//   4. A alone: it gets at least 90 % of the link.
// Every word must also arrive in order. A margin of a few words per window
// covers phase boundaries. The share formula is the one the switch was
// designed around; the window length and margins are this test's choice.
// No ports; cycle watchdog. The share formula is the switch's.
module tb_noc_bandwidth;
  import sw_pkg::*;
  localparam int WIN    = 3000;
  localparam int MARGIN = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t  cfg;
  addr_t in_addr [NPORTS];
  word_t in_data [NPORTS];
  logic  in_ack  [NPORTS];
  addr_t out_addr [NPORTS];
  word_t out_data [NPORTS];
  logic  out_ack  [NPORTS];
  logic  src_en [NPORTS];
  int    accept_pct [NPORTS];
  logic  rx_valid [NPORTS];
  addr_t rx_addr [NPORTS];
  word_t rx_data [NPORTS];
  int checks = 0, failures = 0;
  longint cyc = 0;

  // path k enters on port PIN[k] and uses buffer 0 of its RAM in the east port
  localparam port_e PIN [3] = '{P_N, P_W, P_L};
  int unsigned pushed [3];
  int unsigned got    [3];
  int unsigned cnt    [3];
  logic counting = 0;

  noc_switch #(.DEPTH(32)) dut (.*);

  for (genvar p = 0; p < NPORTS; p++) begin : g_m
    tb_link_src  u_src (.clk, .rst_n, .enable(src_en[p]), .addr_o(in_addr[p]), .data_o(in_data[p]), .ack_i(in_ack[p]));
    tb_link_sink u_snk (.clk, .rst_n, .accept_pct(accept_pct[p]), .addr_i(out_addr[p]), .data_i(out_data[p]),
                        .ack_o(out_ack[p]), .rx_valid(rx_valid[p]), .rx_addr(rx_addr[p]), .rx_data(rx_data[p]));
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
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  function automatic addr_t east_buf0();
    addr_t a;
    a.valid = 1; a.port = P_E; a.bufn = '0;
    return a;
  endfunction

  // keep every sender backlogged
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (g_m[0].u_src.backlog() < 16) for (int i = 0; i < 16; i++) begin g_m[0].u_src.push(east_buf0(), word_t'(pushed[0])); pushed[0]++; end
      if (g_m[3].u_src.backlog() < 16) for (int i = 0; i < 16; i++) begin g_m[3].u_src.push(east_buf0(), word_t'(pushed[1])); pushed[1]++; end
      if (g_m[4].u_src.backlog() < 16) for (int i = 0; i < 16; i++) begin g_m[4].u_src.push(east_buf0(), word_t'(pushed[2])); pushed[2]++; end
    end
  end

  // delivered words on the east link: route k names path k
  always @(posedge clk) begin
    if (rst_n && rx_valid[P_E]) begin
      int k;
      k = int'(rx_addr[P_E].bufn);
      if (k > 2 || rx_addr[P_E].port != P_W) begin
        failures++; $display("FAIL: unexpected address %h", rx_addr[P_E]);
      end else begin
        if (rx_data[P_E] != word_t'(got[k])) begin
          failures++; $display("FAIL: path %0d word %0d, expected %0d", k, rx_data[P_E], got[k]);
        end
        got[k]++;
        if (counting) cnt[k]++;
      end
    end
  end

  task automatic cfg_write(input cfg_kind_e k, input port_e p, input int mem, input int b, input int v);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.kind = k; cfg.port = p; cfg.mem = 2'(mem);
    cfg.bufn = BUF_W'(b); cfg.value = 8'(v);
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic set_weight(input int k, input int w);
    cfg_write(CFG_WEIGHT, P_E, int'(mem_of(P_E, PIN[k])), 0, w);
  endtask

  task automatic measure(input string name);
    repeat (100) @(posedge clk);   // settle
    for (int k = 0; k < 3; k++) cnt[k] = 0;
    counting = 1;
    repeat (WIN) @(posedge clk);
    counting = 0;
    $display("%s: A=%0d B=%0d C=%0d of %0d cycles", name, cnt[0], cnt[1], cnt[2], WIN);
  endtask

  initial begin
    cfg = '0;
    for (int p = 0; p < NPORTS; p++) begin src_en[p] = 0; accept_pct[p] = 100; end
    for (int k = 0; k < 3; k++) begin pushed[k] = 0; got[k] = 0; cnt[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      addr_t r;
      r.valid = 1; r.port = P_W; r.bufn = BUF_W'(k);
      cfg_write(CFG_ROUTE, P_E, int'(mem_of(P_E, PIN[k])), 0, int'(r));
    end
    src_en[P_N] = 1; src_en[P_W] = 1; src_en[P_L] = 1;

    measure("weights 1,1,1");
    for (int k = 0; k < 3; k++) chk(cnt[k] + MARGIN >= WIN / 3, $sformatf("path %0d below 1/3", k));
    chk(cnt[0] + cnt[1] + cnt[2] + MARGIN >= WIN, "east link not fully used");

    set_weight(0, 2);
    measure("weights 2,1,1");
    chk(cnt[0] + MARGIN >= WIN / 2, "A below 1/2");
    chk(cnt[1] + MARGIN >= WIN / 4, "B below 1/4");
    chk(cnt[2] + MARGIN >= WIN / 4, "C below 1/4");
    chk(cnt[0] > cnt[1] + WIN / 8, "weight 2 gives no extra bandwidth");

    set_weight(0, 1);
    src_en[P_L] = 0;
    measure("C idle");
    chk(cnt[0] + MARGIN >= WIN / 2, "A below 1/2 with C idle");
    chk(cnt[1] + MARGIN >= WIN / 2, "B below 1/2 with C idle");
    chk(cnt[1] > WIN / 3 + WIN / 10, "unused bandwidth not passed on");

    src_en[P_W] = 0;
    measure("A alone");
    chk(cnt[0] >= (WIN * 9) / 10, "A alone below 90 %");

    // drain and check nothing was lost
    src_en[P_N] = 0;
    repeat (200) @(posedge clk);
    chk(got[0] > 0 && g_m[0].u_src.backlog() + got[0] == pushed[0], "path A words lost or duplicated");
    chk(got[1] > 0 && g_m[3].u_src.backlog() + got[1] == pushed[1], "path B words lost or duplicated");
    chk(got[2] > 0 && g_m[4].u_src.backlog() + got[2] == pushed[2], "path C words lost or duplicated");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
