// tb_noc_mesh: end-to-end test of the 4 x 4 mesh at its default parameters.
// Every processor is replaced by a random pattern generator (a sender model
// on the local input channel) and a receiver model on the local output
// channel. Transmission paths follow X-then-Y routes; for each path one free
// buffer is reserved in every switch on the way and the routing tables are
// chained, the last entry naming the source for the receiving interface.
// Each word carries source, destination and sequence number.
//
// Phases, each after draining the mesh and repartitioning every RAM:
//   A  16 buffers of 2 words, all 240 source/destination pairs;
//   B   8 buffers of 4 words, as many random pairs as fit;
//   C   4 buffers of 8 words (the reset partition), as many as fit.
// In each phase the first path gets weight 2 in every switch; receivers
// refuse 20% of words; senders pause at random.
// Checks: minimum latency over the 7 switches from corner to corner (3
// cycles per switch); every word delivered once, in order, with the
// address its path's last routing entry gives. Counted, and each must
// occur: refusal by a full buffer between switches, ordering-guard
// refusal, a second consecutive grant to a weight-2 buffer, refusal by a
// receiving interface, delivery over 7 switches, repartitioning.
// No ports; runs noc_mesh with every parameter at its default; cycle
// watchdog. Mesh size, buffer sizes and random traffic follow the
// evaluation setup; routes and acceptance rates are this test's choice.
module tb_noc_mesh;
  import sw_pkg::*;
  localparam int ROWS = 4, COLS = 4, NSW = ROWS * COLS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] cfg_sw;
  cfg_t  cfg;
  addr_t loc_in_addr  [NSW];
  word_t loc_in_data  [NSW];
  logic  loc_in_ack   [NSW];
  addr_t loc_out_addr [NSW];
  word_t loc_out_data [NSW];
  logic  loc_out_ack  [NSW];
  logic  src_en [NSW];
  int    accept_pct [NSW];
  logic  rx_valid [NSW];
  addr_t rx_addr [NSW];
  word_t rx_data [NSW];

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_link_refused = 0, n_held = 0, n_weighted = 0, n_repart = 0, n_long = 0;

  noc_mesh dut (.*);

  for (genvar i = 0; i < NSW; i++) begin : g_pe
    tb_link_src  u_src (.clk, .rst_n, .enable(src_en[i]), .addr_o(loc_in_addr[i]), .data_o(loc_in_data[i]), .ack_i(loc_in_ack[i]));
    tb_link_sink u_snk (.clk, .rst_n, .accept_pct(accept_pct[i]), .addr_i(loc_out_addr[i]), .data_i(loc_out_data[i]),
                        .ack_o(loc_out_ack[i]), .rx_valid(rx_valid[i]), .rx_addr(rx_addr[i]), .rx_data(rx_data[i]));
  end

  // probes: refusals between switches, guard refusals, weighted repeats
  logic [NPORTS-1:0] pr_ref [NSW];
  logic [NPORTS-1:0] pr_held [NSW];
  logic [NPORTS-1:0] pr_keep [NSW];
  for (genvar i = 0; i < NSW; i++) begin : g_probe
    for (genvar p = 0; p < NPORTS; p++) begin : g_p
      assign pr_ref[i][p]  = dut.g_row[i / COLS].g_col[i % COLS].u_sw.g_in[p].u_in.nack;
      assign pr_held[i][p] = dut.g_row[i / COLS].g_col[i % COLS].u_sw.g_in[p].u_in.held &&
                             dut.g_row[i / COLS].g_col[i % COLS].u_sw.g_in[p].u_in.cur.valid;
      assign pr_keep[i][p] = dut.g_row[i / COLS].g_col[i % COLS].u_sw.g_out[p].u_out.u_arb.keep;
    end
  end
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int i = 0; i < NSW; i++) begin
      for (int p = 0; p < 4; p++) if (pr_ref[i][p]) n_link_refused++;
      n_held     += $countones(pr_held[i]);
      n_weighted += $countones(pr_keep[i]);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // ---------------- paths ----------------
  typedef struct { int sw; port_e in_p; port_e out_p; } hop_t;
  bit     used [NSW][NPORTS][NMEMS][MAX_BUFS];
  bit     have_path [NSW][NSW];
  addr_t  first_addr [NSW][NSW];
  int     hops_of [NSW][NSW];
  int     sent [NSW][NSW];
  int     got  [NSW][NSW];
  longint last_rx_t [NSW];

  function automatic addr_t final_addr(int s);
    addr_t a;
    a.valid = 1; a.port = P_L; a.bufn = BUF_W'(s);
    return a;
  endfunction

  task automatic cfg_write(input int sw, input cfg_kind_e k, input port_e p, input int mem, input int b, input int v);
    @(negedge clk);
    cfg_sw = 4'(sw);
    cfg = '0; cfg.we = 1; cfg.kind = k; cfg.port = p; cfg.mem = 2'(mem); cfg.bufn = BUF_W'(b); cfg.value = 8'(v);
    @(negedge clk);
    cfg = '0;
  endtask

  // X first, then Y
  function automatic int route_xy(int s, int d, ref hop_t h [$]);
    int r, c, dr, dc;
    port_e in_p;
    h.delete();
    r = s / COLS; c = s % COLS; dr = d / COLS; dc = d % COLS;
    in_p = P_L;
    forever begin
      hop_t x;
      x.sw = r * COLS + c; x.in_p = in_p;
      if (dc > c)      begin x.out_p = P_E; c++; in_p = P_W; end
      else if (dc < c) begin x.out_p = P_W; c--; in_p = P_E; end
      else if (dr > r) begin x.out_p = P_S; r++; in_p = P_N; end
      else if (dr < r) begin x.out_p = P_N; r--; in_p = P_S; end
      else             begin x.out_p = P_L; h.push_back(x); break; end
      h.push_back(x);
    end
    return h.size();
  endfunction

  // reserve a buffer in every switch of the path and chain the routing
  // tables; returns 0 when some RAM has no free buffer
  task automatic setup_path(input int s, input int d, input int nbuf, input int weight, output bit ok);
    hop_t h [$];
    int b [$];
    void'(route_xy(s, d, h));
    ok = 1;
    foreach (h[k]) begin
      int m, f;
      m = int'(mem_of(h[k].out_p, h[k].in_p));
      f = -1;
      for (int x = 0; x < nbuf; x++) if (f < 0 && !used[h[k].sw][h[k].out_p][m][x]) f = x;
      if (f < 0) ok = 0;
      b.push_back(f);
    end
    if (!ok) return;
    foreach (h[k]) begin
      addr_t nxt;
      int m;
      m = int'(mem_of(h[k].out_p, h[k].in_p));
      used[h[k].sw][h[k].out_p][m][b[k]] = 1;
      if (k + 1 < h.size()) begin
        nxt.valid = 1; nxt.port = h[k+1].out_p; nxt.bufn = BUF_W'(b[k+1]);
      end else nxt = final_addr(s);
      cfg_write(h[k].sw, CFG_ROUTE, h[k].out_p, m, b[k], int'(nxt));
      cfg_write(h[k].sw, CFG_WEIGHT, h[k].out_p, m, b[k], weight);
    end
    first_addr[s][d].valid = 1;
    first_addr[s][d].port  = h[0].out_p;
    first_addr[s][d].bufn  = BUF_W'(b[0]);
    have_path[s][d] = 1;
    hops_of[s][d] = h.size();
  endtask

  task automatic push(int s, int d);
    word_t w;
    w = {4'(s), 4'(d), 24'(sent[s][d])};
    sent[s][d]++;
    case (s)
      0: g_pe[0].u_src.push(first_addr[s][d], w);   1: g_pe[1].u_src.push(first_addr[s][d], w);
      2: g_pe[2].u_src.push(first_addr[s][d], w);   3: g_pe[3].u_src.push(first_addr[s][d], w);
      4: g_pe[4].u_src.push(first_addr[s][d], w);   5: g_pe[5].u_src.push(first_addr[s][d], w);
      6: g_pe[6].u_src.push(first_addr[s][d], w);   7: g_pe[7].u_src.push(first_addr[s][d], w);
      8: g_pe[8].u_src.push(first_addr[s][d], w);   9: g_pe[9].u_src.push(first_addr[s][d], w);
      10: g_pe[10].u_src.push(first_addr[s][d], w); 11: g_pe[11].u_src.push(first_addr[s][d], w);
      12: g_pe[12].u_src.push(first_addr[s][d], w); 13: g_pe[13].u_src.push(first_addr[s][d], w);
      14: g_pe[14].u_src.push(first_addr[s][d], w); default: g_pe[15].u_src.push(first_addr[s][d], w);
    endcase
  endtask

  function automatic int total_sent();
    int t = 0;
    for (int s = 0; s < NSW; s++) for (int d = 0; d < NSW; d++) t += sent[s][d];
    return t;
  endfunction
  function automatic int total_got();
    int t = 0;
    for (int s = 0; s < NSW; s++) for (int d = 0; d < NSW; d++) t += got[s][d];
    return t;
  endfunction

  // receiver side: order, integrity, address
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NSW; i++) if (rx_valid[i]) begin
      int s, d, q;
      s = int'(rx_data[i][31:28]); d = int'(rx_data[i][27:24]); q = int'(rx_data[i][23:0]);
      last_rx_t[i] = cyc;
      checks++;
      if (d != i || q != got[s][d] || rx_addr[i] != final_addr(s)) begin
        failures++;
        $display("PE %0d got %h addr %h, expected word %0d from %0d", i, rx_data[i], rx_addr[i], got[s][i], s);
      end else begin
        got[s][d]++;
        if (hops_of[s][d] == 7) n_long++;
      end
    end
  end

  // Wait until every word sent has arrived, or until nothing has arrived
  // for STALL cycles (words were lost), or limit cycles have passed.
  localparam int STALL = 3000;
  task automatic drain(input int limit);
    int n = 0, idle = 0, last = -1;
    while (total_got() != total_sent() && n < limit && idle < STALL) begin
      @(posedge clk); n++;
      if (int'(total_got()) == last) idle++; else begin idle = 0; last = int'(total_got()); end
    end
    chk(total_got() == total_sent(), $sformatf("delivered %0d of %0d words", total_got(), total_sent()));
    repeat (10) @(posedge clk);
  endtask

  task automatic new_phase(input int part, input int npaths_try, output int npaths);
    int nbuf;
    nbuf = 1 << part;
    for (int s = 0; s < NSW; s++) for (int d = 0; d < NSW; d++) have_path[s][d] = 0;
    for (int i = 0; i < NSW; i++) for (int p = 0; p < NPORTS; p++) for (int m = 0; m < NMEMS; m++) begin
      for (int b = 0; b < MAX_BUFS; b++) used[i][p][m][b] = 0;
      cfg_write(i, CFG_PART, port_e'(p), m, 0, part);
    end
    n_repart++;
    npaths = 0;
    // the corner-to-corner path first, with weight 2
    for (int k = 0; k <= npaths_try; k++) begin
      int s, d;
      bit ok;
      if (k == 0) begin s = 0; d = NSW - 1; end
      else if (npaths_try >= NSW * (NSW - 1)) begin
        s = (k - 1) / (NSW - 1); d = (k - 1) % (NSW - 1); if (d >= s) d++;
        if (s == 0 && d == NSW - 1) continue;
      end else begin
        s = $urandom_range(0, NSW - 1); d = $urandom_range(0, NSW - 2); if (d >= s) d++;
      end
      if (have_path[s][d]) continue;
      setup_path(s, d, nbuf, (k == 0) ? 2 : 1, ok);
      if (ok) npaths++;
    end
  endtask

  task automatic traffic(input int nwords);
    int srcs [$], dsts [$];
    for (int s = 0; s < NSW; s++) for (int d = 0; d < NSW; d++)
      if (have_path[s][d]) begin srcs.push_back(s); dsts.push_back(d); end
    fork
      begin
        for (int n = 0; n < nwords; n++) begin
          int k;
          // the weighted path gets a share of bursts
          k = (n % 5 == 0) ? 0 : $urandom_range(0, srcs.size() - 1);
          push(srcs[k], dsts[k]);
          if (n % 16 == 0) @(negedge clk);
        end
      end
      begin
        repeat (nwords / 16) begin
          @(negedge clk);
          for (int i = 0; i < NSW; i++) src_en[i] = ($urandom_range(0, 7) != 0);
        end
        for (int i = 0; i < NSW; i++) src_en[i] = 1;
      end
    join
    drain(100000);
  endtask

  initial begin
    int np;
    cfg = '0; cfg_sw = 0;
    for (int i = 0; i < NSW; i++) begin src_en[i] = 1; accept_pct[i] = 100; last_rx_t[i] = 0; end
    for (int s = 0; s < NSW; s++) for (int d = 0; d < NSW; d++) begin sent[s][d] = 0; got[s][d] = 0; hops_of[s][d] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- phase A: 2-word buffers, all pairs
    new_phase(4, NSW * (NSW - 1), np);
    chk(np == NSW * (NSW - 1), $sformatf("all %0d pairs fit in 2-word buffers (%0d)", NSW * (NSW - 1), np));
    // minimum latency corner to corner, idle mesh
    @(negedge clk);
    push(0, NSW - 1);
    begin
      longint t_in;
      @(posedge clk); t_in = cyc + 2;     // sender: address next cycle, data after
      repeat (40) @(posedge clk);
      chk(last_rx_t[NSW-1] == t_in + 3 * 7, $sformatf("7-switch latency %0d cycles, expected 21", last_rx_t[NSW-1] - t_in));
    end
    for (int i = 0; i < NSW; i++) accept_pct[i] = 80;
    traffic(4000);
    $display("phase A: %0d paths, %0d words", np, total_got());

    // ---- phase B: 4-word buffers
    new_phase(3, 200, np);
    $display("phase B: %0d paths", np);
    chk(np > 40, "phase B paths");
    traffic(3000);

    // ---- phase C: 8-word buffers (reset partition)
    new_phase(2, 200, np);
    $display("phase C: %0d paths", np);
    chk(np > 20, "phase C paths");
    traffic(3000);

    $display("words %0d, link refusals %0d, guard refusals %0d, weighted repeats %0d, interface refusals %0d, 7-switch words %0d, repartitions %0d",
             total_got(), n_link_refused, n_held, n_weighted,
             g_pe[0].u_snk.refusals + g_pe[5].u_snk.refusals + g_pe[15].u_snk.refusals, n_long, n_repart);
    chk(n_link_refused > 0, "refusal by a full buffer between switches happened");
    chk(n_held > 0, "ordering-guard refusal happened");
    chk(n_weighted > 0, "weighted round robin repeat happened");
    chk(g_pe[15].u_snk.refusals > 0, "receiving interface refusal happened");
    chk(n_long > 0, "delivery over 7 switches happened");
    chk(n_repart == 3, "repartitioning happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
