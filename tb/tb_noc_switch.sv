// tb_noc_switch: self-checking test of one five-port switch.
// A sender model drives every input channel and a receiver model every
// output channel. 40 streams are configured, one per (input port, output
// port, buffer 0/1) with input != output; each word carries its stream and
// sequence number.
//  1. Latency: through the idle switch a word's output data cycle is 3
//     cycles after its input data cycle.
//  2. Random traffic with senders pausing at random and receivers refusing
//     30% of words: every word arrives exactly once, in order, at the right
//     port, with its buffer's route as address. Refusals by full buffers
//     inside the switch and by the ordering guard must both have happened.
// No ports; cycle watchdog. The 3-cycle latency is a property of this
// implementation of the 4-step protocol.
module tb_noc_switch;
  import sw_pkg::*;
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
  int held_cnt = 0;

  noc_switch #(.DEPTH(32)) dut (.*);

  for (genvar p = 0; p < NPORTS; p++) begin : g_m
    tb_link_src  u_src (.clk, .rst_n, .enable(src_en[p]), .addr_o(in_addr[p]), .data_o(in_data[p]), .ack_i(in_ack[p]));
    tb_link_sink u_snk (.clk, .rst_n, .accept_pct(accept_pct[p]), .addr_i(out_addr[p]), .data_i(out_data[p]),
                        .ack_o(out_ack[p]), .rx_valid(rx_valid[p]), .rx_addr(rx_addr[p]), .rx_data(rx_data[p]));
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.g_in[0].u_in.held && dut.g_in[0].u_in.cur.valid) held_cnt++;
    if (dut.g_in[1].u_in.held && dut.g_in[1].u_in.cur.valid) held_cnt++;
    if (dut.g_in[2].u_in.held && dut.g_in[2].u_in.cur.valid) held_cnt++;
    if (dut.g_in[3].u_in.held && dut.g_in[3].u_in.cur.valid) held_cnt++;
    if (dut.g_in[4].u_in.held && dut.g_in[4].u_in.cur.valid) held_cnt++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  function automatic addr_t route_of(int q, int p, int b);
    addr_t a;
    a.valid = 1; a.port = port_e'((q + p + b) % 5); a.bufn = BUF_W'(q * 3 + b);
    return a;
  endfunction

  function automatic word_t tag(int q, int p, int b, int s);
    return {4'(q), 4'(p), 4'(b), 20'(s)};
  endfunction

  int sent [NPORTS][NPORTS][2];
  int got  [NPORTS][NPORTS][2];
  longint last_rx [NPORTS];

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) if (rx_valid[p]) begin
      int q, pp, b, s;
      q = int'(rx_data[p][31:28]); pp = int'(rx_data[p][27:24]); b = int'(rx_data[p][23:20]); s = int'(rx_data[p][19:0]);
      last_rx[p] = cyc;
      checks++;
      if (q >= NPORTS || pp != p || b > 1 || s != got[q][pp][b] || rx_addr[p] != route_of(q, pp, b)) begin
        failures++;
        $display("port %0d got %h addr %h (expected seq %0d)", p, rx_data[p], rx_addr[p], (q < NPORTS && pp < NPORTS && b < 2) ? got[q][pp][b] : -1);
      end else got[q][pp][b]++;
    end
  end

  task automatic cfg_write(input cfg_kind_e k, input int p, input int mem, input int b, input int v);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.kind = k; cfg.port = port_e'(p); cfg.mem = 2'(mem);
    cfg.bufn = BUF_W'(b); cfg.value = 8'(v);
    @(negedge clk);
    cfg = '0;
  endtask

  function automatic addr_t src_addr(int p, int b);
    addr_t a;
    a.valid = 1; a.port = port_e'(p); a.bufn = BUF_W'(b);
    return a;
  endfunction

  task automatic push(int q, int p, int b);
    case (q)
      0: g_m[0].u_src.push(src_addr(p, b), tag(q, p, b, sent[q][p][b]));
      1: g_m[1].u_src.push(src_addr(p, b), tag(q, p, b, sent[q][p][b]));
      2: g_m[2].u_src.push(src_addr(p, b), tag(q, p, b, sent[q][p][b]));
      3: g_m[3].u_src.push(src_addr(p, b), tag(q, p, b, sent[q][p][b]));
      default: g_m[4].u_src.push(src_addr(p, b), tag(q, p, b, sent[q][p][b]));
    endcase
    sent[q][p][b]++;
  endtask

  function automatic int total(input int a [NPORTS][NPORTS][2]);
    int t = 0;
    for (int q = 0; q < NPORTS; q++) for (int p = 0; p < NPORTS; p++) for (int b = 0; b < 2; b++) t += a[q][p][b];
    return t;
  endfunction

  initial begin
    cfg = '0;
    for (int p = 0; p < NPORTS; p++) begin src_en[p] = 1; accept_pct[p] = 100; last_rx[p] = 0; end
    for (int q = 0; q < NPORTS; q++) for (int p = 0; p < NPORTS; p++) for (int b = 0; b < 2; b++) begin sent[q][p][b] = 0; got[q][p][b] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int q = 0; q < NPORTS; q++) for (int p = 0; p < NPORTS; p++) if (p != q)
      for (int b = 0; b < 2; b++)
        cfg_write(CFG_ROUTE, p, int'(mem_of(port_e'(p), port_e'(q))), b, int'(route_of(q, p, b)));

    // ---- 1. latency, local -> east
    @(negedge clk);
    push(int'(P_L), int'(P_E), 0);
    begin
      longint t_in;
      // sender: address next cycle, data the cycle after
      @(posedge clk); t_in = cyc + 2;
      repeat (12) @(posedge clk);
      chk(last_rx[P_E] == t_in + 3, $sformatf("output data cycle %0d, input data cycle %0d", last_rx[P_E], t_in));
    end

    // ---- 2. random traffic
    for (int p = 0; p < NPORTS; p++) accept_pct[p] = 70;
    fork
      begin
        for (int n = 0; n < 6000; n++) begin
          int q, p, b;
          q = $urandom_range(0, 4);
          p = $urandom_range(0, 3); if (p >= q) p++;
          b = $urandom_range(0, 1);
          push(q, p, b);
          if (n % 8 == 0) @(negedge clk);
        end
      end
      begin
        repeat (3000) begin
          @(negedge clk);
          for (int p = 0; p < NPORTS; p++) src_en[p] = ($urandom_range(0, 9) != 0);
        end
        for (int p = 0; p < NPORTS; p++) src_en[p] = 1;
      end
    join
    begin
      int n = 0;
      while (total(got) != total(sent) && n < 50000) begin @(posedge clk); n++; end
    end
    chk(total(got) == total(sent), $sformatf("delivered %0d of %0d words", total(got), total(sent)));
    for (int q = 0; q < NPORTS; q++) for (int p = 0; p < NPORTS; p++) for (int b = 0; b < 2; b++)
      chk(got[q][p][b] == sent[q][p][b], "stream complete");
    chk(g_m[0].u_src.refused + g_m[1].u_src.refused + g_m[2].u_src.refused + g_m[3].u_src.refused + g_m[4].u_src.refused > 0,
        "a full buffer in the switch refused a word");
    chk(held_cnt > 0, "the ordering guard refused a word");
    $display("words %0d, held %0d, sender retries %0d", total(got), held_cnt,
             g_m[0].u_src.refused + g_m[1].u_src.refused + g_m[2].u_src.refused + g_m[3].u_src.refused + g_m[4].u_src.refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
