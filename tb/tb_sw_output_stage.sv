// tb_sw_output_stage: self-checking test of an output stage.
// Receiving side driven directly (one word per RAM per cycle, retried while
// refused); sending side connected to a receiver model.
//  1. Timing: a word written in cycle t is on the Address-line in t+2 and
//     on the Data-line in t+3; one buffer alone streams a word per cycle.
//  2. Round robin: three backlogged buffers of weight 1 share the channel
//     A B C A B C; with A's weight 2, A gets two of every four words.
//  3. Random traffic into six buffers of three RAMs with a receiver that
//     refuses 40% of the words: every word arrives once, in order, with its
//     buffer's route as address.
//  4. A RAM repartitioned into 2-word buffers refuses a third word.
// No ports; cycle watchdog. The 4-cycle transaction and the round robin
// shares follow the switch description; rollback behaviour is this design's.
module tb_sw_output_stage;
  import sw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic  [NMEMS-1:0]            in_req, in_ack;
  logic  [NMEMS-1:0][BUF_W-1:0] in_buf;
  word_t [NMEMS-1:0]            in_data;
  addr_t addr_o;
  word_t data_o;
  logic  ack_i;
  int    accept_pct;
  logic  rx_valid;
  addr_t rx_addr;
  word_t rx_data;
  int checks = 0, failures = 0;
  longint cyc = 0;

  sw_output_stage #(.DEPTH(32)) dut (.*);
  tb_link_sink u_sink (.clk, .rst_n, .accept_pct, .addr_i(addr_o), .data_i(data_o),
                       .ack_o(ack_i), .rx_valid, .rx_addr, .rx_data);

  always @(posedge clk) cyc <= cyc + 1;

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

  task automatic cfg_write(input cfg_kind_e k, input int mem, input int b, input int v);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.kind = k; cfg.port = P_E; cfg.mem = 2'(mem);
    cfg.bufn = BUF_W'(b); cfg.value = 8'(v);
    @(negedge clk);
    cfg = '0;
  endtask

  function automatic addr_t route_of(int mem, int b);
    addr_t a;
    a.valid = 1; a.port = port_e'((mem + b) % 5); a.bufn = BUF_W'(mem * 4 + b);
    return a;
  endfunction

  // received words, logged by the monitor
  word_t  rx_q [$];
  addr_t  rx_a [$];
  longint rx_t [$];
  longint addr_t_seen [$];
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin rx_q.push_back(rx_data); rx_a.push_back(rx_addr); rx_t.push_back(cyc); end
    if (addr_o.valid) addr_t_seen.push_back(cyc);
  end

  // per-RAM writer queues
  typedef struct { int b; word_t d; } wr_t;
  wr_t wq [NMEMS][$];
  longint wr_time [$];
  always @(negedge clk) begin
    for (int m = 0; m < NMEMS; m++) begin
      in_req[m] = wq[m].size() > 0;
      in_buf[m] = in_req[m] ? BUF_W'(wq[m][0].b) : '0;
      in_data[m] = in_req[m] ? wq[m][0].d : '0;
    end
  end
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < NMEMS; m++)
      if (in_req[m] && in_ack[m]) begin void'(wq[m].pop_front()); wr_time.push_back(cyc); end
  end

  function automatic word_t tag(int mem, int b, int seq);
    return {8'(mem), 8'(b), 16'(seq)};
  endfunction

  int seq [NMEMS][MAX_BUFS];
  int exp_seq [NMEMS][MAX_BUFS];

  task automatic wait_drain(int limit);
    int n = 0;
    while (n < limit) begin
      logic busy = 0;
      for (int m = 0; m < NMEMS; m++) if (wq[m].size() > 0) busy = 1;
      if (!busy && dut.pending == '0) break;
      @(posedge clk); n++;
    end
    repeat (6) @(posedge clk);
  endtask

  // check received words: order per buffer, address = route
  task automatic check_rx();
    while (rx_q.size() > 0) begin
      word_t w; addr_t a; int m, b, s;
      w = rx_q.pop_front(); a = rx_a.pop_front(); void'(rx_t.pop_front());
      m = int'(w[31:24]); b = int'(w[23:16]); s = int'(w[15:0]);
      chk(m < NMEMS && b < MAX_BUFS, "word tag in range");
      if (m < NMEMS && b < MAX_BUFS) begin
        chk(s == exp_seq[m][b], $sformatf("mem %0d buf %0d word %0d, expected %0d", m, b, s, exp_seq[m][b]));
        chk(a == route_of(m, b), "address is the buffer's route");
        exp_seq[m][b] = s + 1;
      end
    end
  endtask

  initial begin
    cfg = '0; accept_pct = 100;
    for (int m = 0; m < NMEMS; m++) for (int b = 0; b < MAX_BUFS; b++) begin seq[m][b] = 0; exp_seq[m][b] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // routes for a few buffers
    for (int m = 0; m < 3; m++) for (int b = 0; b < 2; b++) cfg_write(CFG_ROUTE, m, b, int'(route_of(m, b)));

    // ---- 1. timing and single-buffer throughput
    @(negedge clk);
    rx_t.delete(); wr_time.delete(); addr_t_seen.delete();
    for (int i = 0; i < 8; i++) wq[0].push_back('{0, tag(0, 0, seq[0][0]++)});
    wait_drain(200);
    chk(wr_time.size() == 8 && rx_t.size() == 8, "8 words in, 8 out");
    if (rx_t.size() == 8 && wr_time.size() == 8) begin
      chk(addr_t_seen[0] == wr_time[0] + 2, $sformatf("address 2 cycles after the write (%0d vs %0d)", addr_t_seen[0], wr_time[0]));
      chk(rx_t[0] == wr_time[0] + 3, "data 3 cycles after the write");
      for (int i = 1; i < 8; i++) chk(rx_t[i] == rx_t[i-1] + 1, "one word per cycle");
    end
    check_rx();

    // ---- 2. round robin: fill three buffers while the receiver refuses
    accept_pct = 0;
    for (int i = 0; i < 12; i++) begin
      wq[0].push_back('{1, tag(0, 1, seq[0][1]++)});
      wq[1].push_back('{0, tag(1, 0, seq[1][0]++)});
      wq[2].push_back('{1, tag(2, 1, seq[2][1]++)});
    end
    repeat (40) @(posedge clk);
    @(negedge clk) accept_pct = 100;
    wait_drain(400);
    begin
      int na, nb, nc;
      word_t w [$];
      w = rx_q;
      // while all three are backlogged (first 30 words) each 3 consecutive
      // words come from 3 different buffers
      for (int i = 3; i + 3 <= 30; i += 3) begin
        na = 0; nb = 0; nc = 0;
        for (int k = 0; k < 3; k++) begin
          if (w[i+k][31:24] == 0) na++;
          if (w[i+k][31:24] == 1) nb++;
          if (w[i+k][31:24] == 2) nc++;
        end
        chk(na == 1 && nb == 1 && nc == 1, $sformatf("round robin at word %0d", i));
      end
    end
    check_rx();

    // weighted: buffer (0,1) weight 2
    cfg_write(CFG_WEIGHT, 0, 1, 2);
    accept_pct = 0;
    for (int i = 0; i < 16; i++) begin
      wq[0].push_back('{1, tag(0, 1, seq[0][1]++)});
      wq[1].push_back('{0, tag(1, 0, seq[1][0]++)});
      wq[2].push_back('{1, tag(2, 1, seq[2][1]++)});
    end
    repeat (40) @(posedge clk);
    @(negedge clk) accept_pct = 100;
    wait_drain(400);
    begin
      int na;
      na = 0;
      for (int i = 4; i < 20; i++) if (rx_q[i][31:24] == 0) na++;
      chk(na == 8, $sformatf("weight 2 buffer got %0d of 16 words", na));
    end
    check_rx();
    cfg_write(CFG_WEIGHT, 0, 1, 1);

    // ---- 3. random traffic, receiver refuses 40%
    accept_pct = 60;
    for (int n = 0; n < 1500; n++) begin
      int m, b;
      m = $urandom_range(0, 2); b = $urandom_range(0, 1);
      wq[m].push_back('{b, tag(m, b, seq[m][b]++)});
      if (n % 50 == 0) begin wait_drain(100); check_rx(); end
    end
    wait_drain(20000);
    check_rx();
    for (int m = 0; m < 3; m++) for (int b = 0; b < 2; b++)
      chk(exp_seq[m][b] == seq[m][b], $sformatf("all words of mem %0d buf %0d delivered (%0d/%0d)", m, b, exp_seq[m][b], seq[m][b]));
    chk(u_sink.refusals > 100, "receiver refusals happened");

    // ---- 4. 2-word buffers in RAM 3
    cfg_write(CFG_PART, 3, 0, 4);
    chk(dut.part[3] == 4, "RAM 3 holds 16 buffers");
    cfg_write(CFG_ROUTE, 3, 15, int'(route_of(3, 15)));
    accept_pct = 0;
    @(negedge clk);
    for (int i = 0; i < 3; i++) wq[3].push_back('{15, tag(3, 15, seq[3][15]++)});
    repeat (20) @(posedge clk);
    chk(wq[3].size() == 1, "third word refused by a full 2-word buffer");
    @(negedge clk) accept_pct = 100;
    wait_drain(200);
    check_rx();
    chk(exp_seq[3][15] == 3, "2-word buffer delivered all three words");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
