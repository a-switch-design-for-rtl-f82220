// tb_link_src: testbench model of a sender on one channel (the processor
// side of a network interface, or an upstream switch).
// Words are queued with push(addr, data), one queue per destination
// address, and the queues take turns (round robin). One word is launched
// per cycle while enable is high: its address goes out in the next cycle
// and its data the cycle after, when the Ack-line is sampled. A true ack
// erases the oldest word of its queue; a false ack makes that queue start
// again from its oldest word and opens a new epoch for it; acks for words
// launched in an earlier epoch of their queue are ignored (the receiver
// refuses them too). After a refusal the queue waits two cycles, so the
// word comes again NACK_HOLD+1 cycles after its refused data cycle, when
// the receiver's ordering guard has expired. This is the same discipline
// as a switch output stage.
module tb_link_src
  import sw_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  output addr_t addr_o,
  output word_t data_o,
  input  logic  ack_i
);
  word_t       q     [256][$];
  int unsigned snd   [256];    // index in q of the next word to launch
  int unsigned epoch [256];
  longint      hold_until [256];  // no launch before this cycle after a refusal
  longint      cyc = 0;
  int unsigned rr = 0;

  typedef struct { logic v; int unsigned a; int unsigned idx; int unsigned ep; } fl_t;
  fl_t st_a = '{0, 0, 0, 0}, st_d = '{0, 0, 0, 0};
  word_t d_word = '0;
  int unsigned sent = 0, refused = 0;

  initial for (int i = 0; i < 256; i++) begin snd[i] = 0; epoch[i] = 0; hold_until[i] = 0; end

  task automatic push(input addr_t a, input word_t d);
    q[int'(a)].push_back(d);
  endtask

  function automatic int unsigned backlog();
    int unsigned n = 0;
    for (int i = 0; i < 256; i++) n += q[i].size();
    return n;
  endfunction

  assign addr_o = st_a.v ? addr_t'(st_a.a) : '0;
  assign data_o = st_d.v ? d_word : '0;

  always @(posedge clk) begin
    if (!rst_n) begin
      st_a.v <= 0; st_d.v <= 0;
    end else begin
      fl_t na, nd;
      int unsigned a;
      logic found;
      // acknowledgement of the word now on the Data-line
      if (st_d.v && st_d.ep == epoch[st_d.a]) begin
        a = st_d.a;
        if (ack_i) begin
          void'(q[a].pop_front());
          snd[a] = snd[a] - 1;
          sent++;
        end else begin
          snd[a] = 0;
          epoch[a] = epoch[a] + 1;
          hold_until[a] = cyc + 2;
          refused++;
        end
      end
      // the launched word moves to the data cycle (indices shift on a pop)
      nd = st_a;
      if (st_a.v && st_d.v && st_d.a == st_a.a && st_d.ep == st_a.ep && ack_i && st_d.ep + 0 == st_a.ep)
        nd.idx = st_a.idx - 1;
      d_word <= (nd.v && nd.idx < q[nd.a].size()) ? q[nd.a][nd.idx] : '0;
      st_d <= nd;
      // launch the next word, round robin over the queues
      na = '{0, 0, 0, 0};
      found = 0;
      if (enable) begin
        for (int i = 1; i <= 256; i++) begin
          int unsigned c;
          c = (rr + i) % 256;
          if (!found && snd[c] < q[c].size() && cyc >= hold_until[c]) begin
            found = 1;
            na = '{1, c, snd[c], epoch[c]};
            snd[c] = snd[c] + 1;
            rr = c;
          end
        end
      end
      st_a <= na;
      cyc = cyc + 1;
    end
  end
endmodule
