// tb_wrr_arbiter: self-checking test of the weighted round robin arbiter.
// 1. Three buffers A, B, C (indices 0, 1, 2) of weight 1 must be served
//    A B C A B C ... ; with A of weight 2, A A B C A A B C ...
// 2. Idle buffers take no turn: a buffer that stops requesting is skipped
//    at once.
// 3. Random request sets held steady for K rounds: each requester must get
//    K*w grants within one weight of that, a grant must always go to a
//    requester, and a grant must be issued whenever anyone requests.
// No ports; requests change on the falling edge and the grant is checked
// just after; cycle watchdog. The weighted sequence follows the switch
// description; the tie order by index is this design's.
module tb_wrr_arbiter;
  import sw_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req;
  logic [WEIGHT_W-1:0] weight [N];
  logic gnt_valid;
  logic [5:0] gnt_idx;
  int checks = 0, failures = 0;

  wrr_arbiter #(.N(N)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_seq(input int seq[], input string what);
    foreach (seq[k]) begin
      #1;
      checks++;
      if (!gnt_valid || int'(gnt_idx) != seq[k]) begin
        failures++;
        $display("%s step %0d: grant %0d (valid %b), expected %0d", what, k, gnt_idx, gnt_valid, seq[k]);
      end
      @(negedge clk);
    end
  endtask

  int cnt [N];
  int members [$];

  initial begin
    req = '0;
    for (int i = 0; i < N; i++) weight[i] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. plain round robin
    @(negedge clk); req[2:0] = 3'b111;
    expect_seq('{0, 1, 2, 0, 1, 2, 0, 1, 2}, "round robin");
    // weighted: A has weight 2
    req = '0;
    @(negedge clk);
    weight[0] = 2; req[2:0] = 3'b111;
    // the arbiter last served C, so A starts a fresh turn
    expect_seq('{0, 0, 1, 2, 0, 0, 1, 2, 0, 0}, "weighted");
    // 2. B stops; A has just used its two grants, so C goes first: C A A C A A C
    req = '0; @(negedge clk);
    req[0] = 1; req[2] = 1;
    expect_seq('{2, 0, 0, 2, 0, 0, 2}, "skip idle");
    req = '0; weight[0] = 1;
    @(negedge clk);
    checks++;
    if (gnt_valid) begin failures++; $display("grant with no request"); end

    // 3. random steady sets
    for (int t = 0; t < 60; t++) begin
      int sumw, rounds, wmax;
      @(negedge clk);
      req = '0; members.delete(); sumw = 0; wmax = 0;
      for (int i = 0; i < N; i++) begin
        weight[i] = WEIGHT_W'($urandom_range(0, 5));
        if ($urandom_range(0, 7) == 0) begin
          req[i] = 1; members.push_back(i);
          sumw += (weight[i] == 0) ? 1 : int'(weight[i]);
          wmax = ((weight[i] == 0) ? 1 : int'(weight[i])) > wmax ? ((weight[i] == 0) ? 1 : int'(weight[i])) : wmax;
        end
        cnt[i] = 0;
      end
      rounds = $urandom_range(2, 6);
      for (int c = 0; c < rounds * sumw; c++) begin
        #1;
        checks++;
        if ((req != 0) != gnt_valid || (gnt_valid && !req[gnt_idx])) begin
          failures++;
          $display("bad grant %0d valid %b", gnt_idx, gnt_valid);
        end
        if (gnt_valid) cnt[gnt_idx]++;
        @(negedge clk);
      end
      foreach (members[k]) begin
        int i, w, d;
        i = members[k];
        w = (weight[i] == 0) ? 1 : int'(weight[i]);
        d = cnt[i] - rounds * w;
        checks++;
        if (d > wmax || d < -wmax) begin
          failures++;
          $display("set %0d: buffer %0d weight %0d got %0d of %0d rounds", t, i, w, cnt[i], rounds);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
