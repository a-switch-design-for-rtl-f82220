// tb_sw_input_stage: self-checking test of the input stage (north port).
// A random stream of addresses (a few buffers, all five ports, invalid
// port codes, idle cycles) with the word one cycle behind each address.
// The output stages are stood in for by a random accept pattern. A
// reference, kept as a list of the cycles in which a word was refused,
// predicts in every data cycle which output stage is asked, the buffer and
// word passed on, the Ack-line, and the refusals of the ordering guard
// (NACK_HOLD cycles after a refusal of the same buffer-id).
// No ports; one address or word per cycle, checked in the same cycle;
// cycle watchdog. Dispatch and ack return follow the switch description; the
// guard checked is this design's.
module tb_sw_input_stage;
  import sw_pkg::*;
  localparam int T = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t addr_i;
  word_t data_i, fwd_data;
  logic ack_o;
  logic [NPORTS-1:0] fwd_req, fwd_ack;
  logic [BUF_W-1:0] fwd_buf;
  int checks = 0, failures = 0, holds = 0, acks = 0, nacks = 0;

  sw_input_stage #(.PORT(P_N)) dut (.*);

  addr_t a_seq [T];
  word_t d_seq [T];
  logic  accept [T];
  logic  refused [T];   // genuine refusal in data cycle t

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < T; t++) begin
      a_seq[t].valid = ($urandom_range(0, 5) != 0);
      a_seq[t].port  = port_e'($urandom_range(0, 7) == 0 ? $urandom_range(5, 7) : $urandom_range(0, 4));
      a_seq[t].bufn  = BUF_W'($urandom_range(0, 1));
      d_seq[t]       = $urandom;
      accept[t]      = ($urandom_range(0, 2) != 0);
      refused[t]     = 0;
    end
    addr_i = '0; data_i = '0; fwd_ack = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      addr_i = a_seq[t];
      data_i = (t > 0) ? d_seq[t-1] : '0;
      if (t > 0) begin
        addr_t a;
        logic legal, held, exp_ack;
        logic [NPORTS-1:0] exp_req;
        a = a_seq[t-1];
        legal = a.valid && a.port != P_N && 3'(a.port) < 3'(NPORTS);
        held = 0;
        for (int k = 1; k <= NACK_HOLD; k++)
          if (t - k >= 1 && refused[t-k] && a_seq[t-k-1].port == a.port && a_seq[t-k-1].bufn == a.bufn)
            held = 1;
        exp_req = '0;
        if (legal && !held) exp_req[a.port] = 1'b1;
        fwd_ack = accept[t] ? exp_req : '0;
        exp_ack = (exp_req != 0) && accept[t];
        refused[t] = a.valid && !held && !exp_ack;
        if (held && a.valid) holds++;
        if (exp_ack) acks++;
        if (refused[t]) nacks++;
        #1;
        checks++;
        if (fwd_req !== exp_req || ack_o !== exp_ack ||
            (exp_req != 0 && (fwd_buf !== a.bufn || fwd_data !== d_seq[t-1]))) begin
          failures++;
          $display("cycle %0d addr %h: req %b/%b ack %b/%b buf %0d data %h", t, a, fwd_req, exp_req, ack_o, exp_ack, fwd_buf, fwd_data);
        end
      end
    end
    checks++;
    if (holds == 0 || acks == 0 || nacks == 0) begin
      failures++;
      $display("a case never happened: holds %0d acks %0d nacks %0d", holds, acks, nacks);
    end
    $display("held %0d accepted %0d refused %0d", holds, acks, nacks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
