// tb_sw_buf_ctrl: self-checking test of the buffer controller.
// Checks the reset partition (4 buffers of 8 words), the slot addresses of
// writes and sends, the LENGTH-Full and STATUS tables, erase on a true ack,
// rollback and epoch flip on a false ack, that an ack of an old epoch is
// ignored, and repartitioning into 16 buffers of 2 words and 1 of 32.
// No ports; stimulus changes on the falling edge and results are checked
// before the next rising edge; cycle watchdog. Partition sizes are the
// switch's; the pointer and epoch behaviour checked is this design's.
module tb_sw_buf_ctrl;
  import sw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic part_we;
  logic [PART_W-1:0] part_in, part;
  logic wr_en, snd_en, ack_valid, ack_epoch, ack_ok;
  logic [BUF_W-1:0] wr_buf, snd_buf, ack_buf;
  logic [4:0] wr_addr, snd_addr;
  logic [MAX_BUFS-1:0] full, pending, epoch;
  int checks = 0, failures = 0;

  sw_buf_ctrl #(.DEPTH(32)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic idle();
    part_we = 0; wr_en = 0; snd_en = 0; ack_valid = 0;
  endtask

  task automatic write(input int b, input int exp_addr);
    @(negedge clk); idle(); wr_en = 1; wr_buf = BUF_W'(b);
    #1 chk(int'(wr_addr) == exp_addr, $sformatf("write buf %0d slot %0d, got %0d", b, exp_addr, wr_addr));
    @(posedge clk); #1 idle();
  endtask

  task automatic send(input int b, input int exp_addr);
    @(negedge clk); idle(); snd_en = 1; snd_buf = BUF_W'(b);
    #1 chk(int'(snd_addr) == exp_addr, $sformatf("send buf %0d slot %0d, got %0d", b, exp_addr, snd_addr));
    @(posedge clk); #1 idle();
  endtask

  task automatic ack(input int b, input logic ep, input logic ok);
    @(negedge clk); idle(); ack_valid = 1; ack_buf = BUF_W'(b); ack_epoch = ep; ack_ok = ok;
    @(posedge clk); #1 idle();
  endtask

  task automatic peek_snd(input int b, input int exp_addr);
    @(negedge clk); snd_buf = BUF_W'(b);
    #1 chk(int'(snd_addr) == exp_addr, $sformatf("next send of buf %0d at %0d, got %0d", b, exp_addr, snd_addr));
  endtask

  task automatic set_part(input int p);
    @(negedge clk); idle(); part_we = 1; part_in = PART_W'(p);
    @(posedge clk); #1 idle();
  endtask

  initial begin
    idle(); part_in = 0; wr_buf = 0; snd_buf = 0; ack_buf = 0; ack_epoch = 0; ack_ok = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(part == 2, "reset partition is 4 buffers");
    chk(full == 16'hFFF0, "only buffers 0..3 exist after reset");
    chk(pending == 0, "nothing pending after reset");

    for (int i = 0; i < 8; i++) begin
      chk(!full[1], "buffer 1 not full yet");
      write(1, 8 + i);
    end
    chk(full[1], "buffer 1 full after 8 words");
    chk(pending == 16'h0002, "buffer 1 pending");
    send(1, 8); send(1, 9); send(1, 10);
    chk(pending[1], "still pending after 3 sends");
    ack(1, 0, 1);                        // word at slot 8 erased
    chk(!full[1], "space after an erase");
    write(1, 8);                         // wraps to slot 8
    chk(full[1], "full again");
    ack(1, 0, 0);                        // word at slot 9 refused
    chk(epoch[1] == 1'b1, "epoch flips on a refusal");
    peek_snd(1, 9);
    send(1, 9);
    ack(1, 0, 1);                        // stale ack of the old epoch
    peek_snd(1, 10);
    chk(full[1], "stale ack erased nothing");
    ack(1, 1, 1);                        // slot 9 erased
    chk(!full[1], "erase in the new epoch");
    // drain: send and erase the rest (slots 10..15, then 8)
    for (int i = 0; i < 7; i++) begin
      send(1, (i < 6) ? 10 + i : 8);
      ack(1, 1, 1);
    end
    chk(!pending[1], "buffer 1 drained");

    // other buffers untouched
    write(3, 24); write(0, 0);
    chk(pending == 16'h0009, "buffers 0 and 3 pending");

    // 16 buffers of 2 words
    set_part(4);
    chk(part == 4, "partition 16");
    chk(full == 0 && pending == 0, "repartition empties the RAM");
    write(15, 30); write(15, 31);
    chk(full == 16'h8000, "2-word buffer 15 full");
    write(7, 14);
    // 1 buffer of 32 words
    set_part(0);
    chk(full == 16'hFFFE, "single buffer");
    for (int i = 0; i < 32; i++) write(0, i);
    chk(full[0], "32-word buffer full");
    // out-of-range partition is clipped to 16 buffers
    set_part(7);
    chk(part == 4, "partition clipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
