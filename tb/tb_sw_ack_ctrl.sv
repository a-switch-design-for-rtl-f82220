// tb_sw_ack_ctrl: self-checking test of the ack controller.
// Random requests and LENGTH-Full tables; each RAM's answer must be true
// exactly when it is asked and the addressed buffer is not full, and the
// write enable must follow the answer.
// No ports; new inputs every time step, answers checked one step later;
// a watchdog ends the run after a fixed time. The same-cycle answer is the switch's protocol.
module tb_sw_ack_ctrl;
  import sw_pkg::*;
  logic [NMEMS-1:0]               req, ack, wr_en;
  logic [NMEMS-1:0][BUF_W-1:0]    req_buf;
  logic [NMEMS-1:0][MAX_BUFS-1:0] full;
  int checks = 0, failures = 0;

  sw_ack_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int m = 0; m < NMEMS; m++) begin
        req[m]     = $urandom_range(0, 1);
        req_buf[m] = BUF_W'($urandom);
        full[m]    = MAX_BUFS'($urandom);
      end
      #1;
      for (int m = 0; m < NMEMS; m++) begin
        logic exp_ack;
        exp_ack = req[m] && (full[m][req_buf[m]] == 1'b0);
        checks++;
        if (ack[m] !== exp_ack || wr_en[m] !== exp_ack) begin
          failures++;
          $display("mem %0d buf %0d full %b: ack %b expected %b", m, req_buf[m], full[m], ack[m], exp_ack);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
