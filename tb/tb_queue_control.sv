// tb_queue_control: output queue control against a reference model of its
// FSM. Random packet_sent/out_ch_sel and random ready; checks that load
// comes one cycle after packet_sent to a ready queue, waits (AWAIT) for a
// queue that is not ready, sets the queue's hold bit, clears hold bits of
// ready queues, and raises every hold bit while waiting.
module tb_queue_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic       packet_sent = 0;
  logic [2:0] out_ch_sel = 0;
  logic [7:0] ready = '1, hold, load;
  queue_control dut (.clk, .rst_n, .packet_sent, .out_ch_sel, .ready, .hold, .load);

  // reference model
  typedef enum {R_INIT, R_IDLE, R_LOAD, R_AWAIT} rs_e;
  rs_e rs;
  int  rch;
  logic [7:0] rhold;
  int n_load = 0, n_await = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_load, exp_hold;
    rs = R_INIT; rch = 0; rhold = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      // stimulus for this cycle
      packet_sent = (rs == R_IDLE) && ($urandom % 3 == 0);
      out_ch_sel  = 3'($urandom);
      ready       = 8'($urandom) | 8'($urandom);
      // a queue being loaded is ready (the queue control only loads ready queues)
      if (rs == R_LOAD) ready[rch] = 1'b1;
      #1;
      exp_load = (rs == R_LOAD) ? (8'b1 << rch) : 8'b0;
      exp_hold = rhold | ((rs == R_AWAIT) ? 8'hFF : 8'h00);
      checks++;
      if (load !== exp_load || hold !== exp_hold) begin
        failures++;
        $display("FAIL cycle %0d: load %b exp %b hold %b exp %b", k, load, exp_load, hold, exp_hold);
      end
      // reference next state
      case (rs)
        R_INIT:  begin rhold = '0; rs = R_IDLE; end
        R_IDLE:  begin
          rhold = rhold & ~ready;
          if (packet_sent) begin
            rch = out_ch_sel;
            rs = ready[out_ch_sel] ? R_LOAD : R_AWAIT;
          end
        end
        R_LOAD:  begin rhold = (rhold & ~ready) | (8'b1 << rch); rs = R_IDLE; n_load++; end
        R_AWAIT: begin rhold = rhold & ~ready; if (ready[rch]) rs = R_LOAD; n_await++; end
      endcase
      @(negedge clk);
    end
    checks++;
    if (n_load < 10 || n_await < 10) begin failures++; $display("FAIL too few loads/awaits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
