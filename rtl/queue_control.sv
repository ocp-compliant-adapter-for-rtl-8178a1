// queue_control: output queue control of the NA.
//
// It sits between the encapsulation unit and the eight output queues. When
// packet_sent arrives it latches out_ch_sel; if that queue is ready it goes to
// LOAD_QUEUE, which raises load for that queue for one cycle and sets the
// queue's hold bit (a loaded queue takes no new packet until its last flit is
// out). If the queue is not ready it waits in AWAIT until it is. In every
// state a queue that reports ready has its hold bit cleared.
// FSM: INIT (all hold and load low) -> IDLE -> LOAD_QUEUE / AWAIT -> IDLE.
//
// Own choice: while in AWAIT every hold bit is raised, so the encapsulation
// unit starts no new packet while one is still waiting to be loaded.
//
// Timing: packet_sent in cycle t with the queue ready -> load in t+1, hold of
// that queue high from t+2 until the queue is ready again.
// Synchronous, active-low reset.
module queue_control
  import na_pkg::*;
#(
  parameter int N_VC = NUM_VC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    packet_sent,
  input  logic [$clog2(N_VC)-1:0] out_ch_sel,
  input  logic [N_VC-1:0]         ready,
  output logic [N_VC-1:0]         hold,
  output logic [N_VC-1:0]         load
);
  localparam int CW = $clog2(N_VC);

  typedef enum logic [1:0] {Q_INIT, Q_IDLE, Q_LOAD, Q_AWAIT} state_e;
  state_e          state;
  logic [CW-1:0]   ch_q;
  logic [N_VC-1:0] hold_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= Q_INIT;
      ch_q   <= '0;
      hold_q <= '0;
    end else begin
      unique case (state)
        Q_INIT: begin
          hold_q <= '0;
          state  <= Q_IDLE;
        end
        Q_IDLE: begin
          hold_q <= hold_q & ~ready;
          if (packet_sent) begin
            ch_q  <= out_ch_sel;
            state <= ready[out_ch_sel] ? Q_LOAD : Q_AWAIT;
          end
        end
        Q_LOAD: begin
          hold_q       <= hold_q & ~ready;
          hold_q[ch_q] <= 1'b1;
          state        <= Q_IDLE;
        end
        Q_AWAIT: begin
          hold_q <= hold_q & ~ready;
          if (ready[ch_q]) state <= Q_LOAD;
        end
        default: state <= Q_INIT;
      endcase
    end
  end

  always_comb begin
    load = '0;
    if (state == Q_LOAD) load[ch_q] = 1'b1;
  end
  assign hold = hold_q | ((state == Q_AWAIT) ? '1 : '0);

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(load));
  assert property (@(posedge clk) disable iff (!rst_n) (load & ~ready) == '0);
endmodule
