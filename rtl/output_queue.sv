// output_queue: packet buffer for one outgoing virtual channel (VC).
//
// When load is high the whole packet (flit_array) is captured. From the next
// cycle the queue streams it to the output port controller of the
// synchronizer, one flit per cycle: put is high and out_flit valid in every
// cycle in which full is low; while full is high nothing is sent. After the
// flit with bit 16 set (the last flit) has been put, the queue is empty again
// and ready rises, telling the queue control that a new packet may be loaded.
// ready is low from the cycle after load until the last flit has gone.
//
// The thesis gives one queue per VC so that a blocked VC does not stop the
// others. Own choices: the queue holds exactly one packet of up to PKT_MAX
// flits, and a packet without a last-flit mark ends after PKT_MAX flits.
// Synchronous, active-low reset.
module output_queue
  import na_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  packet_t flit_array,
  input  logic    full,
  output flit_t   out_flit,
  output logic    put,
  output logic    ready
);
  localparam int IW = $clog2(PKT_MAX);

  packet_t       buf_q;
  logic [IW-1:0] rd_idx;
  logic          busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q  <= '0;
      rd_idx <= '0;
      busy   <= 1'b0;
    end else if (load) begin
      buf_q  <= flit_array;
      rd_idx <= '0;
      busy   <= 1'b1;
    end else if (put) begin
      if (buf_q[rd_idx][FLIT_W-1] || rd_idx == IW'(PKT_MAX - 1)) busy <= 1'b0;
      else rd_idx <= rd_idx + 1'b1;
    end
  end

  assign put      = busy && !full;
  assign out_flit = buf_q[rd_idx];
  assign ready    = !busy;

  assert property (@(posedge clk) disable iff (!rst_n) load |-> !busy);
endmodule
