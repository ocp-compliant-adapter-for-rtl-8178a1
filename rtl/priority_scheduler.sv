// priority_scheduler: chooses which incoming virtual channel (VC) the NA reads
// its next packet from, and keeps that VC selected until the packet's last
// flit has been taken.
//
// It works in the three groups the thesis describes:
//  1. Select Channel. A VC "arrives" when its empty bit is low and it is not
//     already queued or being serviced. Among the VCs arriving in a cycle the
//     one of highest static priority wins. Within one priority level a tag
//     vector remembers the VC chosen last; an untagged VC is preferred over a
//     tagged one, and the lowest-numbered VC breaks remaining ties. Selecting a
//     VC clears the old tags of its level (tag & ~mask[level]) and sets its own.
//  2. Decision FIFO. Decisions are queued in arrival order, so a VC that was
//     waiting first is served first regardless of priority. With one entry per
//     VC at most, eight entries never overflow. Each entry carries the VC number
//     and its priority; the one-hot get vector is derived from the number.
//  3. FSM (INIT, KEEP, CHANGE). INIT and CHANGE take the FIFO head, or the
//     decision of the same cycle when the FIFO is empty, and move to KEEP.
//     KEEP holds get/in_ch_sel until packet_received, then goes to CHANGE.
//
// Own choices: the Select Channel step here queues one decision per cycle (the
// others arriving in the same cycle are queued in the following cycles, still
// in priority order); the one-cycle CHANGE state is kept, so consecutive
// packets are separated by one idle cycle.
//
// Timing: a flit that appears (empty falls) in cycle t on an idle scheduler is
// selected at the end of t and get is high from cycle t+1. get[i] is only
// raised while empty[i] is low (handshake of the NA input port).
module priority_scheduler
  import na_pkg::*;
#(
  parameter int        N_VC    = NUM_VC,
  parameter vc_prio_t  VC_PRIO = VC_PRIO_DEFAULT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_VC-1:0]         empty,           // per VC: no flit waiting
  input  logic                    packet_received, // last flit taken this cycle
  output logic [N_VC-1:0]         get,             // per VC: take the flit
  output logic [$clog2(N_VC)-1:0] in_ch_sel,       // selects the input mux
  output logic [1:0]              sel_pri,         // priority of selected VC
  output logic                    busy             // a VC is selected (KEEP)
);
  localparam int CW = $clog2(N_VC);

  typedef enum logic [1:0] {S_INIT, S_KEEP, S_CHANGE} state_e;
  state_e state;

  typedef struct packed {
    logic [CW-1:0] sel;
    logic [1:0]    pri;
  } dec_t;

  // Priority masks: mask[p] has a bit set for each VC of level p
  logic [3:0][N_VC-1:0] mask_array;
  always_comb begin
    mask_array = '0;
    for (int c = 0; c < N_VC; c++) mask_array[VC_PRIO[c]][c] = 1'b1;
  end

  logic [N_VC-1:0] pending;   // queued or being serviced
  logic [N_VC-1:0] tag;       // last serviced VC of each level
  logic [N_VC-1:0] contain_flit;

  // ---- Group one: Select Channel ----
  logic          dec_valid;
  dec_t          dec;
  logic [N_VC-1:0] tag_next;

  always_comb begin
    logic [N_VC-1:0] cand, temp_untagged, pick_from;
    logic            found;
    contain_flit  = ~empty & ~pending;
    temp_untagged = '0;
    pick_from     = '0;
    dec_valid = 1'b0;
    dec       = '0;
    tag_next  = tag;
    found     = 1'b0;
    for (int p = 3; p >= 0; p--) begin
      cand = contain_flit & mask_array[p];
      if (!found && cand != '0) begin
        found         = 1'b1;
        temp_untagged = cand & ~tag;
        pick_from     = (temp_untagged != '0) ? temp_untagged : cand;
        for (int c = N_VC - 1; c >= 0; c--)
          if (pick_from[c]) dec.sel = CW'(c);
        dec.pri   = 2'(p);
        dec_valid = 1'b1;
        tag_next  = (tag & ~mask_array[p]);
        tag_next[dec.sel] = 1'b1;
      end
    end
  end

  // ---- Group two: decision FIFO ----
  dec_t            fifo [N_VC];
  logic [CW-1:0]   wr_ptr, rd_ptr;
  logic [CW:0]     count;
  logic            pop, push, take_direct;

  // ---- Group three: FSM ----
  logic [CW-1:0] cur_sel;
  logic [1:0]    cur_pri;
  logic          loading;

  always_comb begin
    loading     = (state == S_INIT || state == S_CHANGE) && (count != 0 || dec_valid);
    pop         = loading && (count != 0);
    take_direct = loading && (count == 0);
    push        = dec_valid && !take_direct;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_INIT;
      cur_sel <= '0;
      cur_pri <= '0;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      count   <= '0;
      pending <= '0;
      tag     <= '0;
      for (int i = 0; i < N_VC; i++) fifo[i] <= '0;
    end else begin
      if (dec_valid) begin
        tag              <= tag_next;
        pending[dec.sel] <= 1'b1;
      end
      if (push) begin
        fifo[wr_ptr] <= dec;
        wr_ptr       <= wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (CW+1)'(push) - (CW+1)'(pop);

      unique case (state)
        S_INIT, S_CHANGE: begin
          if (pop) begin
            cur_sel <= fifo[rd_ptr].sel;
            cur_pri <= fifo[rd_ptr].pri;
            state   <= S_KEEP;
          end else if (take_direct) begin
            cur_sel <= dec.sel;
            cur_pri <= dec.pri;
            state   <= S_KEEP;
          end
        end
        S_KEEP: begin
          if (packet_received) begin
            pending[cur_sel] <= 1'b0;
            state            <= S_CHANGE;
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end

  always_comb begin
    get = '0;
    if (state == S_KEEP) get[cur_sel] = ~empty[cur_sel];
  end
  assign in_ch_sel = cur_sel;
  assign sel_pri   = cur_pri;
  assign busy      = (state == S_KEEP);

  // The FIFO can hold every VC once, so it never overflows.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && count == (CW+1)'(N_VC) && !pop));
  // get is only raised on a VC that has a flit.
  assert property (@(posedge clk) disable iff (!rst_n) (get & empty) == '0);
endmodule
