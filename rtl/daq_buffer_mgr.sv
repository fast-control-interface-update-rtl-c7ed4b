// daq_buffer_mgr: bookkeeping of the multi-buffer DAQ store.
//
// Formatted DAQ words arrive continuously and are written, all at one
// shared ring pointer that wraps at the event length, into every buffer that
// is not frozen. An L1A freezes one of them, so that it holds exactly the
// last evt_len words (the readout window), and queues it for readout; the
// buffers then need no copying or formatting after the trigger. When all
// NUM_BUF buffers are frozen the store is full and a further L1A is lost
// (sticky overflow flag). The readout frees the oldest frozen buffer, which
// then refills with current data.
//
// A freed buffer must see evt_len new words before its window is current. A
// fill counter per buffer tracks this; an L1A chooses the fullest unfrozen
// buffer, and if even that one is not yet refilled, the event is taken but
// flagged stale (sticky flag). That is the case of an L1A
// arriving right after a buffer was freed out of the full state; dummy words
// appended by the readout (see op_control) give the buffer time to refill.
//
// Follow-the-readout refill (follow_i, off by default): the buffer being
// read out need not wait for its release to start refilling. The manager
// tracks how far the readout of the oldest frozen buffer has got (rd_req_i
// and rd_addr_i) and lets the formatter overwrite ring positions that have
// already been read. The words so written count toward the buffer's fill,
// so after its release it needs fewer new words before it is current again.
// A write that must be skipped (the writer caught up with the readout)
// restarts the count, since the refilled words must be contiguous.
//
// Read-address translation: readout offset k of a frozen buffer maps to ring
// position (start + k) mod evt_len, start being the oldest word at freeze,
// so the readout can fetch the event from offset 0 of its buffer as from an
// ordinary memory. Offsets past evt_len and unfrozen buffers are not
// translated.
//
// Interface and timing: wr_mask_o/wr_ptr_o/wr_data_o drive the memory's
// write port in the cycle a word arrives. l1a_i and free_i act at the next
// clock edge; a word arriving in the L1A cycle still lands in the frozen
// buffer. free_i releases head_buf_o (only meaningful when head_valid_o).
// The four buffers and the two remedies for the refill hazard (dummy
// words, refill behind the readout pointer) follow the FC update note; the
// shared ring pointer, the choice of buffer and the stale flag are this
// design's.
module daq_buffer_mgr
  import fc_pkg::*;
#(
  parameter int unsigned NUM_BUF = 4,
  parameter int unsigned BUF_AW  = 10,
  localparam int unsigned BW     = $clog2(NUM_BUF),
  localparam int unsigned CW     = $clog2(NUM_BUF + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable_i,
  input  logic [15:0]            evt_len_i,     // 1 .. 2**BUF_AW
  input  logic                   clear_err_i,
  input  logic                   follow_i,      // refill the head buffer behind the readout
  // formatted data in
  input  logic                   fmt_valid_i,
  input  logic [DATA_W-1:0]      fmt_data_i,
  // memory write port
  output logic [NUM_BUF-1:0]     wr_mask_o,
  output logic [BUF_AW-1:0]      wr_ptr_o,
  output logic [DATA_W-1:0]      wr_data_o,
  // trigger and release
  input  logic                   l1a_i,
  input  logic                   free_i,
  output logic                   l1a_accepted_o,
  output logic                   head_valid_o,
  output logic [BW-1:0]          head_buf_o,
  output logic                   full_o,
  output logic [CW-1:0]          frozen_cnt_o,
  output logic                   overflow_o,
  output logic                   stale_o,
  // readout reads: address translation and read tracking
  input  logic                   rd_req_i,
  input  logic [BW+BUF_AW-1:0]   rd_addr_i,
  output logic [BW+BUF_AW-1:0]   rd_phys_o
);

  logic [NUM_BUF-1:0] frozen_q;
  logic [BUF_AW-1:0]  start_q [NUM_BUF];
  logic [BUF_AW:0]    fill_q  [NUM_BUF];
  logic [BUF_AW-1:0]  wptr_q, wptr_nxt;
  logic [BW-1:0]      fifo_q  [NUM_BUF];
  logic [BW-1:0]      rd_q, wr_q;
  logic [CW-1:0]      cnt_q;
  logic               wr;
  logic [BUF_AW:0]    len;

  // selection of the buffer an L1A freezes
  logic               sel_ok;
  logic [BW-1:0]      sel;
  logic [BUF_AW:0]    sel_fill;

  assign len = (evt_len_i == '0) ? (BUF_AW+1)'(1)
             : (32'(evt_len_i) > (1 << BUF_AW)) ? (BUF_AW+1)'(1 << BUF_AW)
             : evt_len_i[BUF_AW:0];

  // readout address: buffer and offset
  logic [BW-1:0]     rb;
  logic [BUF_AW-1:0] roff;
  logic [BUF_AW:0]   rsum;
  assign rb   = rd_addr_i[BW+BUF_AW-1:BUF_AW];
  assign roff = rd_addr_i[BUF_AW-1:0];

  // follow-the-readout refill: a word may be written into the head buffer
  // at a ring position the readout has already passed
  logic [BW-1:0]      head;
  logic [BUF_AW:0]    rdprog_q;     // words of the head buffer read so far
  logic [BUF_AW:0]    woff;         // write position as a readout offset of the head
  logic               follow_ok;
  logic [NUM_BUF-1:0] head_mask;

  assign head      = fifo_q[rd_q];
  assign woff      = (wptr_q >= start_q[head])
                   ? (BUF_AW+1)'(wptr_q - start_q[head])
                   : (BUF_AW+1)'(wptr_q) + len - (BUF_AW+1)'(start_q[head]);
  assign follow_ok = follow_i && (cnt_q != '0) && (woff < rdprog_q);
  assign head_mask = follow_ok ? NUM_BUF'(1) << head : '0;

  assign wr        = enable_i && fmt_valid_i;
  assign wr_mask_o = wr ? (~frozen_q | head_mask) : '0;
  assign wr_ptr_o  = wptr_q;
  assign wr_data_o = fmt_data_i;
  assign wptr_nxt  = !wr ? wptr_q
                   : ((BUF_AW+1)'(wptr_q) + 1'b1 >= len) ? '0 : wptr_q + 1'b1;

  always_comb begin
    sel_ok   = 1'b0;
    sel      = '0;
    sel_fill = '0;
    for (int b = 0; b < NUM_BUF; b++) begin
      if (!frozen_q[b] && (!sel_ok || fill_q[b] > sel_fill)) begin
        sel_ok   = 1'b1;
        sel      = BW'(b);
        sel_fill = fill_q[b];
      end
    end
  end

  logic do_free, do_freeze, sel_fill_now;
  assign do_free   = free_i && (cnt_q != '0);
  assign do_freeze = l1a_i && sel_ok;
  // the word written in the L1A cycle counts toward the frozen window
  assign sel_fill_now = (sel_fill >= len) || (wr && (sel_fill + 1'b1 >= len));

  assign l1a_accepted_o = do_freeze;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frozen_q   <= '0;
      wptr_q     <= '0;
      rdprog_q   <= '0;
      rd_q       <= '0;
      wr_q       <= '0;
      cnt_q      <= '0;
      overflow_o <= 1'b0;
      stale_o    <= 1'b0;
      for (int b = 0; b < NUM_BUF; b++) begin
        start_q[b] <= '0;
        fill_q[b]  <= '0;
        fifo_q[b]  <= '0;
      end
    end else begin
      wptr_q <= wptr_nxt;
      for (int b = 0; b < NUM_BUF; b++) begin
        if (wr && !frozen_q[b] && fill_q[b] < len) fill_q[b] <= fill_q[b] + 1'b1;
      end
      // head buffer refilled behind the readout: count the words, and start
      // over if a write had to be skipped (the refilled words must be the
      // most recent ones, without a gap)
      if (wr && follow_ok && fill_q[head] < len) fill_q[head] <= fill_q[head] + 1'b1;
      if (wr && (cnt_q != '0) && !follow_ok) fill_q[head] <= '0;
      if (rd_req_i && (cnt_q != '0) && rb == head && (BUF_AW+1)'(roff) < len
          && (BUF_AW+1)'(roff) >= rdprog_q)
        rdprog_q <= (BUF_AW+1)'(roff) + 1'b1;
      if (do_free) begin
        frozen_q[head] <= 1'b0;
        if (!follow_i) fill_q[head] <= '0;
        rdprog_q <= '0;
        rd_q <= (rd_q == BW'(NUM_BUF-1)) ? '0 : rd_q + 1'b1;
      end
      if (do_freeze) begin
        frozen_q[sel] <= 1'b1;
        fill_q[sel]   <= '0;
        start_q[sel]  <= wptr_nxt;
        if (!sel_fill_now) stale_o <= 1'b1;
        fifo_q[wr_q]  <= sel;
        wr_q <= (wr_q == BW'(NUM_BUF-1)) ? '0 : wr_q + 1'b1;
      end
      if (l1a_i && !sel_ok) overflow_o <= 1'b1;
      cnt_q <= cnt_q + CW'(do_freeze) - CW'(do_free);
      if (clear_err_i) begin
        overflow_o <= 1'b0;
        stale_o    <= 1'b0;
      end
    end
  end

  assign head_valid_o = (cnt_q != '0);
  assign head_buf_o   = fifo_q[rd_q];
  assign full_o       = (cnt_q == CW'(NUM_BUF));
  assign frozen_cnt_o = cnt_q;

  // address translation of the readout
  assign rsum = (BUF_AW+1)'(roff) + (BUF_AW+1)'(start_q[rb]);
  always_comb begin
    rd_phys_o = rd_addr_i;
    if (frozen_q[rb] && (BUF_AW+1)'(roff) < len)
      rd_phys_o[BUF_AW-1:0] = (rsum >= len) ? BUF_AW'(rsum - len) : BUF_AW'(rsum);
  end

  a_free_needs_event: assert property (@(posedge clk) disable iff (!rst_n)
    free_i |-> head_valid_o);

endmodule
