// tb_fc_daq_top: end-to-end test of the FC interface and DAQ readout, with
// every parameter at its default (four buffers of 1024 words, 292-word
// events, 16 dummy words).
//
// A formatter model writes one running-count word per cycle, so the window
// each L1A must freeze is known. The test drives the FC command stream and
// the L1A / ReadEvent strobes and checks on the DAQ link:
//   - CSR reads (board ID, event length), a variable-length block write and
//     block read of the diagnostic memory, rejection of the old 0x15 code;
//   - a readout starting 6 cycles after ReadEvent with the frozen window,
//     the dummy words and the last flag;
//   - four L1As filling all buffers (full), a fifth one lost (overflow), and
//     the four events read out in trigger order with queued ReadEvents while
//     external commands are held off;
//   - an L1A right after a release from the full state flagged stale with
//     few dummy words, and not stale when the dummy words cover the refill;
//   - the FC block address left at the DAQ buffers after a readout;
//   - with the refill behind the readout enabled (CSR0 bit 2), an L1A right
//     after a release from full is clean even with 16 dummy words, and its
//     event holds the current window.
// Each mechanism is counted; one that never happens is a failure.
module tb_fc_daq_top;
  import fc_pkg::*;

  localparam int LEN = 292, NDUM = 16, NB = 4, AW = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fc_valid, fc_ready, l1a, read_event, fmt_valid, dl_valid, dl_last, full, busy;
  fc_cmd_t fc_cmd;
  logic [15:0] fmt_data, dl_data;
  logic [4:0] run;

  fc_daq_top dut (
    .clk, .rst_n, .fc_valid, .fc_cmd, .fc_ready, .l1a, .read_event,
    .fmt_valid, .fmt_data, .dl_valid, .dl_data, .dl_last,
    .daq_full(full), .daq_busy(busy), .run_ctrl(run));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // formatter model: one word per cycle, the running count
  int n = 0;
  assign fmt_data = 16'(n);
  always @(posedge clk) if (rst_n && fmt_valid) n <= n + 1;

  // link capture
  logic [15:0] got [$];
  int lasts = 0, cyc = 0, first_cyc = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dl_valid) begin
      got.push_back(dl_data);
      if (first_cyc < 0) first_cyc = cyc;
      if (dl_last) lasts++;
    end
  end

  // mechanism counters
  int m_bwrite = 0, m_bread = 0, m_illegal = 0, m_readout = 0, m_full = 0, m_overflow = 0;
  int m_stale = 0, m_dummy = 0, m_queued = 0, m_holdoff = 0, m_clean_after_guard = 0, m_follow = 0;
  always @(posedge clk) if (rst_n) begin
    if (fc_valid && !fc_ready && busy) m_holdoff++;
  end

  task automatic send(input logic [7:0] op, input logic [15:0] opnd);
    fc_valid = 1; fc_cmd = '{op: op, operand: opnd};
    @(posedge clk);
    while (!fc_ready) @(posedge clk);
    #1;
    fc_valid = 0;
  endtask

  task automatic fc_read(input logic [BLK_W-1:0] blk, input int a, output logic [15:0] d);
    int l;
    send(OP_SET_BLOCK, 16'(blk));
    send(OP_SET_ADDR, 16'(a));
    got.delete(); l = lasts;
    send(OP_READ, 0);
    wait (lasts == l + 1); #1;
    d = got[0];
  endtask

  task automatic fc_write(input logic [BLK_W-1:0] blk, input int a, input logic [15:0] d);
    send(OP_SET_BLOCK, 16'(blk));
    send(OP_SET_ADDR, 16'(a));
    send(OP_WRITE, d);
  endtask

  task automatic trigger(output int lastw);
    l1a = 1; lastw = n;
    @(posedge clk); #1;
    l1a = 0;
  endtask

  // ReadEvent, wait for the event, check window and dummies
  task automatic readout(input int lastw, input int ndum, input bit check_data, input string tag);
    int l, t0, bad;
    got.delete(); l = lasts; first_cyc = -1;
    read_event = 1; t0 = cyc;
    @(posedge clk); #1;
    read_event = 0;
    wait (lasts == l + 1); #1;
    m_readout++;
    check(first_cyc - t0 == 6, $sformatf("%s: ReadEvent to data %0d cycles", tag, first_cyc - t0));
    check(got.size() == LEN + ndum, $sformatf("%s: %0d words", tag, got.size()));
    bad = 0;
    if (check_data)
      for (int k = 0; k < LEN && k < got.size(); k++)
        if (got[k] != 16'(lastw - LEN + 1 + k)) bad++;
    for (int k = LEN; k < got.size(); k++) begin
      if (got[k] != DUMMY_WORD) bad++;
      else m_dummy++;
    end
    check(bad == 0, $sformatf("%s: %0d words wrong", tag, bad));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] d, wdat [40];
  int lw [$];
  int lastw, bad, l;
  initial begin
    fc_valid = 0; fc_cmd = '0; l1a = 0; read_event = 0; fmt_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    fmt_valid = 1;
    // --- FC register and memory access
    fc_read(BLK_CSR, CSR_ID_RUN, d);
    check(d[2:0] == 3'd5, $sformatf("board ID %0d", d[2:0]));
    fc_write(BLK_CSR, CSR_ID_RUN, 16'h00A8);
    check(run == 5'b10101, "run-mode bits");
    fc_read(BLK_CSR, CSR_EVT_LEN, d);
    check(d == 16'(LEN), "default event length");
    send(OP_SET_BLOCK, 16'(BLK_DIAG));
    send(OP_SET_ADDR, 16'd100);
    send(OP_BLOCK_WRITE, 16'd40);
    for (int i = 0; i < 40; i++) begin
      wdat[i] = (i == 0) ? 16'hFFFF : 16'($urandom);  // 0xFFFF: never a formatter count here
      send(OP_NOP, wdat[i]);
    end
    m_bwrite++;
    send(OP_SET_ADDR, 16'd100);
    got.delete(); l = lasts;
    send(OP_BLOCK_READ, 16'd40);
    wait (lasts == l + 1); #1;
    m_bread++;
    bad = 0;
    for (int i = 0; i < 40; i++) if (got.size() != 40 || got[i] != wdat[i]) bad++;
    check(bad == 0, "diagnostic memory block write / block read");
    send(OP_OLD_BLOCK_READ, 16'd8);
    fc_read(BLK_CSR, CSR_STATUS, d);
    check(d[3], "old fixed-length block read rejected");
    if (d[3]) m_illegal++;
    fc_write(BLK_CSR, CSR_CTRL, 16'h0003);   // clear flags
    // --- one event, read out at once
    repeat (LEN + 10) @(posedge clk); #1;
    trigger(lastw);
    repeat (50) @(posedge clk); #1;
    readout(lastw, NDUM, 1, "single event");
    // the readout moved the block address: address 100 now reads the DAQ block,
    // not the diagnostic word 0xFFFF written there
    send(OP_SET_ADDR, 16'd100);
    got.delete(); l = lasts;
    send(OP_READ, 0);
    wait (lasts == l + 1); #1;
    check(got[0] != 16'hFFFF, "readout leaves block address at the DAQ block");
    // --- fill all buffers, overflow, drain in order with queued ReadEvents
    repeat (LEN + 10) @(posedge clk); #1;
    for (int e = 0; e < NB; e++) begin
      trigger(lastw); lw.push_back(lastw);
      repeat (LEN + 7 * e) @(posedge clk); #1;
    end
    check(full, "full after four L1As");
    if (full) m_full++;
    trigger(lastw);
    fc_read(BLK_CSR, CSR_STATUS, d);
    check(d[1] && d[0] && d[7:5] == 3'd4, $sformatf("status full+overflow %b", d));
    if (d[1]) m_overflow++;
    fc_read(BLK_CSR, CSR_L1A_CNT, d);
    check(d == 16'd5, $sformatf("accepted L1A count %0d", d));
    fc_write(BLK_CSR, CSR_CTRL, 16'h0003);
    // two ReadEvents back to back, external commands offered meanwhile
    got.delete(); l = lasts;
    read_event = 1; @(posedge clk); #1; read_event = 0;
    @(posedge clk); #1;
    read_event = 1; @(posedge clk); #1; read_event = 0;
    fc_valid = 1; fc_cmd = '{op: OP_NOP, operand: 16'd0};
    wait (lasts == l + 2); #1;
    fc_valid = 0;
    m_queued++;
    bad = 0;
    for (int e = 0; e < 2; e++)
      for (int k = 0; k < LEN; k++)
        if (got.size() != 2 * (LEN + NDUM) || got[e * (LEN + NDUM) + k] != 16'(lw[e] - LEN + 1 + k)) bad++;
    check(bad == 0, $sformatf("two queued events in trigger order, %0d words wrong", bad));
    m_readout += 2;
    readout(lw[2], NDUM, 1, "third event");
    // --- L1A right after release from full: stale with 16 dummy words
    trigger(lastw); trigger(lastw); trigger(lastw);
    check(full, "full again");
    readout(lw[3], NDUM, 1, "fourth event");
    trigger(lastw);
    fc_read(BLK_CSR, CSR_STATUS, d);
    check(d[2], "stale flag after L1A right behind a release");
    if (d[2]) m_stale++;
    fc_write(BLK_CSR, CSR_CTRL, 16'h0003);
    // --- dummy words long enough to refill: no stale
    fc_write(BLK_CSR, CSR_DUMMY, 16'(LEN + 8));
    readout(0, LEN + 8, 0, "event with long dummy guard");
    trigger(lastw);
    fc_read(BLK_CSR, CSR_STATUS, d);
    check(!d[2], "no stale when dummy words cover the refill");
    if (!d[2]) m_clean_after_guard++;
    // drain: three old events (stale data allowed), then the clean one
    for (int e = 0; e < 3; e++) readout(0, LEN + 8, 0, "drain");
    readout(lastw, LEN + 8, 1, "clean event after guard");
    check(!full && !busy, "idle after drain");
    // --- refill behind the readout (CSR0 bit 2), 16 dummy words again
    fc_write(BLK_CSR, CSR_DUMMY, 16'(NDUM));
    fc_write(BLK_CSR, CSR_CTRL, 16'h0005);
    fc_write(BLK_CSR, CSR_CTRL, 16'h0007);   // clear flags, keep the mode
    repeat (LEN + 10) @(posedge clk); #1;
    lw.delete();
    for (int e = 0; e < NB; e++) begin
      trigger(lastw); lw.push_back(lastw);
      repeat (20) @(posedge clk); #1;
    end
    check(full, "full before refill-behind-readout case");
    // start the readout when the writer is LEN-12 words past the window
    while (((n - 1 - lw[0]) % LEN) != LEN - 12) begin
      @(posedge clk); #1;
    end
    readout(lw[0], NDUM, 1, "event read while refilled behind the pointer");
    trigger(lastw);
    fc_read(BLK_CSR, CSR_STATUS, d);
    check(!d[2], "no stale with refill behind the readout and 16 dummy words");
    if (!d[2]) m_follow++;
    for (int e = 1; e < NB; e++) readout(lw[e], NDUM, 1, "drain after refill case");
    readout(lastw, NDUM, 1, "event frozen right after the release");
    check(!full && !busy, "idle at end");
    // mechanisms
    check(m_bwrite > 0, "block write happened");
    check(m_bread > 0, "block read happened");
    check(m_illegal > 0, "illegal command happened");
    check(m_readout >= 13, $sformatf("readouts %0d", m_readout));
    check(m_full > 0, "full happened");
    check(m_overflow > 0, "overflow happened");
    check(m_stale > 0, "stale happened");
    check(m_dummy > 0, "dummy words happened");
    check(m_queued > 0, "queued ReadEvent happened");
    check(m_holdoff > 0, "external command hold-off happened");
    check(m_clean_after_guard > 0, "guard by dummy words happened");
    check(m_follow > 0, "refill behind the readout happened");
    $display("mechanisms: bwrite=%0d bread=%0d illegal=%0d readout=%0d full=%0d overflow=%0d stale=%0d dummy=%0d queued=%0d holdoff=%0d guard=%0d follow=%0d",
             m_bwrite, m_bread, m_illegal, m_readout, m_full, m_overflow, m_stale, m_dummy,
             m_queued, m_holdoff, m_clean_after_guard, m_follow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
