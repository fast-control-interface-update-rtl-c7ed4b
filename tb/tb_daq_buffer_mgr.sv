// tb_daq_buffer_mgr: self-checking test of the DAQ buffer bookkeeping.
//
// Formatted words are a running count, one per cycle, so the window an L1A
// must freeze is known: the evt_len words up to and including the L1A cycle.
// A memory model in the testbench takes the manager's write port. The test
// freezes all four buffers (checking each window through the read-address
// translation), checks the full state and that a fifth L1A overflows,
// checks that buffers are released in trigger order, provokes an L1A right
// after a release from the full state (stale flag) and checks that an L1A
// after evt_len more words is clean again. With the refill behind the
// readout enabled, it reads the oldest buffer while words arrive, checks
// the read window is intact, and that an L1A 6 words after the release is
// then clean and holds the current window.
module tb_daq_buffer_mgr;
  import fc_pkg::*;

  localparam int NB = 4, AW = 4, LEN = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, clr, fol, rdq, fv, l1a, free, l1a_acc, hv, full, ovf, stale;
  logic [15:0] elen, fd;
  logic [NB-1:0] mask; logic [AW-1:0] wptr; logic [15:0] wdata;
  logic [1:0] hb; logic [2:0] fcnt;
  logic [1+AW:0] raddr, rphys;

  daq_buffer_mgr #(.NUM_BUF(NB), .BUF_AW(AW)) dut (
    .clk, .rst_n, .enable_i(en), .evt_len_i(elen), .clear_err_i(clr), .follow_i(fol),
    .fmt_valid_i(fv), .fmt_data_i(fd), .wr_mask_o(mask), .wr_ptr_o(wptr), .wr_data_o(wdata),
    .l1a_i(l1a), .free_i(free), .l1a_accepted_o(l1a_acc), .head_valid_o(hv),
    .head_buf_o(hb), .full_o(full), .frozen_cnt_o(fcnt), .overflow_o(ovf), .stale_o(stale),
    .rd_req_i(rdq), .rd_addr_i(raddr), .rd_phys_o(rphys));

  logic [15:0] mem [NB][2**AW];
  always_ff @(posedge clk)
    for (int b = 0; b < NB; b++) if (mask[b]) mem[b][wptr] <= wdata;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n = 0;            // words written so far
  int acc = 0;
  // one clock cycle with a word written, l1a/free as given
  task automatic step(input bit t, input bit f);
    fv = 1; fd = 16'(n); l1a = t; free = f;
    @(posedge clk);
    if (l1a_acc) acc++;
    #1;
    n++;
    l1a = 0; free = 0;
  endtask

  // read the frozen window of buffer b and compare with words last-LEN+1..last
  task automatic check_window(input int b, input int last, input string tag);
    int bad = 0;
    for (int k = 0; k < LEN; k++) begin
      raddr = {2'(b), AW'(k)}; #0;
      #1;
      if (mem[rphys[1+AW:AW]][rphys[AW-1:0]] != 16'(last - LEN + 1 + k)) bad++;
    end
    check(bad == 0, $sformatf("%s: window of buffer %0d, %0d words wrong", tag, b, bad));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int f_last;
  // L1A; the first one of a group records its window end in f_last
  task automatic trigger_at(input bit rec);
    if (rec) f_last = n;
    step(1, 0);
  endtask

  int last_of [NB];
  initial begin
    en = 1; clr = 0; fol = 0; rdq = 0; fv = 0; fd = 0; l1a = 0; free = 0; elen = 16'(LEN); raddr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!hv && !full && fcnt == 0, "empty after reset");
    // fill the windows, then four L1As some words apart
    repeat (LEN + 3) step(0, 0);
    for (int e = 0; e < NB; e++) begin
      int lastw;
      lastw = n;
      step(1, 0);
      check(fcnt == 3'(e + 1), $sformatf("frozen count %0d", e + 1));
      repeat (3 + e) step(0, 0);
      last_of[e] = lastw;
    end
    check(full, "full after four L1As");
    check(mask == '0, "no writes while full");
    check(!stale && !ovf, "no stale/overflow yet");
    // fifth L1A overflows
    step(1, 0);
    check(ovf, "overflow on fifth L1A");
    check(acc == NB, $sformatf("accepted L1As %0d", acc));
    // release in trigger order; the window of each head buffer is checked first
    begin
      int seen [NB];
      for (int e = 0; e < NB; e++) seen[e] = 0;
      for (int e = 0; e < NB; e++) begin
        check_window(hb, last_of[e], $sformatf("event %0d", e));
        seen[hb]++;
        if (e < NB - 1) begin
          step(0, 1);
          repeat (LEN + 2) step(0, 0);  // refill time for the released buffer
        end
      end
      check(seen[0] == 1 && seen[1] == 1 && seen[2] == 1 && seen[3] == 1, "four distinct buffers");
    end
    check(fcnt == 1, "one frozen left");
    check(!stale, "no stale with refill time");
    // fill up again to full
    for (int e = 0; e < NB - 1; e++) step(1, 0);
    check(full, "full again");
    // release from full and trigger right away: stale
    step(0, 1);
    step(0, 0);
    step(1, 0);
    check(stale, "stale flag when L1A follows release closely");
    check(full, "full after stale event");
    clr = 1; @(posedge clk); #1; clr = 0;
    check(!stale && !ovf, "flags cleared");
    // release, give evt_len words, trigger: clean
    step(0, 1);
    repeat (LEN) step(0, 0);
    step(1, 0);
    check(!stale, "no stale after a full refill");
    check(full, "full again after clean event");
    // drain
    for (int e = 0; e < NB; e++) step(0, 1);
    check(!hv && fcnt == 0, "all released");
    // refill behind the readout: freeze, then read the head buffer one
    // word per cycle while words keep arriving; the readout must see the
    // frozen window intact, and after the release the buffer is current
    // again sooner than evt_len new words
    fol = 1;
    repeat (LEN) step(0, 0);
    for (int e = 0; e < NB; e++) begin
      trigger_at(e == 0);
    end
    check(full, "full before follow test");
    // wait so that the writer is LEN-3 words past the head's window start
    while (((n - 1 - f_last) % LEN) != LEN - 4) step(0, 0);
    begin
      int bad = 0;
      for (int k = 0; k < LEN; k++) begin
        raddr = {2'(hb), AW'(k)}; rdq = 1; #0; #1;
        if (mem[rphys[1+AW:AW]][rphys[AW-1:0]] != 16'(f_last - LEN + 1 + k)) bad++;
        step(0, 0);
      end
      rdq = 0;
      check(bad == 0, $sformatf("window intact while refilled behind the readout, %0d wrong", bad));
    end
    step(0, 1);      // release
    repeat (5) step(0, 0);
    f_last = n;
    step(1, 0);
    check(!stale, "no stale: the buffer refilled behind the readout");
    // the new event is the current window
    begin
      // it is the last one queued; release the three in front of it
      for (int e = 0; e < NB - 1; e++) step(0, 1);
      check_window(hb, f_last, "event refilled behind the readout");
    end
    step(0, 1);
    check(!hv, "all released after follow test");
    fol = 0;
    // same case without the refill: stale
    repeat (LEN) step(0, 0);
    for (int e = 0; e < NB; e++) step(1, 0);
    repeat (3) step(0, 0);
    step(0, 1);
    repeat (5) step(0, 0);
    step(1, 0);
    check(stale, "stale without the refill behind the readout");
    // disabled DAQ writes nothing
    en = 0;
    step(0, 0);
    check(mask == '0, "no writes when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
