// tb_op_control: self-checking test of the OP-control readout sequencer.
//
// The sequencer drives a real FC command engine, whose requests a memory
// model answers with known contents (word = {bank, offset}). The testbench
// plays the DAQ buffer manager: it offers a head buffer and pops it when
// free_o pulses. Checked: the commands the sequencer issues, every event
// word and dummy word on the DAQ link, the last flag, a single free pulse at
// the last event word, the ReadEvent-to-first-word latency (6 cycles, no
// hold-off), a second ReadEvent queued during a readout, external commands
// held off during a readout and passed through otherwise, and the lost-
// ReadEvent flag when no buffer is frozen.
module tb_op_control;
  import fc_pkg::*;

  localparam int NB = 4, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic re, clr, hv, free, ext_v, ext_r, eng_v, eng_r, eng_idle, illegal;
  logic [15:0] elen, dum;
  logic [1:0] hb;
  fc_cmd_t ext_c, eng_c;
  logic rsp_v, rsp_l, dl_v, dl_l, busy, lost;
  logic [15:0] rsp_d, dl_d, rdata;
  mem_req_t mreq;
  logic [BLK_W-1:0] cblk; logic [ADDR_W-1:0] caddr;

  op_control #(.NUM_BUF(NB), .BUF_AW(AW)) dut (
    .clk, .rst_n, .read_event_i(re), .clear_err_i(clr), .evt_len_i(elen), .dum_words_i(dum),
    .head_valid_i(hv), .head_buf_i(hb), .free_o(free),
    .ext_valid_i(ext_v), .ext_cmd_i(ext_c), .ext_ready_o(ext_r),
    .eng_valid_o(eng_v), .eng_cmd_o(eng_c), .eng_ready_i(eng_r), .eng_idle_i(eng_idle),
    .rsp_valid_i(rsp_v), .rsp_data_i(rsp_d), .rsp_last_i(rsp_l),
    .dl_valid_o(dl_v), .dl_data_o(dl_d), .dl_last_o(dl_l), .busy_o(busy), .re_lost_o(lost));

  fc_cmd_engine u_eng (
    .clk, .rst_n, .cmd_valid_i(eng_v), .cmd_i(eng_c), .cmd_ready_o(eng_r), .mem_o(mreq),
    .mem_rdata_i(rdata), .rsp_valid_o(rsp_v), .rsp_data_o(rsp_d), .rsp_last_o(rsp_l),
    .cur_blk_o(cblk), .cur_addr_o(caddr), .idle_o(eng_idle), .illegal_o(illegal));

  // memory: block 0 word = {4'hE, bank, offset}; other blocks: 16'h5A00 | addr[7:0]
  always_ff @(posedge clk)
    if (mreq.req && !mreq.we)
      rdata <= (mreq.blk == BLK_DAQ) ? {4'hE, 4'(mreq.addr[AW+1:AW]), 8'(mreq.addr[AW-1:0])}
                                     : (16'h5A00 | 16'(mreq.addr[7:0]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DAQ-manager model: queue of frozen buffers
  int q [$];
  assign hv = (q.size() != 0);
  assign hb = (q.size() != 0) ? 2'(q[0]) : 2'd0;
  int frees = 0;
  always @(posedge clk) if (free) begin
    frees++;
    if (q.size() != 0) void'(q.pop_front());
  end

  // link capture
  logic [15:0] got [$];
  int lasts = 0, cyc = 0, first_cyc = -1;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dl_v) begin
      got.push_back(dl_d);
      if (first_cyc < 0) first_cyc = cyc;
      if (dl_l) lasts++;
    end
  end

  // commands seen by the engine
  fc_cmd_t seen [$];
  always @(posedge clk) if (eng_v && eng_r) seen.push_back(eng_c);

  // external command accepted while the sequencer is busy: a protocol error
  int ext_in_busy = 0;
  always @(posedge clk) if (ext_v && ext_r && busy) ext_in_busy++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_event(input int b, input int len, input int nd, input string tag);
    int bad = 0;
    check(got.size() == len + nd, $sformatf("%s: %0d words, want %0d", tag, got.size(), len + nd));
    for (int k = 0; k < len && k < got.size(); k++)
      if (got[k] != {4'hE, 4'(b), 8'(k)}) bad++;
    for (int k = len; k < len + nd && k < got.size(); k++)
      if (got[k] != DUMMY_WORD) bad++;
    check(bad == 0, $sformatf("%s: %0d words wrong", tag, bad));
  endtask

  int t0;
  initial begin
    re = 0; clr = 0; ext_v = 0; ext_c = '0; elen = 16'd20; dum = 16'd5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // external read passes through when idle
    ext_v = 1; ext_c = '{op: OP_SET_BLOCK, operand: 16'(BLK_CSR)};
    @(posedge clk); #1;
    ext_c = '{op: OP_SET_ADDR, operand: 16'h0033};
    @(posedge clk); #1;
    ext_c = '{op: OP_READ, operand: 16'h0};
    @(posedge clk); #1;
    ext_v = 0;
    repeat (2) @(posedge clk); #1;
    check(got.size() == 1 && got[0] == 16'h5A33 && lasts == 1,
          $sformatf("external read passed to link (%0d words, %h, %0d last)", got.size(), got.size() ? got[0] : 0, lasts));
    got.delete(); lasts = 0; seen.delete();
    // event in buffer 2, dummy words 5
    q.push_back(2); q.push_back(1);
    re = 1; t0 = cyc + 1; first_cyc = -1;
    @(posedge clk); #1;
    re = 0;
    // second ReadEvent during the readout, and an external command offered
    repeat (3) @(posedge clk); #1;
    re = 1; @(posedge clk); #1; re = 0;
    ext_v = 1; ext_c = '{op: OP_SET_ADDR, operand: 16'h0011};
    wait (lasts == 1); #1;
    check(first_cyc - t0 == 6, $sformatf("ReadEvent to first word %0d cycles", first_cyc - t0));
    expect_event(2, 20, 5, "event 1");
    check(seen.size() >= 3 && seen[0] == '{op: OP_SET_BLOCK, operand: 16'(BLK_DAQ)}
          && seen[1] == '{op: OP_SET_ADDR, operand: 16'(2 << AW)}
          && seen[2] == '{op: OP_BLOCK_READ, operand: 16'd20}, "readout command sequence");
    check(frees == 1, "one free per event");
    got.delete();
    // queued ReadEvent: buffer 1, no dummy words this time
    dum = 16'd0;
    wait (lasts == 2); #1;
    expect_event(1, 20, 0, "event 2 (queued ReadEvent)");
    check(frees == 2, "second free");
    check(ext_in_busy == 0, "external commands held off during readout");
    @(posedge clk); #1;
    ext_v = 0;
    check(caddr == 16'h0011, "held external command executed afterwards");
    // ReadEvent with nothing frozen
    re = 1; @(posedge clk); #1; re = 0;
    repeat (3) @(posedge clk); #1;
    check(lost && !busy, "ReadEvent with no event sets lost flag");
    clr = 1; @(posedge clk); #1; clr = 0;
    check(!lost, "lost flag cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
