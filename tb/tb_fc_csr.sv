// tb_fc_csr: self-checking test of the CSR file.
//
// Writes and reads every register over the request bus and checks: the
// 3-bit board ID in CSR1 stays at its parameter value while the run-mode
// bits above it are writable; CSR3/CSR4 mirror the current block and memory
// address inputs; the event length is clamped; the status word gathers the
// status inputs; the illegal-command flag is sticky until cleared through
// CSR0; the L1A counter counts; read data arrives one cycle after the read.
module tb_fc_csr;
  import fc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_req_t mreq;
  logic [DATA_W-1:0] rdata;
  logic [BLK_W-1:0] cur_blk; logic [ADDR_W-1:0] cur_addr;
  logic full, ovf, stale, illegal, re_lost, l1a_acc;
  logic [2:0] fcnt;
  logic en, clr, fol; logic [4:0] run; logic [15:0] elen, dum;

  fc_csr #(.BOARD_ID(3'd6), .MAX_EVT_LEN(512), .EVT_LEN_RST(292), .DUMMY_RST(16)) dut (
    .clk, .rst_n, .mem_i(mreq), .rdata_o(rdata), .cur_blk_i(cur_blk), .cur_addr_i(cur_addr),
    .daq_full_i(full), .daq_overflow_i(ovf), .daq_stale_i(stale), .illegal_cmd_i(illegal),
    .re_lost_i(re_lost), .frozen_cnt_i(fcnt), .l1a_accepted_i(l1a_acc), .daq_enable_o(en), .follow_o(fol),
    .clear_err_o(clr), .run_ctrl_o(run), .evt_len_o(elen), .dummy_words_o(dum));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [BLK_W-1:0] blk, input int a, input logic [15:0] d);
    mreq <= '{req: 1'b1, we: 1'b1, blk: blk, addr: ADDR_W'(a), wdata: d};
    @(posedge clk); #1;
    mreq <= '0;
  endtask

  task automatic rd(input logic [BLK_W-1:0] blk, input int a, output logic [15:0] d);
    mreq <= '{req: 1'b1, we: 1'b0, blk: blk, addr: ADDR_W'(a), wdata: '0};
    @(posedge clk); #1;
    mreq <= '0;
    d = rdata;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] d;
  initial begin
    mreq = '0; cur_blk = 4'd2; cur_addr = 16'h0004;
    {full, ovf, stale, illegal, re_lost, l1a_acc} = '0; fcnt = 3'd0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(en && elen == 16'd292 && dum == 16'd16, "reset values");
    rd(BLK_CSR, CSR_ID_RUN, d);
    check(d[2:0] == 3'd6 && d[7:3] == 5'd0, $sformatf("CSR1 after reset %h", d));
    wr(BLK_CSR, CSR_ID_RUN, 16'hFFFF);
    rd(BLK_CSR, CSR_ID_RUN, d);
    check(d == 16'h00FE, $sformatf("CSR1 id read only, run bits writable %h", d));
    check(run == 5'h1F, "run-mode output");
    wr(BLK_DIAG, CSR_ID_RUN, 16'h0000);  // other block: ignored
    check(run == 5'h1F, "other block not decoded");
    cur_blk = 4'd9; cur_addr = 16'hBEEF;
    rd(BLK_CSR, CSR_CUR_BLK, d);
    check(d == 16'd9, "CSR3 current block");
    rd(BLK_CSR, CSR_CUR_ADR, d);
    check(d == 16'hBEEF, "CSR4 current address");
    wr(BLK_CSR, CSR_CUR_ADR, 16'h1234);
    rd(BLK_CSR, CSR_CUR_ADR, d);
    check(d == 16'hBEEF, "CSR4 read only");
    wr(BLK_CSR, CSR_EVT_LEN, 16'd100);
    rd(BLK_CSR, CSR_EVT_LEN, d);
    check(d == 16'd100 && elen == 16'd100, "event length write");
    wr(BLK_CSR, CSR_EVT_LEN, 16'd9999);
    check(elen == 16'd512, "event length clamped high");
    wr(BLK_CSR, CSR_EVT_LEN, 16'd0);
    check(elen == 16'd1, "event length clamped low");
    wr(BLK_CSR, CSR_DUMMY, 16'd5);
    rd(BLK_CSR, CSR_DUMMY, d);
    check(d == 16'd5 && dum == 16'd5, "dummy count");
    // status
    full = 1; ovf = 0; stale = 1; re_lost = 1; fcnt = 3'd4;
    illegal = 1; @(posedge clk); #1; illegal = 0;
    rd(BLK_CSR, CSR_STATUS, d);
    check(d == 16'b100_1_1_1_0_1, $sformatf("status word %b", d));
    wr(BLK_CSR, CSR_CTRL, 16'h0003);   // keep enabled, clear errors
    check(clr == 1'b1, "clear pulse");
    @(posedge clk); #1;
    check(clr == 1'b0, "clear pulse one cycle");
    rd(BLK_CSR, CSR_STATUS, d);
    check(d[3] == 1'b0, "illegal flag cleared");
    wr(BLK_CSR, CSR_CTRL, 16'h0005);
    check(en && fol, "refill-behind-readout enable");
    rd(BLK_CSR, CSR_CTRL, d);
    check(d == 16'h0005, "CSR0 readback with refill enable");
    wr(BLK_CSR, CSR_CTRL, 16'h0000);
    check(!en && !fol, "DAQ disable");
    rd(BLK_CSR, CSR_CTRL, d);
    check(d == 16'h0000, "CSR0 readback");
    for (int i = 0; i < 7; i++) begin
      l1a_acc = 1; @(posedge clk); #1; l1a_acc = 0; @(posedge clk); #1;
    end
    rd(BLK_CSR, CSR_L1A_CNT, d);
    check(d == 16'd7, $sformatf("L1A count %0d", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
