// tb_fc_cmd_engine: self-checking test of the FC command engine.
//
// A behavioural 4096-word memory answers the engine's request bus with one
// cycle of read latency. The test sets block and address, writes single
// words and a variable-length block (0x13), reads them back singly and with
// a variable-length block read (0x12), and checks every returned word, the
// last flag, the address side effects, the rejection of 0x15/0x16 and an
// undefined opcode, and the block-read timing (first word two cycles after
// the command, then one word per cycle).
module tb_fc_cmd_engine;
  import fc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid; fc_cmd_t cmd; logic cmd_ready;
  mem_req_t mreq; logic [DATA_W-1:0] rdata;
  logic rsp_valid, rsp_last, idle, illegal;
  logic [DATA_W-1:0] rsp_data;
  logic [BLK_W-1:0] cur_blk; logic [ADDR_W-1:0] cur_addr;

  fc_cmd_engine dut (
    .clk, .rst_n, .cmd_valid_i(cmd_valid), .cmd_i(cmd), .cmd_ready_o(cmd_ready),
    .mem_o(mreq), .mem_rdata_i(rdata), .rsp_valid_o(rsp_valid), .rsp_data_o(rsp_data),
    .rsp_last_o(rsp_last), .cur_blk_o(cur_blk), .cur_addr_o(cur_addr), .idle_o(idle),
    .illegal_o(illegal));

  // memory model, indexed by {blk[1:0], addr[9:0]}
  logic [DATA_W-1:0] mem [4096];
  always_ff @(posedge clk) begin
    if (mreq.req && mreq.we) mem[{mreq.blk[1:0], mreq.addr[9:0]}] <= mreq.wdata;
    if (mreq.req && !mreq.we) rdata <= mem[{mreq.blk[1:0], mreq.addr[9:0]}];
  end

  int checks = 0, failures = 0;
  int illegal_seen = 0;
  int cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (illegal) illegal_seen <= illegal_seen + 1;
  end

  // response capture
  logic [DATA_W-1:0] got [$];
  int last_cnt = 0;
  int first_cyc = -1;
  always_ff @(posedge clk) if (rsp_valid) begin
    got.push_back(rsp_data);
    if (first_cyc < 0) first_cyc <= cyc;
    if (rsp_last) last_cnt <= last_cnt + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] op, input logic [15:0] opnd);
    cmd_valid <= 1; cmd <= '{op: op, operand: opnd};
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_valid <= 0;
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int acc_cyc;
  logic [DATA_W-1:0] ref_w [64];

  initial begin
    cmd_valid = 0; cmd = '0;
    for (int i = 0; i < 4096; i++) mem[i] = 16'hFFFF;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // single writes to block 1 at 0x20
    send(OP_SET_BLOCK, 16'd1);
    send(OP_SET_ADDR, 16'h0020);
    send(OP_WRITE, 16'hA001);
    send(OP_WRITE, 16'hA002);
    check(cur_blk == 4'd1 && cur_addr == 16'h0022, "address after two writes");
    // variable-length block write of 37 words to block 2 at 0x100
    send(OP_SET_BLOCK, 16'd2);
    send(OP_SET_ADDR, 16'h0100);
    send(OP_BLOCK_WRITE, 16'd37);
    for (int i = 0; i < 37; i++) begin
      ref_w[i] = 16'($urandom);
      send(OP_NOP, ref_w[i]);   // operand is the data word, opcode ignored
    end
    @(posedge clk);
    check(idle, "idle after block write");
    check(cur_addr == 16'h0100 + 37, "address after block write");
    check(mem[{2'd2, 10'h100}] == ref_w[0] && mem[{2'd2, 10'h100 + 10'd36}] == ref_w[36],
          "block write landed");
    // single reads back
    got.delete();
    send(OP_SET_BLOCK, 16'd1);
    send(OP_SET_ADDR, 16'h0020);
    send(OP_READ, 0);
    send(OP_READ, 0);
    repeat (3) @(posedge clk);
    check(got.size() == 2, "two single-read replies");
    if (got.size() == 2) begin
      check(got[0] == 16'hA001, "single read 0");
      check(got[1] == 16'hA002, "single read 1");
    end
    check(last_cnt == 2, "each single read is last");
    // variable-length block read of 37 words
    got.delete();
    first_cyc = -1;
    send(OP_SET_BLOCK, 16'd2);
    send(OP_SET_ADDR, 16'h0100);
    cmd_valid <= 1; cmd <= '{op: OP_BLOCK_READ, operand: 16'd37};
    @(posedge clk);
    acc_cyc = cyc;
    cmd_valid <= 0;
    repeat (45) @(posedge clk);
    check(got.size() == 37, $sformatf("block read count %0d", got.size()));
    for (int i = 0; i < 37 && i < got.size(); i++)
      check(got[i] == ref_w[i], $sformatf("block read word %0d", i));
    check(first_cyc - acc_cyc == 2, $sformatf("block read latency %0d", first_cyc - acc_cyc));
    check(last_cnt == 3, "block read has one last flag");
    check(cur_addr == 16'h0100 + 37, "address advanced by block read");
    // rejected opcodes
    send(OP_OLD_BLOCK_READ, 16'd8);
    send(OP_OLD_BLOCK_WRITE, 16'd8);
    send(8'h7E, 16'd0);
    @(posedge clk);
    check(illegal_seen == 3, $sformatf("illegal opcodes flagged %0d", illegal_seen));
    check(idle && cmd_ready, "old block commands leave engine idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
