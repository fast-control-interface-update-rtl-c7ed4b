// fc_cmd_engine: the command-execution part of the fast-control (FC) core.
//
// It holds the current block address and memory address and executes the
// FC read/write commands against them, on a simple request bus to the memory
// blocks (DAQ buffers, diagnostic memory, CSRs). The variable-length block
// read 0x12 and block write 0x13 take their word count from the operand; the
// fixed-length block commands 0x15 and 0x16 of the old boards are not
// supported and are rejected like any unknown opcode (illegal_o pulses).
// Every read and write advances the memory address by one, so any user of
// these commands, the OP-control readout included, leaves the address
// registers changed; they are visible on cur_blk_o / cur_addr_o for the
// current-address CSRs.
//
// Interface: cmd_* is a valid/ready command stream. mem_o is a request; a
// read's word arrives on mem_rdata_i one cycle later and leaves on rsp_*
// in that same cycle (rsp_last_o marks the last word of a READ or block
// read). idle_o is high when no block command is in progress.
// Timing: a block read of N words accepts its command, then issues one read
// per cycle for N cycles; the first word appears two cycles after the
// command is accepted. cmd_ready_o is low during a block read. During a
// block write cmd_ready_o stays high and each accepted transfer's operand
// is one data word. The opcode values other than 0x12/0x13/0x15/0x16, the
// handshake and these latencies are this design's choices.
module fc_cmd_engine
  import fc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid_i,
  input  fc_cmd_t              cmd_i,
  output logic                 cmd_ready_o,
  output mem_req_t             mem_o,
  input  logic [DATA_W-1:0]    mem_rdata_i,
  output logic                 rsp_valid_o,
  output logic [DATA_W-1:0]    rsp_data_o,
  output logic                 rsp_last_o,
  output logic [BLK_W-1:0]     cur_blk_o,
  output logic [ADDR_W-1:0]    cur_addr_o,
  output logic                 idle_o,
  output logic                 illegal_o
);

  typedef enum logic [1:0] {S_IDLE, S_BREAD, S_BWRITE} state_e;

  state_e             state_q, state_d;
  logic [BLK_W-1:0]   blk_q, blk_d;
  logic [ADDR_W-1:0]  addr_q, addr_d;
  logic [OPND_W-1:0]  cnt_q, cnt_d;
  logic               rd_pend_q, rd_pend_d;
  logic               rd_last_q, rd_last_d;
  logic               accept;

  assign cmd_ready_o = (state_q != S_BREAD);
  assign accept      = cmd_valid_i && cmd_ready_o;

  always_comb begin
    state_d   = state_q;
    blk_d     = blk_q;
    addr_d    = addr_q;
    cnt_d     = cnt_q;
    rd_pend_d = 1'b0;
    rd_last_d = 1'b0;
    illegal_o = 1'b0;
    mem_o     = '{req: 1'b0, we: 1'b0, blk: blk_q, addr: addr_q, wdata: cmd_i.operand};

    unique case (state_q)
      S_IDLE: begin
        if (accept) begin
          case (cmd_i.op)
            OP_NOP: ;
            OP_SET_BLOCK: blk_d  = cmd_i.operand[BLK_W-1:0];
            OP_SET_ADDR:  addr_d = cmd_i.operand;
            OP_WRITE: begin
              mem_o.req = 1'b1;
              mem_o.we  = 1'b1;
              addr_d    = addr_q + 1'b1;
            end
            OP_READ: begin
              mem_o.req = 1'b1;
              addr_d    = addr_q + 1'b1;
              rd_pend_d = 1'b1;
              rd_last_d = 1'b1;
            end
            OP_BLOCK_READ: begin
              cnt_d = cmd_i.operand;
              if (cmd_i.operand != '0) state_d = S_BREAD;
            end
            OP_BLOCK_WRITE: begin
              cnt_d = cmd_i.operand;
              if (cmd_i.operand != '0) state_d = S_BWRITE;
            end
            default: illegal_o = 1'b1;  // 0x15, 0x16 and undefined codes
          endcase
        end
      end
      S_BREAD: begin
        mem_o.req = 1'b1;
        addr_d    = addr_q + 1'b1;
        cnt_d     = cnt_q - 1'b1;
        rd_pend_d = 1'b1;
        rd_last_d = (cnt_q == OPND_W'(1));
        if (cnt_q == OPND_W'(1)) state_d = S_IDLE;
      end
      S_BWRITE: begin
        if (accept) begin
          mem_o.req = 1'b1;
          mem_o.we  = 1'b1;
          addr_d    = addr_q + 1'b1;
          cnt_d     = cnt_q - 1'b1;
          if (cnt_q == OPND_W'(1)) state_d = S_IDLE;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      blk_q     <= '0;
      addr_q    <= '0;
      cnt_q     <= '0;
      rd_pend_q <= 1'b0;
      rd_last_q <= 1'b0;
    end else begin
      state_q   <= state_d;
      blk_q     <= blk_d;
      addr_q    <= addr_d;
      cnt_q     <= cnt_d;
      rd_pend_q <= rd_pend_d;
      rd_last_q <= rd_last_d;
    end
  end

  assign rsp_valid_o = rd_pend_q;
  assign rsp_data_o  = mem_rdata_i;
  assign rsp_last_o  = rd_pend_q && rd_last_q;
  assign cur_blk_o   = blk_q;
  assign cur_addr_o  = addr_q;
  assign idle_o      = (state_q == S_IDLE);

  // A block read never overlaps a new command.
  a_no_cmd_in_bread: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_BREAD) |-> !accept);

endmodule
