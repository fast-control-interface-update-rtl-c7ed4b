// fc_daq_top: fast-control interface and DAQ readout of a new trigger board.
//
// The FC command stream (already deframed into opcode/operand commands)
// goes through the OP-control sequencer to the FC command engine, which
// reads and writes three memory blocks: the DAQ buffers (block 0, read only
// from FC), a diagnostic memory (block 1) and the CSRs (block 2). Formatted
// DAQ words stream in continuously and fill the unfrozen DAQ buffers; an
// L1A freezes one; a ReadEvent makes OP-control read the oldest frozen
// buffer through the ordinary block-read command, free it, and append dummy
// words. Everything the FC core reads back, event data or replies to
// external reads, leaves on the DAQ link port dl_*.
//
// Parameters: NUM_BUF DAQ buffers (4, as on the boards) of 2**BUF_AW words;
// the event length and dummy-word count are CSRs with reset values
// EVT_LEN_RST (292 16-bit words, the 583-byte fixed GLT event rounded up)
// and DUMMY_RST. The FC link deframer and the board-specific DAQ formatter
// are outside this module.
module fc_daq_top
  import fc_pkg::*;
#(
  parameter int unsigned NUM_BUF     = 4,
  parameter int unsigned BUF_AW      = 10,
  parameter int unsigned DIAG_DEPTH  = 256,
  parameter logic [2:0]  BOARD_ID    = 3'd5,
  parameter int unsigned EVT_LEN_RST = 292,
  parameter int unsigned DUMMY_RST   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // FC command stream
  input  logic              fc_valid,
  input  fc_cmd_t           fc_cmd,
  output logic              fc_ready,
  input  logic              l1a,
  input  logic              read_event,
  // formatted DAQ data
  input  logic              fmt_valid,
  input  logic [DATA_W-1:0] fmt_data,
  // DAQ link
  output logic              dl_valid,
  output logic [DATA_W-1:0] dl_data,
  output logic              dl_last,
  // status
  output logic              daq_full,
  output logic              daq_busy,
  output logic [4:0]        run_ctrl
);

  localparam int unsigned BW = $clog2(NUM_BUF);
  localparam int unsigned CW = $clog2(NUM_BUF + 1);

  logic              eng_valid, eng_ready, eng_idle, illegal;
  fc_cmd_t           eng_cmd;
  mem_req_t          mreq;
  logic [DATA_W-1:0] mrdata, csr_rdata, diag_rdata, daq_rdata;
  logic              rsp_valid, rsp_last;
  logic [DATA_W-1:0] rsp_data;
  logic [BLK_W-1:0]  cur_blk;
  logic [ADDR_W-1:0] cur_addr;

  logic              daq_enable, clear_err, follow, daq_rd;
  logic [15:0]       evt_len, dummy_words;
  logic              overflow, stale, re_lost, l1a_acc;
  logic              head_valid, free;
  logic [BW-1:0]     head_buf;
  logic [CW-1:0]     frozen_cnt;
  logic [NUM_BUF-1:0] wr_mask;
  logic [BUF_AW-1:0] wr_ptr;
  logic [DATA_W-1:0] wr_data;
  logic [BW+BUF_AW-1:0] daq_phys;
  logic [BLK_W-1:0]  rblk_q;

  op_control #(.NUM_BUF(NUM_BUF), .BUF_AW(BUF_AW)) u_opc (
    .clk, .rst_n,
    .read_event_i (read_event),
    .clear_err_i  (clear_err),
    .evt_len_i    (evt_len),
    .dum_words_i  (dummy_words),
    .head_valid_i (head_valid),
    .head_buf_i   (head_buf),
    .free_o       (free),
    .ext_valid_i  (fc_valid),
    .ext_cmd_i    (fc_cmd),
    .ext_ready_o  (fc_ready),
    .eng_valid_o  (eng_valid),
    .eng_cmd_o    (eng_cmd),
    .eng_ready_i  (eng_ready),
    .eng_idle_i   (eng_idle),
    .rsp_valid_i  (rsp_valid),
    .rsp_data_i   (rsp_data),
    .rsp_last_i   (rsp_last),
    .dl_valid_o   (dl_valid),
    .dl_data_o    (dl_data),
    .dl_last_o    (dl_last),
    .busy_o       (daq_busy),
    .re_lost_o    (re_lost)
  );

  fc_cmd_engine u_eng (
    .clk, .rst_n,
    .cmd_valid_i (eng_valid),
    .cmd_i       (eng_cmd),
    .cmd_ready_o (eng_ready),
    .mem_o       (mreq),
    .mem_rdata_i (mrdata),
    .rsp_valid_o (rsp_valid),
    .rsp_data_o  (rsp_data),
    .rsp_last_o  (rsp_last),
    .cur_blk_o   (cur_blk),
    .cur_addr_o  (cur_addr),
    .idle_o      (eng_idle),
    .illegal_o   (illegal)
  );

  fc_csr #(
    .BOARD_ID(BOARD_ID), .MAX_EVT_LEN(2**BUF_AW),
    .EVT_LEN_RST(EVT_LEN_RST), .DUMMY_RST(DUMMY_RST)
  ) u_csr (
    .clk, .rst_n,
    .mem_i          (mreq),
    .rdata_o        (csr_rdata),
    .cur_blk_i      (cur_blk),
    .cur_addr_i     (cur_addr),
    .daq_full_i     (daq_full),
    .daq_overflow_i (overflow),
    .daq_stale_i    (stale),
    .illegal_cmd_i  (illegal),
    .re_lost_i      (re_lost),
    .frozen_cnt_i   (3'(frozen_cnt)),
    .l1a_accepted_i (l1a_acc),
    .daq_enable_o   (daq_enable),
    .follow_o       (follow),
    .clear_err_o    (clear_err),
    .run_ctrl_o     (run_ctrl),
    .evt_len_o      (evt_len),
    .dummy_words_o  (dummy_words)
  );

  diag_mem #(.DEPTH(DIAG_DEPTH)) u_diag (
    .clk,
    .mem_i   (mreq),
    .rdata_o (diag_rdata)
  );

  daq_buffer_mgr #(.NUM_BUF(NUM_BUF), .BUF_AW(BUF_AW)) u_mgr (
    .clk, .rst_n,
    .enable_i       (daq_enable),
    .evt_len_i      (evt_len),
    .clear_err_i    (clear_err),
    .follow_i       (follow),
    .fmt_valid_i    (fmt_valid),
    .fmt_data_i     (fmt_data),
    .wr_mask_o      (wr_mask),
    .wr_ptr_o       (wr_ptr),
    .wr_data_o      (wr_data),
    .l1a_i          (l1a),
    .free_i         (free),
    .l1a_accepted_o (l1a_acc),
    .head_valid_o   (head_valid),
    .head_buf_o     (head_buf),
    .full_o         (daq_full),
    .frozen_cnt_o   (frozen_cnt),
    .overflow_o     (overflow),
    .stale_o        (stale),
    .rd_req_i       (daq_rd),
    .rd_addr_i      (mreq.addr[BW+BUF_AW-1:0]),
    .rd_phys_o      (daq_phys)
  );

  daq_buffer_mem #(.NUM_BUF(NUM_BUF), .BUF_AW(BUF_AW)) u_mem (
    .clk,
    .wr_mask_i (wr_mask),
    .wr_ptr_i  (wr_ptr),
    .wr_data_i (wr_data),
    .rd_en_i   (daq_rd),
    .rd_addr_i (daq_phys),
    .rd_data_o (daq_rdata)
  );

  assign daq_rd = mreq.req && !mreq.we && (mreq.blk == BLK_DAQ);

  // read-data return: select by the block of the previous cycle's request
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rblk_q <= '0;
    else if (mreq.req) rblk_q <= mreq.blk;
  end

  always_comb begin
    unique case (rblk_q)
      BLK_DAQ:  mrdata = daq_rdata;
      BLK_DIAG: mrdata = diag_rdata;
      BLK_CSR:  mrdata = csr_rdata;
      default:  mrdata = '0;
    endcase
  end

endmodule
