// fc_csr: control and status registers of the FC interface, block BLK_CSR.
//
// CSR1 carries the 3-bit board ID in its low bits (read only, set by the
// BOARD_ID parameter) next to five writable run-mode control bits: the board
// ID field was widened to three bits by taking one of the run-mode spare
// bits. CSR3 and CSR4 read back the FC core's current block and memory
// address; since the DAQ readout runs through the ordinary FC read commands,
// they show where the last readout left the address, not what a user last
// set. CSR0 enables DAQ writing and the refill of the buffer under readout
// behind its read pointer. CSR5/CSR6 hold the DAQ event length and the number of dummy words
// appended to each event, CSR2 the DAQ and command status, CSR7 a count of
// accepted L1As. The register numbering, CSR0/2/5/6/7 and all reset values
// are this design's own.
//
// Interface: mem_i is the FC core's request bus; a request with
// blk == BLK_CSR writes or reads the register addr[2:0]. Read data is
// registered and valid the cycle after the request. Writes to read-only
// registers are ignored; an event length is clamped to 1..MAX_EVT_LEN.
module fc_csr
  import fc_pkg::*;
#(
  parameter logic [2:0]  BOARD_ID    = 3'd5,
  parameter int unsigned MAX_EVT_LEN = 1024,
  parameter int unsigned EVT_LEN_RST = 292,
  parameter int unsigned DUMMY_RST   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mem_req_t          mem_i,
  output logic [DATA_W-1:0] rdata_o,
  // status inputs
  input  logic [BLK_W-1:0]  cur_blk_i,
  input  logic [ADDR_W-1:0] cur_addr_i,
  input  logic              daq_full_i,
  input  logic              daq_overflow_i,
  input  logic              daq_stale_i,
  input  logic              illegal_cmd_i,
  input  logic              re_lost_i,
  input  logic [2:0]        frozen_cnt_i,
  input  logic              l1a_accepted_i,
  // controls
  output logic              daq_enable_o,
  output logic              follow_o,
  output logic              clear_err_o,
  output logic [4:0]        run_ctrl_o,
  output logic [15:0]       evt_len_o,
  output logic [15:0]       dummy_words_o
);

  logic        hit;
  logic [2:0]  idx;
  logic        illegal_q;
  logic [15:0] l1a_cnt_q;
  logic [DATA_W-1:0] rd_d;

  assign hit = mem_i.req && (mem_i.blk == BLK_CSR);
  assign idx = mem_i.addr[2:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      daq_enable_o  <= 1'b1;
      follow_o      <= 1'b0;
      clear_err_o   <= 1'b0;
      run_ctrl_o    <= '0;
      evt_len_o     <= 16'(EVT_LEN_RST);
      dummy_words_o <= 16'(DUMMY_RST);
      illegal_q     <= 1'b0;
      l1a_cnt_q     <= '0;
    end else begin
      clear_err_o <= 1'b0;
      if (hit && mem_i.we) begin
        case (idx)
          3'(CSR_CTRL): begin
            daq_enable_o <= mem_i.wdata[0];
            clear_err_o  <= mem_i.wdata[1];
            follow_o     <= mem_i.wdata[2];
          end
          3'(CSR_ID_RUN): run_ctrl_o <= mem_i.wdata[7:3];
          3'(CSR_EVT_LEN): begin
            if (mem_i.wdata == '0)                         evt_len_o <= 16'd1;
            else if (32'(mem_i.wdata) > MAX_EVT_LEN)       evt_len_o <= 16'(MAX_EVT_LEN);
            else                                           evt_len_o <= mem_i.wdata;
          end
          3'(CSR_DUMMY): dummy_words_o <= mem_i.wdata;
          default: ;
        endcase
      end
      if (illegal_cmd_i)  illegal_q <= 1'b1;
      else if (clear_err_o) illegal_q <= 1'b0;
      if (l1a_accepted_i) l1a_cnt_q <= l1a_cnt_q + 1'b1;
    end
  end

  always_comb begin
    case (idx)
      3'(CSR_CTRL):    rd_d = DATA_W'({follow_o, 1'b0, daq_enable_o});
      3'(CSR_ID_RUN):  rd_d = DATA_W'({run_ctrl_o, BOARD_ID});
      3'(CSR_STATUS):  rd_d = DATA_W'({frozen_cnt_i, re_lost_i, illegal_q, daq_stale_i,
                                       daq_overflow_i, daq_full_i});
      3'(CSR_CUR_BLK): rd_d = DATA_W'(cur_blk_i);
      3'(CSR_CUR_ADR): rd_d = DATA_W'(cur_addr_i);
      3'(CSR_EVT_LEN): rd_d = evt_len_o;
      3'(CSR_DUMMY):   rd_d = dummy_words_o;
      3'(CSR_L1A_CNT): rd_d = l1a_cnt_q;
      default:         rd_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata_o <= '0;
    else if (hit && !mem_i.we) rdata_o <= rd_d;
  end

endmodule
