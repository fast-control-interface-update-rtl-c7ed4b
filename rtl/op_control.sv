// op_control: DAQ readout sequencer ("OP-control") of the new boards.
//
// On a ReadEvent the readout starts at once, with no hold-off. The
// sequencer takes the FC core's command port away from the external FC
// stream and feeds it the ordinary commands of a block read: set block
// address to the DAQ block, set memory address to offset 0 of the oldest
// frozen buffer, block read (0x12) of evt_len words. The buffer is thus
// pulled like any memory. When the last event word has come back the
// buffer is freed (free_o) so that it starts refilling with current data;
// then dum_words dummy words are sent after the event, which hold off the
// next trigger at the readout side while the freed buffer refills. dl_last_o
// marks the final word sent (the last dummy word, or the last event word
// when dum_words is 0).
//
// ReadEvents are counted, so one that arrives during a readout is served
// afterwards. A ReadEvent with no frozen buffer is dropped and sets the
// sticky re_lost_o flag.
//
// Outside a readout the FC core's responses (replies to external reads) are
// passed to the DAQ link unchanged, and external commands pass to the core.
// A readout starts only between external commands (core idle), and takes
// priority over an external command offered in the same cycle.
//
// Timing: ReadEvent in cycle 0, sequence starts at the edge ending cycle 1,
// three command cycles, first event word on the link in cycle 6; then one
// word per cycle. The command-port takeover, the counting of ReadEvents and
// the dummy-word value are this design's choices.
module op_control
  import fc_pkg::*;
#(
  parameter int unsigned NUM_BUF = 4,
  parameter int unsigned BUF_AW  = 10,
  localparam int unsigned BW     = $clog2(NUM_BUF)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              read_event_i,
  input  logic              clear_err_i,
  input  logic [15:0]       evt_len_i,
  input  logic [15:0]       dum_words_i,
  // DAQ buffer state
  input  logic              head_valid_i,
  input  logic [BW-1:0]     head_buf_i,
  output logic              free_o,
  // external FC command stream
  input  logic              ext_valid_i,
  input  fc_cmd_t           ext_cmd_i,
  output logic              ext_ready_o,
  // FC core command port
  output logic              eng_valid_o,
  output fc_cmd_t           eng_cmd_o,
  input  logic              eng_ready_i,
  input  logic              eng_idle_i,
  // FC core responses
  input  logic              rsp_valid_i,
  input  logic [DATA_W-1:0] rsp_data_i,
  input  logic              rsp_last_i,
  // DAQ link
  output logic              dl_valid_o,
  output logic [DATA_W-1:0] dl_data_o,
  output logic              dl_last_o,
  output logic              busy_o,
  output logic              re_lost_o
);

  typedef enum logic [2:0] {S_IDLE, S_BLK, S_ADR, S_RD, S_DATA, S_DUMMY} state_e;

  state_e      state_q;
  logic [7:0]  pend_q;
  logic [15:0] dcnt_q;
  logic [15:0] len_q, dum_q;
  logic [BW-1:0] buf_q;
  logic        start;

  assign start = (state_q == S_IDLE) && (pend_q != '0) && head_valid_i && eng_idle_i;

  always_comb begin
    eng_valid_o = 1'b0;
    eng_cmd_o   = '{op: OP_NOP, operand: '0};
    ext_ready_o = 1'b0;
    unique case (state_q)
      S_IDLE: begin
        eng_valid_o = ext_valid_i && !start;
        eng_cmd_o   = ext_cmd_i;
        ext_ready_o = eng_ready_i && !start;
      end
      S_BLK: begin
        eng_valid_o = 1'b1;
        eng_cmd_o   = '{op: OP_SET_BLOCK, operand: OPND_W'(BLK_DAQ)};
      end
      S_ADR: begin
        eng_valid_o = 1'b1;
        eng_cmd_o   = '{op: OP_SET_ADDR, operand: OPND_W'({buf_q, BUF_AW'(0)})};
      end
      S_RD: begin
        eng_valid_o = 1'b1;
        eng_cmd_o   = '{op: OP_BLOCK_READ, operand: len_q};
      end
      default: ;
    endcase
  end

  // DAQ link output
  always_comb begin
    dl_valid_o = rsp_valid_i;
    dl_data_o  = rsp_data_i;
    dl_last_o  = rsp_last_i;
    if (state_q == S_DATA)
      dl_last_o = rsp_last_i && (dum_q == '0);
    else if (state_q == S_DUMMY) begin
      dl_valid_o = 1'b1;
      dl_data_o  = DUMMY_WORD;
      dl_last_o  = (dcnt_q == 16'd1);
    end
  end

  assign free_o = (state_q == S_DATA) && rsp_valid_i && rsp_last_i;
  assign busy_o = (state_q != S_IDLE);

  logic re_drop;
  assign re_drop = (state_q == S_IDLE) && (pend_q != '0) && !head_valid_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      pend_q    <= '0;
      dcnt_q    <= '0;
      len_q     <= '0;
      dum_q     <= '0;
      buf_q     <= '0;
      re_lost_o <= 1'b0;
    end else begin
      pend_q <= pend_q + 8'(read_event_i && pend_q != '1) - 8'(start || re_drop);
      if (re_drop) re_lost_o <= 1'b1;
      else if (clear_err_i) re_lost_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_BLK;
          buf_q   <= head_buf_i;
          len_q   <= evt_len_i;
          dum_q   <= dum_words_i;
        end
        S_BLK: if (eng_ready_i) state_q <= S_ADR;
        S_ADR: if (eng_ready_i) state_q <= S_RD;
        S_RD:  if (eng_ready_i) state_q <= S_DATA;
        S_DATA: if (rsp_valid_i && rsp_last_i) begin
          dcnt_q  <= dum_q;
          state_q <= (dum_q == '0) ? S_IDLE : S_DUMMY;
        end
        S_DUMMY: begin
          dcnt_q <= dcnt_q - 1'b1;
          if (dcnt_q == 16'd1) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Dummy words never collide with a core response.
  a_no_rsp_in_dummy: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_DUMMY) |-> !rsp_valid_i);

endmodule
