// daq_buffer_mem: storage of the DAQ buffers.
//
// NUM_BUF banks of 2**BUF_AW words, each a RAM of its own. The write port writes one word at the
// same offset into every bank selected by wr_mask (the formatted data goes
// into all buffers that are not frozen). The read port is an ordinary
// memory read, registered, one cycle of latency: the readout fetches its
// event like any other memory, so the buffers need no logic of their own
// for DAQ transfers. Bank count follows the document; sizes and the port
// arrangement are this design's.
module daq_buffer_mem
  import fc_pkg::*;
#(
  parameter int unsigned NUM_BUF = 4,
  parameter int unsigned BUF_AW  = 10,
  localparam int unsigned BW     = $clog2(NUM_BUF)
) (
  input  logic                 clk,
  input  logic [NUM_BUF-1:0]   wr_mask_i,
  input  logic [BUF_AW-1:0]    wr_ptr_i,
  input  logic [DATA_W-1:0]    wr_data_i,
  input  logic                 rd_en_i,
  input  logic [BW+BUF_AW-1:0] rd_addr_i,
  output logic [DATA_W-1:0]    rd_data_o
);

  logic [DATA_W-1:0] bank_q [NUM_BUF];
  logic [BW-1:0]     rb_q;

  for (genvar b = 0; b < NUM_BUF; b++) begin : g_bank
    logic [DATA_W-1:0] ram [2**BUF_AW];
    always_ff @(posedge clk) begin
      if (wr_mask_i[b]) ram[wr_ptr_i] <= wr_data_i;
      if (rd_en_i && rd_addr_i[BW+BUF_AW-1:BUF_AW] == BW'(b))
        bank_q[b] <= ram[rd_addr_i[BUF_AW-1:0]];
    end
  end

  always_ff @(posedge clk)
    if (rd_en_i) rb_q <= rd_addr_i[BW+BUF_AW-1:BUF_AW];

  assign rd_data_o = bank_q[rb_q];

endmodule
