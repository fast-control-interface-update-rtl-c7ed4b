// fc_pkg: types and constants shared by the fast-control (FC) core, the CSR
// file, the DAQ buffers and the OP-control readout sequencer.
//
// The FC command set is modelled as a stream of already-deframed commands,
// each an 8-bit opcode plus a 16-bit operand. The variable-length block read
// (0x12) and block write (0x13) opcodes and the retired fixed-length block
// read/write opcodes (0x15, 0x16) are the ones the FC update defines; every
// other opcode value, the operand width and the block numbering are choices
// of this design.
package fc_pkg;

  localparam int unsigned DATA_W = 16;  // data word on the FC bus and on the DAQ link
  localparam int unsigned OPND_W = 16;  // command operand
  localparam int unsigned BLK_W  = 4;   // block-address register
  localparam int unsigned ADDR_W = 16;  // memory-address register

  typedef enum logic [7:0] {
    OP_NOP             = 8'h00,
    OP_SET_BLOCK       = 8'h01,  // operand: block address
    OP_SET_ADDR        = 8'h02,  // operand: memory address
    OP_WRITE           = 8'h03,  // operand: data, written at the memory address, address+1
    OP_READ            = 8'h04,  // one word read at the memory address, address+1
    OP_BLOCK_READ      = 8'h12,  // operand: word count N, N words read from the address on
    OP_BLOCK_WRITE     = 8'h13,  // operand: word count N, the next N transfers carry data
    OP_OLD_BLOCK_READ  = 8'h15,  // fixed-length block read of the old boards: rejected
    OP_OLD_BLOCK_WRITE = 8'h16   // fixed-length block write of the old boards: rejected
  } fc_op_e;

  // One FC command as delivered by the link deframer. The opcode is kept as
  // raw bits so that undefined codes can be seen and rejected.
  typedef struct packed {
    logic [7:0]        op;
    logic [OPND_W-1:0] operand;
  } fc_cmd_t;

  // Request from the FC core to the memory blocks. A read returns its word on
  // the cycle after the request.
  typedef struct packed {
    logic              req;
    logic              we;
    logic [BLK_W-1:0]  blk;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  // Block-address map
  localparam logic [BLK_W-1:0] BLK_DAQ  = 4'd0;  // DAQ buffers (read only)
  localparam logic [BLK_W-1:0] BLK_DIAG = 4'd1;  // diagnostic memory
  localparam logic [BLK_W-1:0] BLK_CSR  = 4'd2;  // control and status registers

  // CSR numbers within BLK_CSR
  localparam int unsigned CSR_CTRL    = 0;  // [0] DAQ enable, [1] clear error flags (self-clearing), [2] refill behind readout
  localparam int unsigned CSR_ID_RUN  = 1;  // [2:0] board ID (read only), [7:3] run-mode control
  localparam int unsigned CSR_STATUS  = 2;  // DAQ and command status (read only)
  localparam int unsigned CSR_CUR_BLK = 3;  // current block address (read only)
  localparam int unsigned CSR_CUR_ADR = 4;  // current memory address (read only)
  localparam int unsigned CSR_EVT_LEN = 5;  // DAQ event length in words
  localparam int unsigned CSR_DUMMY   = 6;  // dummy words appended after each event
  localparam int unsigned CSR_L1A_CNT = 7;  // accepted L1A count (read only)

  localparam logic [DATA_W-1:0] DUMMY_WORD = 16'hD0D0;

endpackage
