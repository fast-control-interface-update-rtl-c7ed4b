// diag_mem: diagnostic memory of the new boards, block BLK_DIAG.
//
// An ordinary single-port RAM that the FC commands can write and read, for
// board diagnostics. Only its existence comes from the FC update; its depth
// (DEPTH words of DATA_W bits) is this design's choice.
//
// Interface: mem_i is the FC core's request bus; requests with
// blk == BLK_DIAG access word addr modulo DEPTH. Read data is registered and
// valid the cycle after the request.
module diag_mem
  import fc_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic              clk,
  input  mem_req_t          mem_i,
  output logic [DATA_W-1:0] rdata_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DATA_W-1:0] ram [DEPTH];
  logic              hit;
  logic [AW-1:0]     a;

  assign hit = mem_i.req && (mem_i.blk == BLK_DIAG);
  assign a   = mem_i.addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (hit && mem_i.we) ram[a] <= mem_i.wdata;
    if (hit && !mem_i.we) rdata_o <= ram[a];
  end

endmodule
