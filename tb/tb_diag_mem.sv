// tb_diag_mem: self-checking test of the diagnostic memory.
//
// Fills every word with a random pattern over the request bus, interleaving
// requests for another block that must be ignored, then reads all words
// back and compares with a copy kept in the testbench; read data is checked
// one cycle after each request.
module tb_diag_mem;
  import fc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  mem_req_t mreq;
  logic [DATA_W-1:0] rdata;

  diag_mem #(.DEPTH(64)) dut (.clk, .mem_i(mreq), .rdata_o(rdata));

  int checks = 0, failures = 0;
  logic [15:0] model [64];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mreq = '0;
    @(posedge clk); #1;
    for (int i = 0; i < 64; i++) begin
      model[i] = 16'($urandom);
      mreq = '{req: 1'b1, we: 1'b1, blk: BLK_DIAG, addr: ADDR_W'(i), wdata: model[i]};
      @(posedge clk); #1;
      mreq = '{req: 1'b1, we: 1'b1, blk: BLK_CSR, addr: ADDR_W'(i), wdata: 16'hDEAD};
      @(posedge clk); #1;
    end
    for (int i = 63; i >= 0; i--) begin
      mreq = '{req: 1'b1, we: 1'b0, blk: BLK_DIAG, addr: ADDR_W'(i), wdata: '0};
      @(posedge clk); #1;
      mreq = '0;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL: word %0d got %h want %h", i, rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
