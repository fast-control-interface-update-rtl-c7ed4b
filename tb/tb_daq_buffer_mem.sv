// tb_daq_buffer_mem: self-checking test of the DAQ buffer storage.
//
// Writes random words through the masked write port (one to four banks per
// write), keeps a model of every bank, then reads every word of every bank
// and checks it one cycle after the read.
module tb_daq_buffer_mem;
  import fc_pkg::*;

  localparam int NB = 4, AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [NB-1:0] mask; logic [AW-1:0] wptr; logic [15:0] wdata;
  logic ren; logic [1+AW:0] raddr; logic [15:0] rdata;

  daq_buffer_mem #(.NUM_BUF(NB), .BUF_AW(AW)) dut (
    .clk, .wr_mask_i(mask), .wr_ptr_i(wptr), .wr_data_i(wdata),
    .rd_en_i(ren), .rd_addr_i(raddr), .rd_data_o(rdata));

  int checks = 0, failures = 0;
  logic [15:0] model [NB][2**AW];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mask = '0; ren = 0; raddr = '0; wptr = '0; wdata = '0;
    // every bank written everywhere first
    for (int i = 0; i < 2**AW; i++) begin
      mask = '1; wptr = AW'(i); wdata = 16'(i);
      for (int b = 0; b < NB; b++) model[b][i] = 16'(i);
      @(posedge clk); #1;
    end
    for (int n = 0; n < 400; n++) begin
      logic [NB-1:0] m; logic [AW-1:0] p; logic [15:0] d;
      m = NB'($urandom); p = AW'($urandom); d = 16'($urandom);
      mask = m; wptr = p; wdata = d;
      for (int b = 0; b < NB; b++) if (m[b]) model[b][p] = d;
      @(posedge clk); #1;
    end
    mask = '0;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 2**AW; i++) begin
        ren = 1; raddr = {2'(b), AW'(i)};
        @(posedge clk); #1;
        ren = 0;
        checks++;
        if (rdata !== model[b][i]) begin
          failures++;
          $display("FAIL: bank %0d word %0d got %h want %h", b, i, rdata, model[b][i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
