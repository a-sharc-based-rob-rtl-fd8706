// tb_crush_fpga: end-to-end test of the FPGA logic on its own, with the
// S-link FIFO and the ZBT memory attached around it as on the board
// (2 k word buffer, 128-word FIFO, 8-page paged FIFO, 50 % of the events
// read back). The test body is in crush_e2e_body.svh.
module tb_crush_fpga;
  import crush_pkg::*;
  localparam int BUF_WORDS = 2048, FIFO_DEPTH = 128, PF_PAGES = 8;
  localparam int N_FRAGS = 400, REQ_PCT = 50;
  localparam longint XOFF_HI = 200, XOFF_LO = 100;
  localparam bit CHECK_MECH = 1'b1;
  function automatic int frag_len(input int f);
    return 3 + (f * 29) % 61;
  endfunction
`define FPGA dut

  logic clk = 1'b0, rst_n = 1'b0;
  logic slink_wen, slink_lff, rol_xoff, s_req, s_we, s_ack, dma_req, dma_ack, irq;
  slink_word_t slink_data;
  logic [$clog2(BUF_WORDS)+1:0] s_addr;
  word_t s_wdata, s_rdata, dma_data;

  localparam int AWB = $clog2(BUF_WORDS);
  logic        fifo_empty, fifo_rd, fifo_full, fifo_ovf;
  slink_word_t fifo_dout;
  logic        z_en, z_we;
  logic [AWB-1:0] z_addr;
  word_t       z_wdata, z_rdata;

  slink_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(36)) u_fifo (
    .clk, .rst_n, .wr_en(slink_wen), .wr_data(slink_data), .full(fifo_full),
    .overflow(fifo_ovf), .rd_en(fifo_rd), .rd_data(fifo_dout), .empty(fifo_empty)
  );
  assign slink_lff = fifo_full;

  crush_fpga #(.BUF_WORDS(BUF_WORDS), .PF_PAGES(PF_PAGES)) dut (.*);

  zbt_ram #(.WORDS(BUF_WORDS), .WIDTH(32)) u_ram (
    .clk, .en(z_en), .we(z_we), .addr(z_addr), .wdata(z_wdata), .rdata(z_rdata)
  );

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "crush_e2e_body.svh"
endmodule
