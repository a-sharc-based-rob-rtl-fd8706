// tb_crush_top: end-to-end test of the CRUSH board logic at reduced sizes
// (1 k word buffer, 64-word S-link FIFO, 4-page paged FIFO) so that buffer
// roll-over, paged-FIFO stalls, S-link back-pressure and XOFF all occur in a
// short run. 300 fragments of 3..40 words; every event is read back (100 %
// RoI request fraction). The test body is in crush_e2e_body.svh.
module tb_crush_top;
  import crush_pkg::*;
  localparam int BUF_WORDS = 1024, FIFO_DEPTH = 64, PF_PAGES = 4;
  localparam int N_FRAGS = 300, REQ_PCT = 100;
  localparam longint XOFF_HI = 100, XOFF_LO = 50;
  localparam bit CHECK_MECH = 1'b1;
  function automatic int frag_len(input int f);
    return 3 + (f * 13) % 38;
  endfunction
`define FPGA dut.u_fpga

  logic clk = 1'b0, rst_n = 1'b0;
  logic slink_wen, slink_lff, rol_xoff, s_req, s_we, s_ack, dma_req, dma_ack, irq;
  slink_word_t slink_data;
  logic [$clog2(BUF_WORDS)+1:0] s_addr;
  word_t s_wdata, s_rdata, dma_data;

  crush_top #(.BUF_WORDS(BUF_WORDS), .FIFO_DEPTH(FIFO_DEPTH), .PF_PAGES(PF_PAGES)) dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "crush_e2e_body.svh"
endmodule
