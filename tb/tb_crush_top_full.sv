// tb_crush_top_full: end-to-end run of crush_top with every parameter at its
// default (256 k word buffer, 1k x 36 S-link FIFO, 32-page paged FIFO).
// 700 fragments cycling through the sizes 256, 512, 768, 1024, 1280, 1536,
// 2048, 3072 and 4096 bytes (the fragment sizes of the measurements), about
// 283 k words in total, so the ring buffer rolls over once. 10 % of the
// events are read back (RoI request fraction of 10 %). The test body is in
// crush_e2e_body.svh; here the mechanism counts are reported, not required.
module tb_crush_top_full;
  import crush_pkg::*;
  localparam int BUF_WORDS = 262144, FIFO_DEPTH = 1024, PF_PAGES = 32;
  localparam int N_FRAGS = 700, REQ_PCT = 10;
  localparam longint XOFF_HI = longint'(BUF_WORDS) / 2, XOFF_LO = longint'(BUF_WORDS) / 4;
  localparam bit CHECK_MECH = 1'b0;
  localparam int SIZES_BYTES [9] = '{256, 512, 768, 1024, 1280, 1536, 2048, 3072, 4096};
  function automatic int frag_len(input int f);
    return SIZES_BYTES[f % 9] / 4;
  endfunction
`define FPGA dut.u_fpga

  logic clk = 1'b0, rst_n = 1'b0;
  logic slink_wen, slink_lff, rol_xoff, s_req, s_we, s_ack, dma_req, dma_ack, irq;
  slink_word_t slink_data;
  logic [$clog2(BUF_WORDS)+1:0] s_addr;
  word_t s_wdata, s_rdata, dma_data;

  crush_top dut (.*);

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "crush_e2e_body.svh"
endmodule
