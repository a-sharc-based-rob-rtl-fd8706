// crush_top: the CRUSH ROBIn hardware around its SHARC DSP.
//
// Event fragments arrive over the S-link (Read-Out Link) into the 1k x 36
// input FIFO, whose full flag is the S-link back-pressure (slink_lff). The
// FPGA (crush_fpga) moves them into the 1 MByte ZBT ring buffer (zbt_ram)
// while it builds an 8-word summary per fragment for the SHARC. The SHARC
// itself, its six links and the clock source are outside this module: the
// SHARC external bus (s_*), the DMA handshake of the paged FIFO (dma_*) and
// the interrupt are ports. All logic runs on the 80 MHz memory clock.
//
// Sizes are the document's: 1k x 36 FIFO, 256 k x 32 buffer, four 40 MHz
// SHARC cycles per buffer access. Connecting everything in one clock domain
// is this design's choice.
module crush_top
  import crush_pkg::*;
#(
  parameter int unsigned BUF_WORDS   = 262144,
  parameter int unsigned FIFO_DEPTH  = 1024,
  parameter int unsigned PF_PAGES    = 32,
  parameter int unsigned ACC_CYCLES  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // S-link (ROL) input
  input  logic        slink_wen,
  input  slink_word_t slink_data,
  output logic        slink_lff,
  output logic        rol_xoff,
  // SHARC external bus
  input  logic        s_req,
  input  logic        s_we,
  input  logic [$clog2(BUF_WORDS)+1:0] s_addr,
  input  word_t       s_wdata,
  output logic        s_ack,
  output word_t       s_rdata,
  // SHARC DMA handshake and interrupt
  output logic        dma_req,
  input  logic        dma_ack,
  output word_t       dma_data,
  output logic        irq
);
  localparam int unsigned AW = $clog2(BUF_WORDS);

  logic        fifo_empty, fifo_rd, fifo_full, fifo_ovf;
  slink_word_t fifo_dout;
  logic          z_en, z_we;
  logic [AW-1:0] z_addr;
  word_t         z_wdata, z_rdata;

  slink_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH($bits(slink_word_t))) u_fifo (
    .clk, .rst_n,
    .wr_en(slink_wen), .wr_data(slink_data), .full(fifo_full), .overflow(fifo_ovf),
    .rd_en(fifo_rd), .rd_data(fifo_dout), .empty(fifo_empty)
  );
  assign slink_lff = fifo_full;

  crush_fpga #(.BUF_WORDS(BUF_WORDS), .PF_PAGES(PF_PAGES), .ACC_CYCLES(ACC_CYCLES)) u_fpga (
    .clk, .rst_n,
    .fifo_empty, .fifo_dout, .fifo_rd, .fifo_full, .fifo_ovf, .rol_xoff,
    .s_req, .s_we, .s_addr, .s_wdata, .s_ack, .s_rdata,
    .dma_req, .dma_ack, .dma_data, .irq,
    .z_en, .z_we, .z_addr, .z_wdata, .z_rdata
  );

  zbt_ram #(.WORDS(BUF_WORDS), .WIDTH(32)) u_buf (
    .clk, .en(z_en), .we(z_we), .addr(z_addr), .wdata(z_wdata), .rdata(z_rdata)
  );
endmodule
