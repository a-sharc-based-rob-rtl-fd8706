// crush_fpga: the logic of the CRUSH ROBIn FPGA.
//
// In the S-link slot of the memory clock (every second 80 MHz cycle, i.e.
// up to 160 MByte/s) one word is taken from the S-link input FIFO, written
// to the ring buffer at the address from addr_gen and shown to
// summary_extract together with that address. Completed summaries go into
// the paged FIFO, which the SHARC empties by DMA. Taking words stops while
// the datapath is disabled, being cleared, or while the paged FIFO has no
// free page (so no summary is lost; the S-link FIFO and then the S-link
// back-pressure absorb the stall). In the other slot the SHARC reads or
// writes the buffer memory through sharc_bus_if; registers in ctrl_regs set
// the fragment patterns and copied words and report status and interrupts.
//
// Ports: the FIFO read side (first-word-fall-through), the SHARC bus
// (s_*), the paged-FIFO DMA handshake (dma_*), the interrupt, the ROL XOFF
// and the ZBT memory pins (z_*). Everything runs on the 80 MHz clock.
// The block structure and data flow follow the document's block scheme;
// the sub-block details are described in each sub-module.
module crush_fpga
  import crush_pkg::*;
#(
  parameter int unsigned BUF_WORDS  = 262144,
  parameter int unsigned PF_PAGES   = 32,
  parameter int unsigned ACC_CYCLES = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // S-link input FIFO
  input  logic          fifo_empty,
  input  slink_word_t   fifo_dout,
  output logic          fifo_rd,
  input  logic          fifo_full,
  input  logic          fifo_ovf,
  output logic          rol_xoff,
  // SHARC external bus
  input  logic          s_req,
  input  logic          s_we,
  input  logic [$clog2(BUF_WORDS)+1:0] s_addr,
  input  word_t         s_wdata,
  output logic          s_ack,
  output word_t         s_rdata,
  // SHARC DMA handshake for the paged FIFO
  output logic          dma_req,
  input  logic          dma_ack,
  output word_t         dma_data,
  output logic          irq,
  // ZBT buffer memory
  output logic          z_en,
  output logic          z_we,
  output logic [$clog2(BUF_WORDS)-1:0] z_addr,
  output word_t         z_wdata,
  input  word_t         z_rdata
);
  localparam int unsigned AW = $clog2(BUF_WORDS);
  localparam int unsigned PCW = $clog2(PF_PAGES) + 1;

  cfg_t          cfg;
  logic          clr, slot, sl_pop;
  logic [AW-1:0] waddr;
  logic [15:0]   wraps;
  logic          page_valid, frag_err, stray, in_frag;
  page_t         page;
  logic          pf_full, pf_ovf;
  logic [PCW-1:0] pf_pages;

  logic              r_we;
  logic [REG_AW-1:0] r_addr;
  word_t             r_wdata, r_rdata;
  logic              m_req, m_we, m_gnt, m_rvalid;
  logic [AW-1:0]     m_addr;
  word_t             m_wdata, m_rdata;

  assign sl_pop  = (slot == 1'b0) && !fifo_empty && cfg.enable && !pf_full && !clr;
  assign fifo_rd = sl_pop;

  addr_gen #(.BUF_WORDS(BUF_WORDS)) u_addr_gen (
    .clk, .rst_n, .clr, .adv(sl_pop), .waddr, .wraps
  );

  summary_extract #(.AW(AW)) u_summary (
    .clk, .rst_n, .clr, .cfg,
    .in_valid(sl_pop), .in_word(fifo_dout), .in_addr(waddr),
    .page_valid, .page, .frag_err, .stray, .in_frag
  );

  paged_fifo #(.PAGES(PF_PAGES)) u_paged_fifo (
    .clk, .rst_n, .clr,
    .wr_en(page_valid), .wr_page(page), .full(pf_full), .overflow(pf_ovf),
    .dma_req, .dma_ack, .dma_data, .pages(pf_pages)
  );

  ctrl_regs #(.AW(AW), .PAGE_CNT_W(PCW)) u_regs (
    .clk, .rst_n,
    .wr_en(r_we), .addr(r_addr), .wdata(r_wdata), .rdata(r_rdata),
    .cfg, .clr, .irq, .rol_xoff,
    .fifo_full, .fifo_ovf, .pf_full, .pf_ovf, .pf_pages,
    .frag_err, .stray, .page_done(page_valid), .in_frag, .waddr, .wraps
  );

  sharc_bus_if #(.AW(AW), .ACC_CYCLES(ACC_CYCLES)) u_bus (
    .clk, .rst_n,
    .s_req, .s_we, .s_addr, .s_wdata, .s_ack, .s_rdata,
    .r_we, .r_addr, .r_wdata, .r_rdata,
    .m_req, .m_we, .m_addr, .m_wdata, .m_gnt, .m_rvalid, .m_rdata
  );

  buf_arbiter #(.AW(AW)) u_arb (
    .clk, .rst_n, .slot,
    .sl_req(sl_pop), .sl_addr(waddr), .sl_data(fifo_dout.data),
    .sh_req(m_req), .sh_we(m_we), .sh_addr(m_addr), .sh_wdata(m_wdata),
    .sh_gnt(m_gnt), .sh_rvalid(m_rvalid), .sh_rdata(m_rdata),
    .z_en, .z_we, .z_addr, .z_wdata, .z_rdata
  );
endmodule
