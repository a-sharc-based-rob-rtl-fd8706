// ctrl_regs: SHARC-programmable control, status and interrupt registers.
//
// The SHARC writes the configuration used by the datapath: enable, ROL XOFF,
// interrupt enable, the Begin- and End-Of-Fragment patterns and masks and
// four 8-bit word counts that select the words copied into the summary.
// Writing CTRL with bit 4 set produces a one-cycle clr pulse that restarts
// the write pointer, the summary builder and the paged FIFO.
// STATUS (read) bits: [0] S-link FIFO overflow, [1] paged FIFO overflow,
// [2] fragment closed without EOF, [3] word seen outside a fragment (these
// four are sticky, write 1 clears), [4] S-link FIFO full, [5] paged FIFO
// full, [6] inside a fragment,
// [15:8] stored pages, [31:16] buffer roll-overs. WPTR reads the write
// address and FRAGS the number of summaries built since clear.
// irq is high while irq_en is set and a page is waiting or an error is
// pending. Writes take effect at the clock edge; reads are combinational.
//
// From the document: software-set BOF word and word counts, "control,
// status, interrupts" and XOFF on the ROL. The register map, bit positions,
// reset values and interrupt condition are this design's choices.
module ctrl_regs
  import crush_pkg::*;
#(
  parameter int unsigned AW = 18,
  parameter int unsigned PAGE_CNT_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // register port
  input  logic              wr_en,
  input  logic [REG_AW-1:0] addr,
  input  word_t             wdata,
  output word_t             rdata,
  // to the datapath
  output cfg_t              cfg,
  output logic              clr,
  output logic              irq,
  output logic              rol_xoff,
  // status from the datapath
  input  logic              fifo_full,
  input  logic              fifo_ovf,
  input  logic              pf_full,
  input  logic              pf_ovf,
  input  logic [PAGE_CNT_W-1:0] pf_pages,
  input  logic              frag_err,
  input  logic              stray,
  input  logic              page_done,
  input  logic              in_frag,
  input  logic [AW-1:0]     waddr,
  input  logic [15:0]       wraps
);
  logic [3:0] sticky;
  word_t      frags;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg      <= '{enable: 1'b0, xoff: 1'b0, irq_en: 1'b0, match_ctrl: 1'b0,
                    bof_pat: '0, bof_mask: '1, eof_pat: '0, eof_mask: '1, copy_ofs: '0};
      clr      <= 1'b0;
      sticky   <= '0;
      frags    <= '0;
    end else begin
      clr <= 1'b0;
      if (clr) frags <= '0;
      else if (page_done) frags <= frags + 1'b1;
      sticky <= sticky | {stray, frag_err, pf_ovf, fifo_ovf};
      if (wr_en) begin
        case (reg_addr_e'(addr))
          REG_CTRL: begin
            cfg.enable     <= wdata[0];
            cfg.xoff       <= wdata[1];
            cfg.irq_en     <= wdata[2];
            cfg.match_ctrl <= wdata[3];
            clr            <= wdata[4];
          end
          REG_BOF_PAT:  cfg.bof_pat  <= wdata;
          REG_BOF_MASK: cfg.bof_mask <= wdata;
          REG_EOF_PAT:  cfg.eof_pat  <= wdata;
          REG_EOF_MASK: cfg.eof_mask <= wdata;
          REG_COPY_OFS: cfg.copy_ofs <= wdata;
          REG_STATUS:   sticky <= (sticky & ~wdata[3:0]) | {stray, frag_err, pf_ovf, fifo_ovf};
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rdata = '0;
    case (reg_addr_e'(addr))
      REG_CTRL:     rdata = {27'd0, 1'b0, cfg.match_ctrl, cfg.irq_en, cfg.xoff, cfg.enable};
      REG_BOF_PAT:  rdata = cfg.bof_pat;
      REG_BOF_MASK: rdata = cfg.bof_mask;
      REG_EOF_PAT:  rdata = cfg.eof_pat;
      REG_EOF_MASK: rdata = cfg.eof_mask;
      REG_COPY_OFS: rdata = cfg.copy_ofs;
      REG_STATUS:   rdata = {wraps, 8'(pf_pages), 1'b0, in_frag, pf_full, fifo_full, sticky};
      REG_WPTR:     rdata = WORD_W'(waddr);
      REG_FRAGS:    rdata = frags;
      default:      rdata = '0;
    endcase
  end

  assign irq      = cfg.irq_en && ((pf_pages != '0) || (sticky != '0));
  assign rol_xoff = cfg.xoff;
endmodule
