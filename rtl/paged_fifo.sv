// paged_fifo: FIFO of event summaries ("pages") read by the SHARC by DMA.
//
// summary_extract writes a complete 8-word page in one cycle (wr_en, wr_page).
// The SHARC reads word by word using its DMA handshake: dma_req is high while
// at least one complete page is stored; every cycle with dma_ack high takes
// the word shown on dma_data (word 0 of the oldest page first). After the
// eighth word the page is freed. full means no free page is left; the
// datapath then stops taking S-link words so that no summary is lost.
// A write while full is dropped and pulses overflow. clr empties the FIFO.
//
// The name, the page-wise content and the DMA request/grant handshake are
// the document's. The depth (32 pages) and the one-word-per-ack handshake
// are this design's choices.
module paged_fifo
  import crush_pkg::*;
#(
  parameter int unsigned PAGES = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  wr_en,
  input  page_t wr_page,
  output logic  full,
  output logic  overflow,
  output logic  dma_req,
  input  logic  dma_ack,
  output word_t dma_data,
  output logic [$clog2(PAGES):0] pages
);
  localparam int unsigned PW = $clog2(PAGES);
  localparam int unsigned WW = $clog2(SUM_WORDS);

  page_t         mem [PAGES];
  logic [PW-1:0] wptr, rptr;
  logic [WW-1:0] widx;
  logic [PW:0]   cnt;

  logic do_wr, do_rd, last_word;
  assign full      = (cnt == (PW+1)'(PAGES));
  assign dma_req   = (cnt != '0);
  assign do_wr     = wr_en && !full;
  assign last_word = (widx == WW'(SUM_WORDS - 1));
  assign do_rd     = dma_ack && dma_req && last_word;  // page freed
  assign dma_data  = mem[rptr][widx];
  assign pages     = cnt;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(PAGES - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_page;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      widx     <= '0;
      cnt      <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      wptr     <= '0;
      rptr     <= '0;
      widx     <= '0;
      cnt      <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wptr <= incr(wptr);
      if (dma_ack && dma_req) widx <= last_word ? '0 : widx + 1'b1;
      if (do_rd) rptr <= incr(rptr);
      case ({do_wr, do_rd})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: ;
      endcase
    end
  end

  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n) dma_ack |-> dma_req)
    else $error("paged_fifo: DMA grant without request");
endmodule
