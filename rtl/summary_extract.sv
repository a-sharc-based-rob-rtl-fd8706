// summary_extract: builds one event summary per event fragment from the
// S-link word stream.
//
// Each word written to the buffer memory is also shown to this block with
// its buffer address. A word matches Begin-Of-Fragment when
// (data & bof_mask) == (bof_pat & bof_mask), and, if cfg.match_ctrl is set,
// it is an S-link control word; End-Of-Fragment is matched the same way with
// the EOF pattern. On BOF the block records the word and its buffer address
// and starts counting words. The word whose count after BOF equals copy
// offset i (1 = first word after BOF, 0 = disabled) is stored as copied word
// i. On EOF the 8-word page (layout in crush_pkg) is presented on page with a
// one-cycle page_valid pulse, one clock after the EOF word. A BOF that
// arrives before the EOF closes the open fragment with the error bit set in
// the length word and starts a new one (frag_err pulses). Words outside a
// fragment are counted as stray and otherwise ignored.
//
// From the document: the programmable BOF word and word counts after BOF,
// the copy of the start position into the summary. Own choices: EOF
// matching, the page layout, the missing-EOF rule and stray-word handling.
module summary_extract
  import crush_pkg::*;
#(
  parameter int unsigned AW = 18
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  cfg_t        cfg,
  input  logic        in_valid,
  input  slink_word_t in_word,
  input  logic [AW-1:0] in_addr,
  output logic        page_valid,
  output page_t       page,
  output logic        frag_err,
  output logic        stray,
  output logic        in_frag
);
  logic is_bof, is_eof;
  assign is_bof = ((in_word.data & cfg.bof_mask) == (cfg.bof_pat & cfg.bof_mask))
                  && (!cfg.match_ctrl || in_word.ctrl);
  assign is_eof = ((in_word.data & cfg.eof_mask) == (cfg.eof_pat & cfg.eof_mask))
                  && (!cfg.match_ctrl || in_word.ctrl);

  page_t              cur;     // page under construction
  logic [WORD_W-1:0]  cnt;     // words since BOF (BOF itself = 0)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur        <= '0;
      cnt        <= '0;
      in_frag    <= 1'b0;
      page       <= '0;
      page_valid <= 1'b0;
      frag_err   <= 1'b0;
      stray      <= 1'b0;
    end else if (clr) begin
      cnt        <= '0;
      in_frag    <= 1'b0;
      page_valid <= 1'b0;
      frag_err   <= 1'b0;
      stray      <= 1'b0;
    end else begin
      page_valid <= 1'b0;
      frag_err   <= 1'b0;
      stray      <= 1'b0;
      if (in_valid) begin
        if (is_bof) begin
          if (in_frag) begin
            // previous fragment had no EOF: close it with the error bit
            page             <= cur;
            page[SW_LEN]     <= {1'b1, cnt[WORD_W-2:0]};
            page[SW_EOF]     <= '0;
            page_valid       <= 1'b1;
            frag_err         <= 1'b1;
          end
          cur              <= '0;
          cur[SW_BOF]      <= in_word.data;
          cur[SW_START]    <= WORD_W'(in_addr);
          cnt              <= WORD_W'(1);
          in_frag          <= 1'b1;
        end else if (in_frag) begin
          for (int i = 0; i < N_COPY; i++) begin
            if (cfg.copy_ofs[i] != '0 && WORD_W'(cfg.copy_ofs[i]) == cnt) begin
              cur[SW_COPY0+i] <= in_word.data;
            end
          end
          if (is_eof) begin
            page <= cur;
            for (int i = 0; i < N_COPY; i++) begin
              if (cfg.copy_ofs[i] != '0 && WORD_W'(cfg.copy_ofs[i]) == cnt) begin
                page[SW_COPY0+i] <= in_word.data;
              end
            end
            page[SW_LEN] <= cnt + 1'b1;
            page[SW_EOF] <= in_word.data;
            page_valid   <= 1'b1;
            in_frag      <= 1'b0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end else begin
          stray <= 1'b1;
        end
      end
    end
  end
endmodule
