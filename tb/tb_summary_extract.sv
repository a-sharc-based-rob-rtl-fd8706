// tb_summary_extract: self-checking test of the event-summary builder.
// Random fragments (BOF, 0..24 payload words, EOF) with random copy offsets
// are streamed with idle gaps; the expected 8-word page of every fragment is
// computed here from the generated words and compared with the pages the
// block emits. Also exercised: fragments closed by a new BOF without EOF
// (error bit, frag_err), words outside fragments (stray), the control-word
// qualifier (a pattern match without the S-link control flag is ignored)
// and the clear input.
module tb_summary_extract;
  import crush_pkg::*;
  localparam int AW = 18;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  cfg_t cfg;
  logic in_valid = 1'b0;
  slink_word_t in_word = '0;
  logic [AW-1:0] in_addr = '0;
  logic page_valid, frag_err, stray, in_frag;
  page_t page;
  int checks = 0, failures = 0;
  page_t exp_q[$];
  int exp_err = 0, exp_stray = 0, got_err = 0, got_stray = 0, got_pages = 0;
  int addr = 0;

  summary_extract #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && page_valid) begin
      got_pages++;
      if (exp_q.size() == 0) chk(1'b0, "unexpected page");
      else begin
        page_t e;
        e = exp_q.pop_front();
        for (int w = 0; w < SUM_WORDS; w++) begin
          chk(page[w] == e[w], $sformatf("page word %0d got %h exp %h", w, page[w], e[w]));
        end
      end
    end
    if (rst_n && frag_err) got_err++;
    if (rst_n && stray) got_stray++;
  end

  task automatic send(input word_t d, input logic c);
    @(negedge clk);
    in_valid     = 1'b1;
    in_word.data = d;
    in_word.ctrl = c;
    in_word.spare = 3'($urandom);
    in_addr      = AW'(addr);
    addr++;
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat ($urandom_range(0, 2)) @(posedge clk);
  endtask

  function automatic word_t payload();
    return $urandom() & 32'h7fff_ffff;  // never matches the B/E patterns
  endfunction

  // one fragment; noeof: close it with the next BOF instead of an EOF
  task automatic fragment(input bit noeof, input bit ctl);
    word_t w[$];
    page_t e;
    int n;
    n = $urandom_range(0, 24);
    w.push_back(32'hb0f0_0000 | ($urandom() & 32'hffff));
    for (int i = 0; i < n; i++) w.push_back(payload());
    if (!noeof) w.push_back(32'he0f0_0000 | ($urandom() & 32'hffff));
    e = '0;
    e[SW_BOF]   = w[0];
    e[SW_START] = word_t'(AW'(addr));
    for (int i = 0; i < N_COPY; i++) begin
      int o;
      o = int'(cfg.copy_ofs[i]);
      if (o != 0 && o < w.size()) e[SW_COPY0 + i] = w[o];
    end
    e[SW_LEN] = noeof ? (word_t'(w.size()) | 32'h8000_0000) : word_t'(w.size());
    e[SW_EOF] = noeof ? '0 : w[w.size() - 1];
    exp_q.push_back(e);
    if (noeof) exp_err++;
    for (int i = 0; i < w.size(); i++) begin
      // with the control qualifier on, payload words that look like a
      // pattern but are not control words must be ignored
      send(w[i], (i == 0 || (!noeof && i == w.size() - 1)) ? ctl : 1'b0);
    end
  endtask

  initial begin
    cfg = '{enable: 1'b1, xoff: 1'b0, irq_en: 1'b0, match_ctrl: 1'b0,
            bof_pat: 32'hb0f0_0000, bof_mask: 32'hffff_0000,
            eof_pat: 32'he0f0_0000, eof_mask: 32'hffff_0000, copy_ofs: '0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 400; f++) begin
      bit noeof;
      if (f % 20 == 0) begin
        cfg.copy_ofs = {8'($urandom_range(0, 30)), 8'($urandom_range(0, 12)),
                        8'($urandom_range(1, 6)), 8'd1};
        cfg.match_ctrl = (f >= 200);
      end
      noeof = (f != 399) && ($urandom_range(0, 9) == 0);
      fragment(noeof, 1'b1);
      if (!noeof && $urandom_range(0, 4) == 0) begin
        send(payload(), 1'b0);
        exp_stray++;
      end
      if (cfg.match_ctrl && !noeof && $urandom_range(0, 4) == 0) begin
        // looks like a BOF but is a data word: must count as stray only
        send(32'hb0f0_1234, 1'b0);
        exp_stray++;
      end
    end
    repeat (4) @(posedge clk);
    // clear in the middle of a fragment: no page may follow
    send(32'hb0f0_0001, 1'b1);
    send(payload(), 1'b0);
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
    chk(!in_frag, "clear leaves fragment open");
    send(32'he0f0_0002, 1'b1);  // stray after clear
    exp_stray++;
    repeat (4) @(posedge clk);
    chk(exp_q.size() == 0, $sformatf("%0d pages missing", exp_q.size()));
    chk(got_err == exp_err, $sformatf("frag_err %0d exp %0d", got_err, exp_err));
    chk(got_stray == exp_stray, $sformatf("stray %0d exp %0d", got_stray, exp_stray));
    chk(exp_err > 0 && got_pages > 300, "coverage");
    $display("pages %0d, missing-EOF %0d, stray %0d", got_pages, got_err, got_stray);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
