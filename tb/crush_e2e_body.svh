// crush_e2e_body.svh: end-to-end test body shared by the CRUSH system
// testbenches. The including module declares clk, rst_n, the crush_top port
// signals, the localparams BUF_WORDS, FIFO_DEPTH, PF_PAGES, N_FRAGS, REQ_PCT,
// XOFF_HI, XOFF_LO (buffer occupancy in words that sets / clears XOFF), CHECK_MECH, the fragment size rule (frag_len) and the macro FPGA (path to
// the crush_fpga instance), and instantiates the design.
//
// An S-link source sends fragments (BOF and EOF as S-link control words,
// event number in the first payload word), some without EOF, some followed
// by stray words, some containing a data word that looks like a BOF. It obeys
// the FIFO full flag and the ROL XOFF. A SHARC model runs a polling loop like
// the ROBIn software: it programs the registers, takes each 8-word summary
// by DMA, compares it with the summary computed here, reads the fragment
// back from the buffer for REQ_PCT % of the events (a RoI request), through
// the second buffer mapping when the fragment wraps, then frees it, and sets
// or clears XOFF from the buffer occupancy. At the end it checks the
// fragment counter, write pointer, roll-over count, the sticky error bits
// (write-1-to-clear) and the clear command. Every buffer access must take
// exactly 8 cycles. The number of times each mechanism occurs is counted.
// Input rate: in every RATE_WIN-cycle window in which the S-link FIFO holds
// data, the paged FIFO has room and the FPGA is enabled, exactly RATE_WIN/2
// words must go into the buffer (one per 25 ns = 160 MByte/s at 80 MHz),
// whether or not the SHARC uses the memory in the same window.

  localparam int AW = $clog2(BUF_WORDS);
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  always #5 clk = ~clk;   // 80 MHz memory clock (period scaled)

  // ---------------- stimulus generation ----------------
  typedef struct {
    page_t  pg;
    longint abs_start;
    longint abs_end;   // first word after the fragment (and strays after it)
  } exp_t;
  exp_t       expq[$];
  word_t      tx_data[$];
  logic       tx_ctrl[$];
  int         n_noeof = 0, n_stray = 0, n_fake_bof = 0;

  task automatic build_stream();
    for (int f = 0; f < N_FRAGS; f++) begin
      word_t  w[$];
      logic   c[$];
      exp_t   e;
      bit     noeof;
      int     n;
      n = frag_len(f);
      noeof = (f != N_FRAGS - 1) && (f % 17 == 5);
      w.push_back(32'hb0f0_0000 | word_t'(f & 32'hffff)); c.push_back(1'b1);
      w.push_back(word_t'(f));                            c.push_back(1'b0);  // event id
      for (int i = 2; i < n - 1; i++) begin
        if (i == 4 && f % 7 == 3) begin
          w.push_back(32'hb0f0_beef); c.push_back(1'b0);   // looks like BOF, is data
          n_fake_bof++;
        end else begin
          w.push_back($urandom() & 32'h7fff_ffff); c.push_back(1'b0);
        end
      end
      if (!noeof) begin w.push_back(32'he0f0_0000 | word_t'(f & 32'hffff)); c.push_back(1'b1); end
      else n_noeof++;
      e.pg = '0;
      e.abs_start = longint'(tx_data.size());
      e.pg[SW_BOF]   = w[0];
      e.pg[SW_START] = word_t'(e.abs_start % longint'(BUF_WORDS));
      e.pg[SW_COPY0 + 0] = (w.size() > 1) ? w[1] : '0;
      e.pg[SW_COPY0 + 1] = (w.size() > 2) ? w[2] : '0;
      e.pg[SW_COPY0 + 2] = (w.size() > 3) ? w[3] : '0;
      e.pg[SW_COPY0 + 3] = '0;
      e.pg[SW_LEN]   = noeof ? (word_t'(w.size()) | 32'h8000_0000) : word_t'(w.size());
      e.pg[SW_EOF]   = noeof ? '0 : w[w.size() - 1];
      foreach (w[i]) begin tx_data.push_back(w[i]); tx_ctrl.push_back(c[i]); end
      if (!noeof && f % 11 == 4) begin
        tx_data.push_back(32'h0123_4567); tx_ctrl.push_back(1'b0);   // stray word
        n_stray++;
      end
      e.abs_end = longint'(tx_data.size());
      expq.push_back(e);
    end
  endtask

  // ---------------- S-link source ----------------
  int sent = 0;
  logic go = 1'b0;
  initial begin
    slink_wen = 1'b0; slink_data = '0;
    wait (rst_n && tx_data.size() != 0 && go);
    while (sent < tx_data.size()) begin
      @(negedge clk);
      if (!slink_lff && !rol_xoff && ($urandom_range(0, 9) != 0)) begin
        slink_wen = 1'b1;
        slink_data = '{spare: 3'($urandom()), ctrl: tx_ctrl[sent], data: tx_data[sent]};
        sent++;
      end else begin
        slink_wen = 1'b0;
      end
      @(posedge clk);
      #1 slink_wen = 1'b0;
    end
  end

  // ---------------- input-rate monitor ----------------
  localparam int RATE_WIN = 200;
  int win_cyc = 0, win_pops = 0, win_gnts = 0, m_fullrate = 0, m_fullrate_sh = 0;
  always @(posedge clk) if (rst_n) begin
    if (`FPGA.fifo_empty || `FPGA.pf_full || !`FPGA.cfg.enable || `FPGA.clr) begin
      win_cyc <= 0; win_pops <= 0; win_gnts <= 0;
    end else if (win_cyc == RATE_WIN - 1) begin
      chk(win_pops + int'(`FPGA.sl_pop) == RATE_WIN / 2,
          $sformatf("%0d words written in a %0d-cycle window, expected %0d",
                    win_pops + int'(`FPGA.sl_pop), RATE_WIN, RATE_WIN / 2));
      m_fullrate++;
      if (win_gnts + int'(`FPGA.m_gnt) > 0) m_fullrate_sh++;
      win_cyc <= 0; win_pops <= 0; win_gnts <= 0;
    end else begin
      win_cyc  <= win_cyc + 1;
      win_pops <= win_pops + int'(`FPGA.sl_pop);
      win_gnts <= win_gnts + int'(`FPGA.m_gnt);
    end
  end

  // ---------------- SHARC model ----------------
  int bad_time = 0;

  task automatic bus(input logic we, input logic [AW+1:0] a, input word_t d, output word_t rd);
    int cycles;
    @(negedge clk);
    s_req = 1'b1; s_we = we; s_addr = a; s_wdata = d;
    cycles = 1;
    forever begin
      @(negedge clk);
      if (s_ack || cycles > 40) break;
      cycles++;
    end
    cycles++;
    if (cycles != 8) bad_time++;
    rd = s_rdata;
    @(posedge clk);
    #1 s_req = 1'b0;
  endtask

  task automatic wreg(input reg_addr_e r, input word_t d);
    word_t dummy;
    bus(1'b1, {2'b00, AW'(r)}, d, dummy);
  endtask

  task automatic rreg(input reg_addr_e r, output word_t d);
    bus(1'b0, {2'b00, AW'(r)}, '0, d);
  endtask

  task automatic dma_page(output page_t p);
    for (int w = 0; w < SUM_WORDS; w++) begin
      @(negedge clk);
      while (!dma_req) @(negedge clk);
      dma_ack = 1'b1;
      p[w] = dma_data;
      @(posedge clk);
      #1 dma_ack = 1'b0;
    end
  endtask

  // mechanism counters
  int m_stall = 0, m_lff = 0, m_xoff = 0, m_irq = 0, m_alias = 0, m_turn = 0;
  int m_noeof_pages = 0, m_roi = 0;
  logic prev_slw = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (`FPGA.pf_full && !`FPGA.fifo_empty && `FPGA.cfg.enable && !`FPGA.slot) m_stall++;
    if (slink_lff) m_lff++;
    if (rol_xoff) m_xoff++;
    if (irq) m_irq++;
    // SHARC read right after an S-link write: ZBT read/write turnaround
    if (prev_slw && `FPGA.m_gnt && !`FPGA.m_we) m_turn++;
    prev_slw <= `FPGA.sl_pop;
  end

  initial begin
    word_t  rd, st;
    page_t  pg;
    automatic longint freed = 0;
    automatic int     pages = 0;
    automatic bit     xoff = 1'b0;
    word_t  ctrl_on;
    s_req = 1'b0; s_we = 1'b0; s_addr = '0; s_wdata = '0; dma_ack = 1'b0;
    build_stream();
    $display("stream: %0d fragments, %0d words, buffer %0d words", N_FRAGS, tx_data.size(), BUF_WORDS);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    wreg(REG_BOF_PAT,  32'hb0f0_0000);
    wreg(REG_BOF_MASK, 32'hffff_0000);
    wreg(REG_EOF_PAT,  32'he0f0_0000);
    wreg(REG_EOF_MASK, 32'hffff_0000);
    wreg(REG_COPY_OFS, 32'h0003_0201);
    ctrl_on = 32'h0000_000d;   // enable, irq_en, match control words
    wreg(REG_CTRL, ctrl_on);
    rreg(REG_COPY_OFS, rd);
    chk(rd == 32'h0003_0201, "copy offset register read-back");
    go = 1'b1;
    while (pages < N_FRAGS) begin
      longint occ;
      if (dma_req) begin
        exp_t e;
        dma_page(pg);
        e = expq.pop_front();
        for (int w = 0; w < SUM_WORDS; w++)
          chk(pg[w] == e.pg[w], $sformatf("page %0d word %0d got %h exp %h", pages, w, pg[w], e.pg[w]));
        if (pg[SW_LEN][31]) m_noeof_pages++;
        // RoI request for REQ_PCT % of the events: read the fragment back
        if ((pages * 37) % 100 < REQ_PCT) begin
          int len;
          len = int'(pg[SW_LEN][30:0]);
          m_roi++;
          chk(longint'(sent) - e.abs_start <= longint'(BUF_WORDS), "fragment overwritten before it was read");
          for (int i = 0; i < len; i++) begin
            longint lin;
            lin = longint'(pg[SW_START]) + longint'(i);   // linear: may run into the second mapping
            if (lin >= longint'(BUF_WORDS)) m_alias++;
            bus(1'b0, (AW+2)'((longint'(1) << (AW + 1)) | lin), '0, rd);
            chk(rd == tx_data[e.abs_start + i], $sformatf("fragment %0d word %0d got %h exp %h",
                pages, i, rd, tx_data[e.abs_start + i]));
          end
        end
        freed = e.abs_end;
        pages++;
      end else begin
        rreg(REG_STATUS, st);   // idle poll
      end
      occ = longint'(sent) - freed;
      if (!xoff && occ > XOFF_HI) begin xoff = 1'b1; wreg(REG_CTRL, ctrl_on | 32'h2); end
      else if (xoff && occ < XOFF_LO) begin xoff = 1'b0; wreg(REG_CTRL, ctrl_on); end
    end
    // final register checks
    repeat (20) @(posedge clk);
    rreg(REG_FRAGS, rd);
    chk(rd == word_t'(N_FRAGS), $sformatf("fragment counter %0d", rd));
    rreg(REG_WPTR, rd);
    chk(rd == word_t'(tx_data.size() % BUF_WORDS), "write pointer");
    rreg(REG_STATUS, st);
    chk(st[31:16] == 16'(tx_data.size() / BUF_WORDS), $sformatf("roll-over count %0d", st[31:16]));
    chk(st[2] == (n_noeof > 0), "missing-EOF sticky bit");
    chk(st[3] == 1'b1, "stray sticky bit");
    chk(st[0] == 1'b0 && st[1] == 1'b0, "no FIFO overflow");
    chk(st[15:8] == 8'd0, "paged FIFO empty");
    wreg(REG_STATUS, 32'hf);
    rreg(REG_STATUS, st);
    chk(st[3:0] == 4'd0, "sticky bits cleared");
    chk(!irq, "interrupt gone with nothing pending");
    wreg(REG_CTRL, ctrl_on | 32'h10);
    rreg(REG_WPTR, rd);
    chk(rd == 0, "clear resets write pointer");
    rreg(REG_FRAGS, rd);
    chk(rd == 0, "clear resets fragment counter");
    chk(expq.size() == 0, "pages missing");
    chk(bad_time == 0, $sformatf("%0d buffer/register accesses not 8 cycles (4 SHARC cycles)", bad_time));
    $display("mechanisms: paged-FIFO stall %0d cycles, S-link full %0d, XOFF %0d, irq %0d,",
             m_stall, m_lff, m_xoff, m_irq);
    $display("            roll-overs %0d, second-mapping reads %0d, read-after-write turnarounds %0d,",
             tx_data.size() / BUF_WORDS, m_alias, m_turn);
    $display("            missing-EOF %0d, stray %0d, data word looking like BOF %0d, RoI reads %0d",
             m_noeof_pages, n_stray, n_fake_bof, m_roi);
    $display("            full-rate windows %0d, of them with SHARC memory accesses %0d",
             m_fullrate, m_fullrate_sh);
    if (CHECK_MECH) begin
      chk(m_stall > 0, "paged-FIFO stall never happened");
      chk(m_lff > 0, "S-link back-pressure never happened");
      chk(m_xoff > 0, "XOFF never happened");
      chk(m_irq > 0, "interrupt never happened");
      chk(m_alias > 0, "wrapped fragment never read through the second mapping");
      chk(m_turn > 0, "read after write never happened");
      chk(m_noeof_pages > 0 && n_stray > 0 && n_fake_bof > 0, "fragment error cases missing");
      chk(tx_data.size() / BUF_WORDS > 0, "buffer never rolled over");
      chk(m_fullrate_sh > 0, "no full-rate input window with SHARC memory accesses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
