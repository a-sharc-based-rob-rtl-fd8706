// tb_ctrl_regs: self-checking test of the control/status/interrupt registers.
// Random register writes are mirrored in a model and read back, and the
// configuration outputs are compared with it; status inputs are driven at
// random and the STATUS word, the sticky error bits (set by pulses, cleared
// by writing 1), the fragment counter, the self-clearing clr pulse, the XOFF
// output and the interrupt condition are checked every cycle.
module tb_ctrl_regs;
  import crush_pkg::*;
  localparam int AW = 18, PCW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [REG_AW-1:0] addr = '0;
  word_t wdata = '0, rdata;
  cfg_t cfg;
  logic clr, irq, rol_xoff;
  logic fifo_full = 0, fifo_ovf = 0, pf_full = 0, pf_ovf = 0, frag_err = 0, stray = 0, page_done = 0, in_frag = 0;
  logic [PCW-1:0] pf_pages = '0;
  logic [AW-1:0] waddr = '0;
  logic [15:0] wraps = '0;
  int checks = 0, failures = 0, irqs = 0, clrs = 0;

  ctrl_regs #(.AW(AW), .PAGE_CNT_W(PCW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  word_t m_reg [6];   // CTRL (bits 3:0), BOF_PAT, BOF_MASK, EOF_PAT, EOF_MASK, COPY_OFS
  logic [3:0] m_sticky = '0;
  word_t m_frags = '0;
  logic m_clr = 1'b0;

  function automatic word_t exp_read(input logic [REG_AW-1:0] a);
    case (a)
      4'd0: return {28'd0, m_reg[0][3:0]};
      4'd1, 4'd2, 4'd3, 4'd4, 4'd5: return m_reg[3'(a)];
      4'd6: return {wraps, 8'(pf_pages), 1'b0, in_frag, pf_full, fifo_full, m_sticky};
      4'd7: return word_t'(waddr);
      4'd8: return m_frags;
      default: return '0;
    endcase
  endfunction

  initial begin
    m_reg[0] = '0; m_reg[1] = '0; m_reg[2] = '1; m_reg[3] = '0; m_reg[4] = '1; m_reg[5] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 2) == 0);
      addr  = REG_AW'($urandom_range(0, 9));
      wdata = $urandom();
      if (addr == 4'd0) wdata[4] = ($urandom_range(0, 3) == 0);
      fifo_full = 1'($urandom_range(0, 1)); pf_full = 1'($urandom_range(0, 1)); in_frag = 1'($urandom_range(0, 1));
      fifo_ovf  = ($urandom_range(0, 40) == 0);
      pf_ovf    = ($urandom_range(0, 40) == 0);
      frag_err  = ($urandom_range(0, 40) == 0);
      stray     = ($urandom_range(0, 40) == 0);
      page_done = ($urandom_range(0, 3) == 0);
      pf_pages  = ($urandom_range(0, 1) == 0) ? '0 : PCW'($urandom());
      waddr = AW'($urandom()); wraps = 16'($urandom());
      #1;
      chk(rdata == exp_read(addr), $sformatf("read reg %0d got %h exp %h", addr, rdata, exp_read(addr)));
      chk(cfg.enable == m_reg[0][0] && cfg.xoff == m_reg[0][1] && cfg.irq_en == m_reg[0][2]
          && cfg.match_ctrl == m_reg[0][3], "cfg ctrl bits");
      chk(cfg.bof_pat == m_reg[1] && cfg.bof_mask == m_reg[2] && cfg.eof_pat == m_reg[3]
          && cfg.eof_mask == m_reg[4] && cfg.copy_ofs == m_reg[5], "cfg words");
      chk(rol_xoff == m_reg[0][1], "xoff");
      chk(clr == m_clr, "clr pulse");
      chk(irq == (m_reg[0][2] && (pf_pages != '0 || m_sticky != '0)), "irq");
      if (irq) irqs++;
      if (clr) clrs++;
      @(posedge clk);
      if (m_clr) m_frags = '0;
      else if (page_done) m_frags++;
      m_clr = 1'b0;
      if (wr_en && addr == 4'd6) m_sticky = (m_sticky & ~wdata[3:0]) | {stray, frag_err, pf_ovf, fifo_ovf};
      else m_sticky = m_sticky | {stray, frag_err, pf_ovf, fifo_ovf};
      if (wr_en && addr <= 4'd5) begin
        m_reg[3'(addr)] = (addr == 4'd0) ? {28'd0, wdata[3:0]} : wdata;
        if (addr == 4'd0) m_clr = wdata[4];
      end
    end
    chk(irqs > 0 && clrs > 0, "irq or clr never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
