// tb_paged_fifo: self-checking test of the paged summary FIFO.
// Random 8-word pages are written and read back word by word through the DMA
// handshake; a queue model checks dma_req, the word order, the page count,
// full (exactly PAGES pages), the overflow pulse on a write while full and
// the clear input.
module tb_paged_fifo;
  import crush_pkg::*;
  localparam int PAGES = 32;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic wr_en = 1'b0, dma_ack = 1'b0;
  page_t wr_page = '0;
  logic full, overflow, dma_req;
  word_t dma_data;
  logic [$clog2(PAGES):0] pages;
  int checks = 0, failures = 0, fulls = 0, ovfs = 0;
  page_t q[$];
  int widx = 0;
  logic exp_ovf = 1'b0;

  paged_fifo #(.PAGES(PAGES)) dut (.*);

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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      if (cyc < 4000)       begin wr_en = ($urandom_range(0, 3) == 0); dma_ack = ($urandom_range(0, 15) == 0); end
      else if (cyc < 8000)  begin wr_en = ($urandom_range(0, 31) == 0); dma_ack = ($urandom_range(0, 1) == 0); end
      else                  begin wr_en = ($urandom_range(0, 7) == 0); dma_ack = ($urandom_range(0, 1) == 0); end
      dma_ack = dma_ack && (q.size() != 0);
      clr = (cyc == 15000);
      for (int w = 0; w < SUM_WORDS; w++) wr_page[w] = $urandom();
      chk(dma_req == (q.size() != 0), "dma_req");
      chk(full == (q.size() == PAGES), "full");
      chk(int'(pages) == q.size(), "pages");
      chk(overflow == exp_ovf, "overflow");
      if (q.size() != 0) chk(dma_data == q[0][widx], $sformatf("dma_data word %0d", widx));
      @(posedge clk);
      if (clr) begin
        q.delete(); widx = 0; exp_ovf = 1'b0;
      end else begin
        bit was_full;
        was_full = (q.size() == PAGES);
        exp_ovf = wr_en && was_full;
        if (was_full) fulls++;
        if (exp_ovf) ovfs++;
        if (dma_ack) begin
          if (widx == SUM_WORDS - 1) begin widx = 0; void'(q.pop_front()); end
          else widx++;
        end
        if (wr_en && !was_full) q.push_back(wr_page);
      end
    end
    chk(fulls > 0 && ovfs > 0, "full/overflow never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
