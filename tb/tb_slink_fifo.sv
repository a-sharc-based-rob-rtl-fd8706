// tb_slink_fifo: self-checking test of the 1k x 36 S-link input FIFO.
// Random pushes and pops (biased to fill the FIFO completely and to drain it)
// are compared against a queue model: first-word-fall-through data, empty,
// full (at exactly 1024 words) and the overflow pulse on a write while full.
module tb_slink_fifo;
  localparam int DEPTH = 1024;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [35:0] wr_data = '0, rd_data;
  logic full, empty, overflow;
  int checks = 0, failures = 0;
  logic [35:0] q[$];
  logic exp_ovf = 1'b0;
  int fulls = 0;

  slink_fifo #(.DEPTH(DEPTH), .WIDTH(36)) dut (.*);

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 12000; cyc++) begin
      @(negedge clk);
      // phases: fill, drain, mixed
      if (cyc < 3000)      begin wr_en = ($urandom_range(0,9) < 8); rd_en = ($urandom_range(0,9) < 2) && q.size() != 0; end
      else if (cyc < 6000) begin wr_en = ($urandom_range(0,9) < 2); rd_en = ($urandom_range(0,9) < 8) && q.size() != 0; end
      else                 begin wr_en = 1'($urandom_range(0,1));      rd_en = ($urandom_range(0,1) != 0) && q.size() != 0; end
      wr_data = 36'({$urandom(), $urandom()});
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      chk(overflow == exp_ovf, "overflow");
      if (q.size() != 0) chk(rd_data == q[0], "rd_data");
      @(posedge clk);
      begin
        bit was_full;
        was_full = (q.size() == DEPTH);
        exp_ovf  = wr_en && was_full;
        if (was_full) fulls++;
        if (rd_en && q.size() != 0) void'(q.pop_front());
        if (wr_en && !was_full) q.push_back(wr_data);
      end
    end
    chk(fulls > 0, "FIFO was never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
