// tb_addr_gen: self-checking test of the buffer write-address generator.
// A small buffer (BUF_WORDS = 20, not a power of two) is used so that the
// roll-over to address 0 happens several times; random advance and clear
// are compared against a reference counter, including the wrap count.
module tb_addr_gen;
  localparam int N = 20;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, adv = 1'b0;
  logic [$clog2(N)-1:0] waddr;
  logic [15:0] wraps;
  int checks = 0, failures = 0;
  int exp_addr = 0, exp_wraps = 0;

  addr_gen #(.BUF_WORDS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: addr %0d exp %0d", msg, $time, waddr, exp_addr);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      adv = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 499) == 0);
      chk(32'(waddr) == exp_addr, "waddr");
      chk(wraps == 16'(exp_wraps), "wraps");
      @(posedge clk);
      if (clr) begin
        exp_addr = 0; exp_wraps = 0;
      end else if (adv) begin
        if (exp_addr == N - 1) begin exp_addr = 0; exp_wraps++; end
        else exp_addr++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
