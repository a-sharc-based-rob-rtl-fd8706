// tb_zbt_ram: self-checking test of the pipelined ZBT buffer-memory model.
// Random back-to-back reads and writes (no idle cycles between them) are
// issued; write data is presented two cycles after its command and read data
// is checked two cycles after its command against a reference array,
// including reads that follow a write to the same address by one or two
// cycles and the top address of the 256 k word memory.
module tb_zbt_ram;
  localparam int WORDS = 262144;
  localparam int AW = 18;
  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0, raw = 0;
  logic [31:0] ref_mem [int];
  // per-cycle history, indexed by cycle number modulo 4
  logic        h_rd[4], h_wr[4];
  logic [AW-1:0] h_addr[4];
  logic [31:0] h_wd[4], h_exp[4];

  zbt_ram #(.WORDS(WORDS), .WIDTH(32)) dut (.*);

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

  logic [AW-1:0] pool [8];
  initial begin
    for (int i = 0; i < 4; i++) begin h_rd[i] = 1'b0; h_wr[i] = 1'b0; h_addr[i] = '0; h_wd[i] = '0; h_exp[i] = '0; end
    for (int i = 0; i < 8; i++) begin
      pool[i] = AW'($urandom());
      ref_mem[int'(pool[i])] = 32'hc0de_0000 + i;
    end
    pool[7] = '1;
    ref_mem[int'(pool[7])] = 32'hc0de_0007;
    // initialise the addresses used so that every read has a known value
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); en = 1'b1; we = 1'b1; addr = pool[i];
      @(negedge clk); en = 1'b0;
      @(negedge clk); wdata = ref_mem[int'(pool[i])];
      @(negedge clk);
    end
    for (int c = 4; c < 20004; c++) begin
      @(negedge clk);
      if (h_rd[(c - 3) % 4])
        chk(rdata == h_exp[(c - 3) % 4], $sformatf("read data %h exp %h", rdata, h_exp[(c - 3) % 4]));
      wdata = h_wr[(c - 2) % 4] ? h_wd[(c - 2) % 4] : $urandom();
      en    = ($urandom_range(0, 7) != 0);
      we    = 1'($urandom_range(0, 1));
      addr  = pool[$urandom_range(0, 7)];
      h_rd[c % 4]   = en && !we;
      h_wr[c % 4]   = en && we;
      h_addr[c % 4] = addr;
      if (en && we) begin
        h_wd[c % 4] = $urandom();
        ref_mem[int'(addr)] = h_wd[c % 4];   // commands take effect in issue order
      end else if (en) begin
        h_exp[c % 4] = ref_mem[int'(addr)];
        if (h_wr[(c - 1) % 4] && h_addr[(c - 1) % 4] == addr) raw++;
      end
    end
    chk(raw > 100, "read-after-write case not reached");
    $display("reads right after a write to the same address: %0d", raw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
