// tb_buf_arbiter: self-checking test of the buffer-memory slot arbiter.
// The S-link side requests in every slot 0 it can, the SHARC side at random.
// Checked every cycle against a model: slots alternate, slot 0 issues the
// S-link write and slot 1 the SHARC command on the memory pins (address,
// enable, write enable), write data appears on z_wdata exactly two cycles
// after its command, SHARC read data is returned with sh_rvalid three cycles
// after the grant, and no SHARC grant is given in slot 0. It also checks the
// document's rate: 160 MByte/s for the S-link, one word every two cycles.
module tb_buf_arbiter;
  localparam int AW = 18;
  logic clk = 1'b0, rst_n = 1'b0;
  logic slot;
  logic sl_req = 1'b0, sh_req = 1'b0, sh_we = 1'b0;
  logic [AW-1:0] sl_addr = '0, sh_addr = '0;
  logic [31:0] sl_data = '0, sh_wdata = '0, z_rdata = '0;
  logic sh_gnt, sh_rvalid, z_en, z_we;
  logic [AW-1:0] z_addr;
  logic [31:0] sh_rdata, z_wdata;
  int checks = 0, failures = 0, sl_words = 0, sh_reads = 0, sh_writes = 0;
  logic [31:0] wd_hist[4];
  logic        rd_hist[4];
  logic        exp_slot = 1'b0;
  logic        wd_valid[4] = '{default: 1'b0};

  buf_arbiter #(.AW(AW)) dut (.*);

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
    int c;
    for (int i = 0; i < 4; i++) begin wd_hist[i] = '0; rd_hist[i] = 1'b0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    exp_slot = 1'b1;  // one edge passes before the first check
    for (c = 4; c < 4004; c++) begin
      @(negedge clk);
      chk(slot == exp_slot, "slot sequence");
      sl_req   = (slot == 1'b0) && (c < 3004);   // S-link always ready, 3000 cycles
      sl_addr  = AW'($urandom());
      sl_data  = $urandom();
      sh_req   = 1'($urandom_range(0, 1));
      sh_we    = 1'($urandom_range(0, 1));
      sh_addr  = AW'($urandom());
      sh_wdata = $urandom();
      z_rdata  = $urandom();
      #1;
      chk(sh_gnt == (slot && sh_req), "sh_gnt");
      if (sl_req) begin
        chk(z_en && z_we && z_addr == sl_addr, "S-link command");
        sl_words++;
      end else if (sh_gnt) begin
        chk(z_en && z_we == sh_we && z_addr == sh_addr, "SHARC command");
      end else begin
        chk(!z_en, "idle command");
      end
      chk(sh_rvalid == rd_hist[(c - 3) % 4], "sh_rvalid timing");
      if (sh_rvalid) chk(sh_rdata == z_rdata, "sh_rdata");
      // write data of the command issued two cycles ago
      chk(z_wdata == wd_hist[(c - 2) % 4] || !(wd_valid[(c - 2) % 4]), "write data offset");
      wd_valid[c % 4] = z_en && z_we;
      wd_hist[c % 4]  = sl_req ? sl_data : sh_wdata;
      rd_hist[c % 4]  = sh_gnt && !sh_we;
      if (sh_gnt && sh_we) sh_writes++;
      if (sh_gnt && !sh_we) sh_reads++;
      @(posedge clk);
      exp_slot = ~exp_slot;
    end
    // 3000 cycles at 80 MHz with the S-link always ready: 1500 words = 160 MByte/s
    chk(sl_words == 1500, $sformatf("S-link words %0d, expected 1500", sl_words));
    chk(sh_reads > 0 && sh_writes > 0, "SHARC access coverage");
    $display("S-link words %0d, SHARC reads %0d writes %0d", sl_words, sh_reads, sh_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
