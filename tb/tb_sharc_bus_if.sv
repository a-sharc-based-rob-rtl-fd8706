// tb_sharc_bus_if: self-checking test of the SHARC external-bus slave.
// The register port and the memory side (an 80 MHz slot arbiter with the
// three-cycle read return) are modelled here. Random register and buffer
// reads and writes are issued by a SHARC master model; checked are the
// access time (exactly ACC_CYCLES = 8 cycles at 80 MHz, the four 40 MHz
// SHARC cycles of the document), read data, one register write strobe or one
// memory command per access, and that the two halves of the buffer window
// reach the same memory word (the buffer is mapped twice).
module tb_sharc_bus_if;
  import crush_pkg::*;
  localparam int AW = 18;
  localparam int ACC = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_req = 1'b0, s_we = 1'b0;
  logic [AW+1:0] s_addr = '0;
  word_t s_wdata = '0, s_rdata;
  logic s_ack;
  logic r_we;
  logic [REG_AW-1:0] r_addr;
  word_t r_wdata, r_rdata;
  logic m_req, m_we, m_gnt, m_rvalid;
  logic [AW-1:0] m_addr;
  word_t m_wdata, m_rdata;
  int checks = 0, failures = 0, aliased = 0;

  sharc_bus_if #(.AW(AW), .ACC_CYCLES(ACC)) dut (.*);

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

  // register port model
  assign r_rdata = 32'ha5a5_0000 | word_t'(r_addr);
  int n_rwe = 0;
  logic [REG_AW-1:0] last_raddr;
  word_t last_rwdata;
  always @(posedge clk) if (r_we) begin n_rwe++; last_raddr <= r_addr; last_rwdata <= r_wdata; end

  // memory side model: slot arbiter and pipelined memory
  logic tslot = 1'b0;
  logic [2:0] rv = '0;
  word_t rd_pipe[3];
  word_t mem [int];
  int n_gnt = 0;
  assign m_gnt    = tslot && m_req;
  assign m_rvalid = rv[2];
  assign m_rdata  = rd_pipe[2];
  always @(posedge clk) begin
    tslot <= ~tslot;
    rv <= {rv[1:0], m_gnt && !m_we};
    rd_pipe[1] <= rd_pipe[0];
    rd_pipe[2] <= rd_pipe[1];
    if (m_gnt) begin
      n_gnt++;
      if (m_we) mem[int'(m_addr)] = m_wdata;
      else rd_pipe[0] <= mem.exists(int'(m_addr)) ? mem[int'(m_addr)] : 32'hdead_beef;
    end
  end

  task automatic access(input logic we, input logic [AW+1:0] a, input word_t d, output word_t rd);
    int cycles;
    int g0, w0;
    g0 = n_gnt; w0 = n_rwe;
    @(negedge clk);
    s_req = 1'b1; s_we = we; s_addr = a; s_wdata = d;
    cycles = 1;
    forever begin
      @(negedge clk);
      if (s_ack) break;
      cycles++;
      if (cycles > 50) break;
    end
    cycles++;
    chk(cycles == ACC, $sformatf("access took %0d cycles", cycles));
    rd = s_rdata;
    @(posedge clk);
    #1 s_req = 1'b0;
    if (a[AW+1]) chk(n_gnt == g0 + 1 && n_rwe == w0, "one memory command");
    else begin
      chk(n_gnt == g0 && n_rwe == w0 + (we ? 1 : 0), "register strobe count");
      if (we) chk(last_raddr == a[REG_AW-1:0] && last_rwdata == d, "register write");
    end
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  initial begin
    word_t rd;
    word_t shadow [int];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int kind;
      logic [AW+1:0] a;
      logic [AW-1:0] ma;
      word_t d;
      kind = $urandom_range(0, 3);
      ma = AW'($urandom_range(0, 63));
      d = $urandom();
      case (kind)
        0: begin  // register read
          a = {2'b00, AW'($urandom_range(0, 15))};
          access(1'b0, a, '0, rd);
          chk(rd == (32'ha5a5_0000 | word_t'(a[REG_AW-1:0])), "register read data");
        end
        1: begin  // register write
          a = {2'b00, AW'($urandom_range(0, 15))};
          access(1'b1, a, d, rd);
        end
        2: begin  // buffer write through either alias
          a = {1'b1, 1'($urandom_range(0, 1)), ma};
          access(1'b1, a, d, rd);
          shadow[int'(ma)] = d;
        end
        default: begin  // buffer read through either alias
          a = {1'b1, 1'($urandom_range(0, 1)), ma};
          access(1'b0, a, '0, rd);
          if (shadow.exists(int'(ma))) begin
            chk(rd == shadow[int'(ma)], $sformatf("buffer read %h exp %h", rd, shadow[int'(ma)]));
            if (a[AW]) aliased++;
          end
        end
      endcase
    end
    chk(aliased > 50, "second buffer mapping not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
