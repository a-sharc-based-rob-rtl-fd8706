// sharc_bus_if: slave on the SHARC external bus for the CRUSH FPGA.
//
// The SHARC sees two windows, selected by the top address bit: registers
// (bit clear, register number in the low 4 bits) and the buffer memory (bit
// set). The buffer window is twice as large as the buffer and both halves
// map onto the same memory (the address bit just below the window bit is
// ignored), so a fragment that wraps around the end of the ring buffer can
// be read by one linear DMA run. An access starts when s_req is seen in the
// idle state; s_req must stay high until s_ack. Every access, register or
// memory, read or write, takes exactly ACC_CYCLES memory-clock cycles
// including the s_ack cycle: 8 cycles at 80 MHz are the four 40 MHz SHARC
// cycles of the document, so data moves at most 40 MByte/s between buffer
// and SHARC. Memory accesses go through buf_arbiter in the SHARC slot;
// register accesses use the ctrl_regs port in the first cycle. s_rdata is
// held from s_ack until the next access ends.
//
// From the document: the four-cycle SHARC access and the double mapping of
// the buffer. The handshake, window layout and register decoding are this
// design's choices; the SHARC bus is modelled in the 80 MHz clock domain.
module sharc_bus_if
  import crush_pkg::*;
#(
  parameter int unsigned AW         = 18,
  parameter int unsigned ACC_CYCLES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // SHARC side
  input  logic              s_req,
  input  logic              s_we,
  input  logic [AW+1:0]     s_addr,
  input  word_t             s_wdata,
  output logic              s_ack,
  output word_t             s_rdata,
  // register port (ctrl_regs)
  output logic              r_we,
  output logic [REG_AW-1:0] r_addr,
  output word_t             r_wdata,
  input  word_t             r_rdata,
  // buffer memory port (buf_arbiter, SHARC side)
  output logic              m_req,
  output logic              m_we,
  output logic [AW-1:0]     m_addr,
  output word_t             m_wdata,
  input  logic              m_gnt,
  input  logic              m_rvalid,
  input  word_t             m_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_DONE} state_e;

  state_e        st;
  logic [7:0]    cnt;
  logic          pend, we_q;
  logic [AW-1:0] addr_q;
  word_t         wd_q;

  logic start, to_mem;
  assign start  = (st == S_IDLE) && s_req;
  assign to_mem = s_addr[AW+1];

  assign r_we    = start && !to_mem && s_we;
  assign r_addr  = s_addr[REG_AW-1:0];
  assign r_wdata = s_wdata;

  assign m_req   = pend;
  assign m_we    = we_q;
  assign m_addr  = addr_q;
  assign m_wdata = wd_q;

  assign s_ack = (st == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      cnt     <= '0;
      pend    <= 1'b0;
      we_q    <= 1'b0;
      addr_q  <= '0;
      wd_q    <= '0;
      s_rdata <= '0;
    end else begin
      case (st)
        S_IDLE: if (s_req) begin
          st     <= S_BUSY;
          cnt    <= 8'd1;
          we_q   <= s_we;
          addr_q <= s_addr[AW-1:0];  // bit AW ignored: buffer mapped twice
          wd_q   <= s_wdata;
          pend   <= to_mem;
          if (!to_mem && !s_we) s_rdata <= r_rdata;
        end
        S_BUSY: begin
          if (m_gnt) pend <= 1'b0;
          if (m_rvalid) s_rdata <= m_rdata;
          cnt <= cnt + 1'b1;
          if (cnt == 8'(ACC_CYCLES - 2)) st <= S_DONE;
        end
        default: st <= S_IDLE;  // S_DONE: ack cycle
      endcase
    end
  end

  initial begin
    if (ACC_CYCLES < 7)
      $fatal(1, "sharc_bus_if: ACC_CYCLES must cover the memory pipeline (>= 7)");
  end
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n) (st == S_BUSY) |-> s_req)
    else $error("sharc_bus_if: s_req dropped before s_ack");
endmodule
