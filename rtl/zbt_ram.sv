// zbt_ram: the 1 MByte ZBT (zero bus turnaround) SRAM used as event buffer,
// 256 k words of 32 bits.
//
// A command (en, we, addr) is taken at a clock edge E. Write data must be
// presented in the cycle that ends at edge E+2 and is written then; read
// data appears after edge E+2 and stays until the next read completes. As
// every command has the same two-cycle data offset, reads and writes may
// follow each other in any order with no idle cycle, which is what makes
// this memory type attractive here. A read issued one cycle after a write
// to the same address returns the new data.
//
// Size and memory type are the document's; it gives no timing, so the
// two-cycle pipelined behaviour of a common pipelined ZBT part is this
// design's choice. Written as an array so that it simulates and synthesizes
// as a memory; on the board it is a separate chip.
module zbt_ram #(
  parameter int unsigned WORDS = 262144,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [WIDTH-1:0] mem [WORDS];

  logic          p1_en, p1_we, p2_en, p2_we;
  logic [AW-1:0] p1_addr, p2_addr;
  logic [WIDTH-1:0] rd_s1;
  logic          bypass;
  logic             bypass_q;
  logic [WIDTH-1:0] wdata_q;

  // read issued at E+1 while the write issued at E lands at E+2
  assign bypass = p2_en && p2_we && p1_en && !p1_we && (p1_addr == p2_addr);

  always_ff @(posedge clk) begin
    p1_en   <= en;
    p1_we   <= we;
    p1_addr <= addr;
    p2_en   <= p1_en;
    p2_we   <= p1_we;
    p2_addr <= p1_addr;
    if (p1_en && !p1_we) rd_s1 <= mem[p1_addr];
    if (p2_en && p2_we)  mem[p2_addr] <= wdata;
    if (p2_en && !p2_we) rdata <= bypass_q ? wdata_q : rd_s1;
  end

  // forwarding for the read-after-write case above
  always_ff @(posedge clk) begin
    bypass_q <= bypass;
    wdata_q  <= wdata;
  end
endmodule
