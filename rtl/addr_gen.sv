// addr_gen: buffer-memory write address generator for S-link data.
//
// Every word taken from the S-link FIFO is written at waddr, after which the
// address advances by one. At the end of the buffer it rolls over to 0, so
// fragments are stored one after the other in a ring; keeping old data from
// being overwritten is left to the SHARC software, as in the document. clr
// (software clear) puts the pointer back at 0. wraps counts the roll-overs
// (status for the software).
//
// Sequential filling with roll-over is the document's; the clear input and
// the wrap counter are this design's choices. Timing: waddr is valid in the
// same cycle as adv and changes at the following clock edge.
module addr_gen #(
  parameter int unsigned BUF_WORDS = 262144
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clr,
  input  logic                         adv,
  output logic [$clog2(BUF_WORDS)-1:0] waddr,
  output logic [15:0]                  wraps
);
  localparam int unsigned AW = $clog2(BUF_WORDS);

  logic last;
  assign last = (waddr == AW'(BUF_WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr   <= '0;
      wraps   <= '0;
    end else if (clr) begin
      waddr   <= '0;
      wraps   <= '0;
    end else begin
      if (adv) begin
        waddr <= last ? '0 : waddr + 1'b1;
        if (last) wraps <= wraps + 1'b1;
      end
    end
  end
endmodule
