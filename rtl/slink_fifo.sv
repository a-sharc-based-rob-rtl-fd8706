// slink_fifo: the 1k x 36 input FIFO between the S-link receiver and the FPGA.
//
// Words written by the S-link (wr_en, wr_data) are queued in an array and
// handed to the FPGA in first-word-fall-through fashion: rd_data shows the
// oldest word whenever empty is low, and rd_en removes it. full is the S-link
// "link full" back-pressure flag; a write while full is dropped and raises
// overflow for one cycle. Both sides run on the same clock.
//
// Depth and width (1k x 36) are the document's. Single-clock operation,
// first-word-fall-through reads and the overflow pulse are this design's
// choices.
module slink_fifo #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 36
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             overflow,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      cnt;

  logic do_wr, do_rd;
  assign full    = (cnt == (AW+1)'(DEPTH));
  assign empty   = (cnt == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      cnt      <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wptr <= incr(wptr);
      if (do_rd) rptr <= incr(rptr);
      case ({do_wr, do_rd})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_read_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("slink_fifo: read while empty");
endmodule
