// buf_arbiter: shares the ZBT buffer memory between the S-link write stream
// and the SHARC.
//
// The memory runs at twice the SHARC clock (80 MHz). Cycles alternate
// between two fixed slots, shown on slot: slot 0 belongs to the S-link
// FIFO, slot 1 to the SHARC, so each side gets one access every 25 ns. In
// slot 0 a request on sl_req writes sl_data at sl_addr; in slot 1 a SHARC
// request is granted at once (sh_gnt). The address and command go to the
// memory in the grant cycle; the write data follows two cycles later through
// a two-stage register; read data for the SHARC comes back on sh_rdata with
// sh_rvalid three cycles after the grant. The address and data multiplexers
// are the two muxes of the board's block scheme.
//
// From the document: the two multiplexers, the 80 MHz memory clock and one
// access for each side every 25 ns. The fixed slot order and the pipeline
// offsets (from the memory model) are this design's choices.
module buf_arbiter #(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          slot,
  // S-link write port, used in slot 0 only
  input  logic          sl_req,
  input  logic [AW-1:0] sl_addr,
  input  logic [31:0]   sl_data,
  // SHARC port, served in slot 1
  input  logic          sh_req,
  input  logic          sh_we,
  input  logic [AW-1:0] sh_addr,
  input  logic [31:0]   sh_wdata,
  output logic          sh_gnt,
  output logic          sh_rvalid,
  output logic [31:0]   sh_rdata,
  // ZBT memory
  output logic          z_en,
  output logic          z_we,
  output logic [AW-1:0] z_addr,
  output logic [31:0]   z_wdata,
  input  logic [31:0]   z_rdata
);
  logic        sl_go;
  logic [31:0] wd1, wd2;
  logic [2:0]  rv;

  assign sl_go  = (slot == 1'b0) && sl_req;
  assign sh_gnt = (slot == 1'b1) && sh_req;

  always_comb begin
    z_en   = 1'b0;
    z_we   = 1'b0;
    z_addr = sl_addr;
    if (sl_go) begin
      z_en   = 1'b1;
      z_we   = 1'b1;
      z_addr = sl_addr;
    end else if (sh_gnt) begin
      z_en   = 1'b1;
      z_we   = sh_we;
      z_addr = sh_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= 1'b0;
      wd1  <= '0;
      wd2  <= '0;
      rv   <= '0;
    end else begin
      slot <= ~slot;
      wd1  <= sl_go ? sl_data : sh_wdata;
      wd2  <= wd1;
      rv   <= {rv[1:0], sh_gnt && !sh_we};
    end
  end

  assign z_wdata   = wd2;
  assign sh_rvalid = rv[2];
  assign sh_rdata  = z_rdata;

  a_slink_in_slot0: assert property (@(posedge clk) disable iff (!rst_n) sl_req |-> slot == 1'b0)
    else $error("buf_arbiter: S-link request outside its slot");
endmodule
