// nc_sram_sp: single-port SRAM of a paging memory unit, 1K x 16b (2KB) by
// default, as in the architecture. One access per cycle: a write stores
// wdata at addr; a read returns the word on rdata in the next cycle (rdata
// holds its value otherwise). Written as an array in place of the foundry
// macro; contents are not reset.
module nc_sram_sp #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned DW    = 16
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [DW-1:0]            wdata,
  output logic [DW-1:0]            rdata
);
  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
