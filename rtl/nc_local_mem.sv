// nc_local_mem: local memory unit, an 81-byte register file organised as
// 9 rows x 72b, as in the architecture. It holds 81 signed 8b coefficients
// (a 9x9 kernel); coefficient i is byte i%9 of row i/9. All rows are
// broadcast to every PE at once, so any number of PEs can read their
// coefficient in the same cycle. One coefficient is written per cycle
// (we/widx/wdata, visible on rows from the next cycle). Reset clears it.
// The byte layout is this design's choice.
module nc_local_mem #(
  parameter int unsigned ROWS  = 9,
  parameter int unsigned ROW_W = 72
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [6:0]                widx,
  input  logic [7:0]                wdata,
  output logic [ROWS-1:0][ROW_W-1:0] rows
);
  localparam int unsigned BPR = ROW_W / 8;  // bytes per row

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rows <= '0;
    end else if (we && int'(widx) < int'(ROWS * BPR)) begin
      rows[int'(widx) / int'(BPR)][(int'(widx) % int'(BPR)) * 8 +: 8] <= wdata;
    end
  end

endmodule
