// nc_core_ctrl: event-driven control of an NC core.
//
// The core works only while there is something to do: a packet is arriving
// from the router, instructions wait in the instruction FIFO, a PE or the
// DMA is busy, or the packet encoder holds a result. clk_en is the OR of
// these events, combinational, and is the clock enable of the core's
// compute logic (in silicon it would drive the clock-gating cells of the
// inactive blocks). The router keeps running. n_wake counts the cycles in
// which the core switches on after an idle cycle; n_active counts active
// cycles. The counters are this design's, for observing the gating.
module nc_core_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pkt_arriving,
  input  logic        ififo_nonempty,
  input  logic        pe_busy,
  input  logic        dma_busy,
  input  logic        enc_busy,
  output logic        clk_en,
  output logic [31:0] n_wake,
  output logic [31:0] n_active
);
  logic was_on;

  assign clk_en = pkt_arriving | ififo_nonempty | pe_busy | dma_busy | enc_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      was_on   <= 1'b0;
      n_wake   <= '0;
      n_active <= '0;
    end else begin
      was_on <= clk_en;
      if (clk_en && !was_on) n_wake <= n_wake + 1'b1;
      if (clk_en) n_active <= n_active + 1'b1;
    end
  end

endmodule
