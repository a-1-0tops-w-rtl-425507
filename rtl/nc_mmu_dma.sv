// nc_mmu_dma: memory management unit, TLB and DMA of an NC core.
//
// The TLB has one entry per paging memory unit (9): entry e says which
// virtual page (16 bits of the 26-bit private address above the 10-bit word
// offset) paging memory unit e+1 holds, and whether a PE has written it
// (dirty). The dispatcher looks it up itself on tlb_valid/tlb_vpn. On
// miss_req the MMU picks a victim entry (the first invalid one, else round
// robin), waits until that unit's PE is idle, and the DMA
//   1. writes the old page back if it is valid and dirty, and
//   2. reads the new page,
// over a 64b request/acknowledge bus: the master holds bus_req with bus_we,
// bus_addr and bus_wdata until bus_ack; on a read bus_rdata is valid with
// bus_ack. A beat carries 4 16b words, word k in bits 16k+15:16k; bus_addr is
// the 32-bit word address {core, private address} of the beat's first word.
// Each beat costs the bus wait plus 4 SRAM cycles, so a page takes
// 256 x (4 + bus latency) cycles each way. busy is high while a miss is
// handled. Page-per-unit mapping, the victim rule and the bus protocol are
// this design's choices.
module nc_mmu_dma
  import nc_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  caddr_t                      core_addr,
  input  logic                        miss_req,
  input  logic [VPN_W-1:0]            miss_vpn,
  output logic                        busy,
  output logic [N_PMU-1:0]            tlb_valid,
  output logic [N_PMU-1:0][VPN_W-1:0] tlb_vpn,
  input  logic [N_PMU-1:0]            pmu_written,   // a PE wrote unit e+1
  input  logic [N_PMU-1:0]            pmu_pe_busy,
  // DMA access to one paging memory unit
  output logic                        dma_active,
  output logic [3:0]                  dma_sel,       // entry 0..8
  output logic                        dma_en,
  output logic                        dma_we,
  output logic [PAGE_AW-1:0]          dma_addr,
  output logic [15:0]                 dma_wdata,
  input  logic [15:0]                 dma_rdata,
  // external memory bus
  output logic                        bus_req,
  output logic                        bus_we,
  output logic [31:0]                 bus_addr,
  output logic [63:0]                 bus_wdata,
  input  logic                        bus_ack,
  input  logic [63:0]                 bus_rdata,
  output logic [15:0]                 n_miss
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_WB_RD, S_WB_BUS, S_FL_BUS, S_FL_WR} state_e;
  state_e state;

  logic [N_PMU-1:0]   dirty;
  logic [3:0]         victim, rr;
  logic [VPN_W-1:0]   new_vpn;
  logic [7:0]         beat;
  logic [2:0]         k;
  logic [3:0][15:0]   buf_q;

  assign busy       = (state != S_IDLE);
  assign dma_active = (state inside {S_WB_RD, S_WB_BUS, S_FL_BUS, S_FL_WR});
  assign dma_sel    = victim;

  always_comb begin
    dma_en    = 1'b0;
    dma_we    = 1'b0;
    dma_addr  = {beat, k[1:0]};
    dma_wdata = buf_q[k[1:0]];
    bus_req   = 1'b0;
    bus_we    = 1'b0;
    bus_addr  = {core_addr, (state == S_WB_BUS) ? tlb_vpn[victim] : new_vpn, beat, 2'b00};
    bus_wdata = buf_q;
    unique case (state)
      S_WB_RD:  dma_en = (k < 3'd4);
      S_WB_BUS: begin bus_req = 1'b1; bus_we = 1'b1; end
      S_FL_BUS: bus_req = 1'b1;
      S_FL_WR:  begin dma_en = 1'b1; dma_we = 1'b1; end
      default: ;
    endcase
  end

  logic [3:0] pick;
  always_comb begin
    pick = rr;
    for (int e = int'(N_PMU) - 1; e >= 0; e--) if (!tlb_valid[e]) pick = 4'(e);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      tlb_valid <= '0;
      dirty     <= '0;
      rr        <= '0;
      victim    <= '0;
      beat      <= '0;
      k         <= '0;
      n_miss    <= '0;
    end else begin
      dirty <= dirty | pmu_written;
      unique case (state)
        S_IDLE: if (miss_req) begin
          victim  <= pick;
          new_vpn <= miss_vpn;
          rr      <= (rr == 4'(N_PMU - 1)) ? '0 : rr + 1'b1;
          n_miss  <= n_miss + 1'b1;
          state   <= S_WAIT;
        end
        S_WAIT: if (!pmu_pe_busy[victim]) begin
          beat  <= '0;
          k     <= '0;
          state <= (tlb_valid[victim] && dirty[victim]) ? S_WB_RD : S_FL_BUS;
          tlb_valid[victim] <= tlb_valid[victim] && dirty[victim];
        end
        S_WB_RD: begin   // read 4 words, each arrives one cycle later
          if (k != 0) buf_q[k[1:0] - 2'd1] <= dma_rdata;
          if (k == 3'd4) begin
            k     <= '0;
            state <= S_WB_BUS;
          end else k <= k + 1'b1;
        end
        S_WB_BUS: if (bus_ack) begin
          if (beat == 8'hff) begin
            beat  <= '0;
            state <= S_FL_BUS;
            tlb_valid[victim] <= 1'b0;
          end else begin
            beat  <= beat + 1'b1;
            state <= S_WB_RD;
          end
        end
        S_FL_BUS: if (bus_ack) begin
          buf_q <= bus_rdata;
          k     <= '0;
          state <= S_FL_WR;
        end
        S_FL_WR: begin
          if (k == 3'd3) begin
            k <= '0;
            if (beat == 8'hff) begin
              tlb_valid[victim] <= 1'b1;
              tlb_vpn[victim]   <= new_vpn;
              dirty[victim]     <= 1'b0;
              state             <= S_IDLE;
            end else begin
              beat  <= beat + 1'b1;
              state <= S_FL_BUS;
            end
          end else k <= k + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
