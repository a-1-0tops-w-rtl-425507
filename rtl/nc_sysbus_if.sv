// nc_sysbus_if: 64-bit system bus interface of the NC processor.
//
// Three jobs:
//  * Packet injection: the host writes a packet as two 64b beats on
//    host_in_* (beat 0 = packet bits 63:0, beat 1 = bits 83:64 in its low
//    20 bits). The assembled packet is injected into the NoC through the
//    attached core's packet encoder (inj_*), which wakes the target cores.
//  * Result return: HOST packets that reach the attached core come out as
//    two beats on host_out_* in the same format.
//  * Memory pages: the DMA requests of N_MASTERS cores are arbitrated round
//    robin onto the external 64b memory bus (ext_*). A granted request is
//    passed through unchanged until ext_ack, which is returned to that core
//    with ext_rdata; the next grant starts after the acknowledge.
// Two interfaces serve the chip, each for two core groups. The beat format,
// arbitration and the split of cores between the two buses are this
// design's choices.
module nc_sysbus_if
  import nc_pkg::*;
#(
  parameter int unsigned N_MASTERS = 18
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host -> NoC
  input  logic                         host_in_valid,
  output logic                         host_in_ready,
  input  logic [63:0]                  host_in_data,
  output logic                         inj_valid,
  input  logic                         inj_ready,
  output pkt_t                         inj_pkt,
  // attached core -> host
  input  logic                         ret_valid,
  output logic                         ret_ready,
  input  pkt_t                         ret_pkt,
  output logic                         host_out_valid,
  input  logic                         host_out_ready,
  output logic [63:0]                  host_out_data,
  // DMA masters
  input  logic [N_MASTERS-1:0]         m_req,
  input  logic [N_MASTERS-1:0]         m_we,
  input  logic [N_MASTERS-1:0][31:0]   m_addr,
  input  logic [N_MASTERS-1:0][63:0]   m_wdata,
  output logic [N_MASTERS-1:0]         m_ack,
  output logic [63:0]                  m_rdata,
  // external memory bus
  output logic                         ext_req,
  output logic                         ext_we,
  output logic [31:0]                  ext_addr,
  output logic [63:0]                  ext_wdata,
  input  logic                         ext_ack,
  input  logic [63:0]                  ext_rdata
);
  localparam int unsigned MW = $clog2(N_MASTERS);

  // ---------------- host -> NoC ----------------
  logic        in_beat;   // 0: expecting beat 0
  logic [63:0] lo_q;

  assign host_in_ready = !inj_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_beat   <= 1'b0;
      inj_valid <= 1'b0;
    end else begin
      if (inj_valid && inj_ready) inj_valid <= 1'b0;
      if (host_in_valid && host_in_ready) begin
        if (!in_beat) begin
          lo_q    <= host_in_data;
          in_beat <= 1'b1;
        end else begin
          inj_pkt   <= {host_in_data[19:0], lo_q};
          inj_valid <= 1'b1;
          in_beat   <= 1'b0;
        end
      end
    end
  end

  // ---------------- core -> host ----------------
  logic out_beat;
  assign host_out_valid = ret_valid;
  assign host_out_data  = out_beat ? {44'd0, ret_pkt[83:64]} : ret_pkt[63:0];
  assign ret_ready      = host_out_ready && out_beat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_beat <= 1'b0;
    else if (ret_valid && host_out_ready) out_beat <= !out_beat;
  end

  // ---------------- DMA arbitration ----------------
  logic          busy;
  logic [MW-1:0] gnt, last;

  always_comb begin
    ext_req   = busy && m_req[gnt];
    ext_we    = m_we[gnt];
    ext_addr  = m_addr[gnt];
    ext_wdata = m_wdata[gnt];
    m_ack     = '0;
    if (busy) m_ack[gnt] = ext_ack;
    m_rdata   = ext_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      gnt  <= '0;
      last <= MW'(N_MASTERS - 1);
    end else if (!busy) begin
      logic found;
      found = 1'b0;
      for (int k = 1; k <= int'(N_MASTERS); k++) begin
        int idx;
        idx = (int'(last) + k) % int'(N_MASTERS);
        if (!found && m_req[idx]) begin
          found = 1'b1;
          gnt   <= MW'(idx);
        end
      end
      busy <= found;
    end else if (ext_ack) begin
      busy <= 1'b0;
      last <= gnt;
    end
  end

endmodule
