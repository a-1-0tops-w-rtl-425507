// kautz_router: one node of the Kautz NoC.
//
// Four inputs -- In Ctrl (packets from this core's packet encoder) and three
// In Bufs (links from the three predecessor cores) -- each have a small
// buffer and all write into one port-shared routing FIFO (84b x 8, up to
// 4 writes and 3 reads per cycle). Three routing units look at the three
// oldest FIFO entries and the multicast unit at the oldest. Entries leave in
// order: each goes as soon as its output (P1..P3 towards the successor cores,
// or the local output to packet decode) is free this cycle and no older
// entry is blocked. A multicast entry leaves only from the head, cloned onto
// all three ports at once with rewritten targets. Every output is a register
// with valid/ready. Routing control keeps the two fault/congestion
// information strings (FCIS1/FCIS2), loaded from fcis_in every cycle, and
// hands them to the routing units.
//
// Latency: an input packet is buffered (1 cycle), written into the routing
// FIFO (1 cycle) and registered at the output (1 cycle): 3 cycles per hop
// when nothing waits. The structure follows the architecture; the handshake,
// buffer depths and in-order issue are this design's. The counters are for
// observation only.
module kautz_router
  import nc_pkg::*;
#(
  parameter int unsigned INBUF_DEPTH = 2,
  parameter int unsigned FIFO_DEPTH  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  caddr_t           local_addr,
  input  fcis_t [1:0]      fcis_in,
  // In Ctrl: from packet encode
  input  logic             lin_valid,
  output logic             lin_ready,
  input  pkt_t             lin_pkt,
  // links from predecessors (index j: predecessor with the j-th first digit)
  input  logic [2:0]       lnk_in_valid,
  output logic [2:0]       lnk_in_ready,
  input  pkt_t [2:0]       lnk_in_pkt,
  // links P1..P3 to successors
  output logic [2:0]       lnk_out_valid,
  input  logic [2:0]       lnk_out_ready,
  output pkt_t [2:0]       lnk_out_pkt,
  // arriving packets to packet decode
  output logic             lout_valid,
  input  logic             lout_ready,
  output pkt_t             lout_pkt,
  // statistics
  output logic [15:0]      n_mcast,
  output logic [15:0]      n_reroute,
  output logic [15:0]      n_fifo_full
);

  logic [3:0]       b_valid, b_ready;
  pkt_t [3:0]       b_pkt;
  logic [3:0]       in_v, in_r;
  pkt_t [3:0]       in_p;
  fcis_t [1:0]      fcis_q;

  assign in_v = {lnk_in_valid, lin_valid};
  assign in_p = {lnk_in_pkt, lin_pkt};
  assign {lnk_in_ready, lin_ready} = in_r;

  for (genvar i = 0; i < 4; i++) begin : g_inbuf
    nc_fifo #(.W(PKT_W), .DEPTH(INBUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid(in_v[i]), .in_ready(in_r[i]), .in_data(in_p[i]),
      .out_valid(b_valid[i]), .out_ready(b_ready[i]), .out_data(b_pkt[i]));
  end

  logic [2:0]       f_valid;
  pkt_t [2:0]       f_pkt;
  logic [1:0]       f_pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;

  kautz_route_fifo #(.W(PKT_W), .DEPTH(FIFO_DEPTH), .NWR(4), .NRD(3)) u_fifo (
    .clk, .rst_n,
    .wr_valid(b_valid), .wr_data(b_pkt), .wr_ready(b_ready),
    .rd_valid(f_valid), .rd_data(f_pkt), .rd_count(f_pop), .count(f_count));

  // routing units and multicast unit
  logic [2:0]       ru_local, ru_rer;
  logic [2:0][1:0]  ru_port;
  logic [2:0][3:0]  ru_len, ru_hops;
  logic             mu_mcast;
  caddr_t [2:0]     mu_dst;

  for (genvar r = 0; r < 3; r++) begin : g_ru
    kautz_route_unit u_ru (
      .local_addr, .dst_addr(f_pkt[r].dst[31:26]), .fcis(fcis_q),
      .is_local(ru_local[r]), .port(ru_port[r]), .rs_len(ru_len[r]),
      .rerouted(ru_rer[r]), .hops(ru_hops[r]));
  end

  kautz_mcast_unit u_mu (
    .local_addr, .dst_addr(f_pkt[0].dst[31:26]),
    .is_mcast(mu_mcast), .clone_dst(mu_dst));

  // in-order issue to the outputs
  logic [2:0] p_free, p_take;
  logic       l_free, l_take;
  pkt_t [2:0] p_next;
  pkt_t       l_next;
  logic       took_mcast;
  logic [1:0] n_rer;

  always_comb begin
    logic stop;
    p_free = ~lnk_out_valid | lnk_out_ready;
    l_free = ~lout_valid | lout_ready;
    p_take = '0; l_take = 1'b0;
    p_next = '0; l_next = '0;
    f_pop = '0; stop = 1'b0; took_mcast = 1'b0; n_rer = '0;
    for (int r = 0; r < 3; r++) begin
      if (f_valid[r] && !stop) begin
        if (r == 0 && mu_mcast) begin
          if (&p_free) begin
            p_take = 3'b111;
            for (int k = 0; k < 3; k++) begin
              p_next[k] = f_pkt[0];
              p_next[k].dst[31:26] = mu_dst[k];
            end
            took_mcast = 1'b1;
            f_pop = f_pop + 1'b1;
          end else stop = 1'b1;
        end else if (r != 0 && (f_pkt[r].dst[31:26] != local_addr) && !valid_name(f_pkt[r].dst[31:26])) begin
          stop = 1'b1;   // possible multicast: wait until it is the head
        end else if (ru_local[r]) begin
          if (l_free && !l_take) begin
            l_take = 1'b1; l_next = f_pkt[r]; f_pop = f_pop + 1'b1;
          end else stop = 1'b1;
        end else begin
          if (p_free[ru_port[r]] && !p_take[ru_port[r]]) begin
            p_take[ru_port[r]] = 1'b1; p_next[ru_port[r]] = f_pkt[r];
            f_pop = f_pop + 1'b1;
            n_rer = n_rer + 2'(ru_rer[r]);
          end else stop = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lnk_out_valid <= '0;
      lout_valid    <= 1'b0;
      fcis_q        <= '0;
      n_mcast       <= '0;
      n_reroute     <= '0;
      n_fifo_full   <= '0;
    end else begin
      fcis_q <= fcis_in;
      for (int k = 0; k < 3; k++) begin
        if (p_take[k]) begin
          lnk_out_valid[k] <= 1'b1;
          lnk_out_pkt[k]   <= p_next[k];
        end else if (lnk_out_ready[k]) begin
          lnk_out_valid[k] <= 1'b0;
        end
      end
      if (l_take) begin
        lout_valid <= 1'b1;
        lout_pkt   <= l_next;
      end else if (lout_ready) begin
        lout_valid <= 1'b0;
      end
      n_mcast   <= n_mcast + 16'(took_mcast);
      n_reroute <= n_reroute + 16'(n_rer);
      n_fifo_full <= n_fifo_full + 16'(int'(f_count) == int'(FIFO_DEPTH));
    end
  end

endmodule
