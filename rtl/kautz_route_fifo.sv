// kautz_route_fifo: the port-shared routing FIFO of a Kautz router. The four
// router inputs (local injection and three links) write into one queue and
// the three routing units read the three oldest entries.
//
// Up to NWR writes and NRD reads per cycle. Writes are granted to the
// requesting inputs in order, starting from a priority pointer that rotates
// by one every cycle, until the free space (taken before this cycle's reads)
// runs out; granted entries are stored in grant order. Reads pop rd_count
// entries from the head (rd_count must not exceed the valid entries).
// Width, depth and port counts follow the architecture (84b, 8 deep,
// 4 in / 3 out); the grant policy is this design's.
module kautz_route_fifo #(
  parameter int unsigned W     = 84,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NWR   = 4,
  parameter int unsigned NRD   = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NWR-1:0]           wr_valid,
  input  logic [NWR-1:0][W-1:0]    wr_data,
  output logic [NWR-1:0]           wr_ready,
  output logic [NRD-1:0]           rd_valid,
  output logic [NRD-1:0][W-1:0]    rd_data,
  input  logic [$clog2(NRD+1)-1:0] rd_count,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]    mem [DEPTH];
  logic [AW-1:0]   head;
  logic [$clog2(NWR)-1:0] prio;
  logic [$clog2(DEPTH+1)-1:0] nwr;

  always_comb begin
    int free;
    int idx;
    free = int'(DEPTH) - int'(count);
    wr_ready = '0;
    nwr = '0;
    for (int k = 0; k < int'(NWR); k++) begin
      idx = (int'(prio) + k) % int'(NWR);
      if (wr_valid[idx] && int'(nwr) < free) begin
        wr_ready[idx] = 1'b1;
        nwr = nwr + 1'b1;
      end
    end
    for (int r = 0; r < int'(NRD); r++) begin
      rd_valid[r] = (r < int'(count));
      rd_data[r]  = mem[AW'((int'(head) + r) % int'(DEPTH))];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      count <= '0;
      prio  <= '0;
    end else begin
      head  <= AW'((int'(head) + int'(rd_count)) % int'(DEPTH));
      count <= count + nwr - ($clog2(DEPTH+1))'(rd_count);
      prio  <= ($clog2(NWR))'((int'(prio) + 1) % int'(NWR));
    end
  end

  // storage, written in grant order behind the current tail
  always_ff @(posedge clk) begin
    int n, idx;
    n = 0;
    for (int k = 0; k < int'(NWR); k++) begin
      idx = (int'(prio) + k) % int'(NWR);
      if (wr_ready[idx]) begin
        mem[AW'((int'(head) + int'(count) + n) % int'(DEPTH))] <= wr_data[idx];
        n++;
      end
    end
  end

  rd_le_count: assert property (@(posedge clk) disable iff (!rst_n)
    int'(rd_count) <= int'(count));

endmodule
