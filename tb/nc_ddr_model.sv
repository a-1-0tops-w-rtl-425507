// nc_ddr_model: behavioural model of the off-chip DRAM on one 64b system
// bus, for testbenches only. A request held on req is acknowledged after
// 1..MAXLAT cycles; a write stores the beat, a read returns it. A beat that
// was never written reads as init_word() of its four word addresses, so a
// test can predict page contents. Counts reads and writes.
// Interface: req/we/addr/wdata are held until ack, which is high for one
// cycle, with rdata valid in that cycle; addr counts 64b beats. The DRAM is
// off chip in the architecture; this is a behavioural stand-in whose
// latency and initial contents are this design's choices.
module nc_ddr_model #(
  parameter int MAXLAT = 3
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [63:0] wdata,
  output logic        ack,
  output logic [63:0] rdata,
  output int          n_rd,
  output int          n_wr
);
  logic [63:0] mem [logic [31:0]];
  int wait_c = 0;

  function automatic logic [15:0] init_word(logic [31:0] a);
    return a[15:0] ^ {a[31:26], a[25:16]} ^ 16'h5a5a;
  endfunction

  function automatic logic [63:0] peek(logic [31:0] a);   // beat address
    if (mem.exists(a)) return mem[a];
    return {init_word(a + 3), init_word(a + 2), init_word(a + 1), init_word(a)};
  endfunction

  initial begin ack = 0; rdata = '0; n_rd = 0; n_wr = 0; end

  always @(posedge clk) begin
    ack <= 1'b0;
    if (req && !ack) begin
      if (wait_c == 0) wait_c = $urandom_range(1, MAXLAT);
      wait_c--;
      if (wait_c == 0) begin
        ack <= 1'b1;
        if (we) begin mem[addr] = wdata; n_wr++; end
        else begin rdata <= peek(addr); n_rd++; end
      end
    end
  end
endmodule
