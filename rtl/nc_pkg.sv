// nc_pkg: types, constants and helper functions shared by the neocortical
// computing (NC) processor.
//
// Core addresses are strings of three base-4 digits S1 S2 S3 with adjacent
// digits different, packed as {S1,S2,S3} in 6 bits; the 36 such strings are
// the nodes of the Kautz graph K(3,3). A disallowed string (two equal adjacent
// digits) is a multicast group address. The 32-bit global address is the
// 6-bit core address followed by a 26-bit private address.
//
// The NoC packet is 84 bits, the width of the router's shared FIFO. Its field
// layout, the opcode set and the instruction struct are this design's own: the
// width, the 32-bit target address and the 16-bit datum follow the
// architecture; everything else was chosen to carry the matching/pooling
// operations (multiply-accumulate, maximum, accumulate, L1/L2 distance) and
// the "fire" of a result to the next stage.
package nc_pkg;

  localparam int unsigned PKT_W   = 84;
  localparam int unsigned DW      = 16;  // datum width
  localparam int unsigned CW      = 8;   // coefficient width
  localparam int unsigned N_CORES = 36;
  localparam int unsigned N_PMU   = 9;   // paging memory units per core
  localparam int unsigned N_PE    = 10;  // PE0 (local memory) + PE1..9
  localparam int unsigned N_COEF  = 81;  // 9 rows x 9 bytes
  localparam int unsigned PAGE_AW = 10;  // 1K words per page
  localparam int unsigned VPN_W   = 16;  // 26-bit private address - 10

  typedef logic [5:0] caddr_t;   // {S1,S2,S3}

  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_WR    = 4'd1,   // y = x
    OP_ACC   = 4'd2,   // y = y + x           (average pooling sums)
    OP_MAC   = 4'd3,   // y = y + x*w         (convolution / linear kernel)
    OP_MAX   = 4'd4,   // y = max(y, x)       (max pooling)
    OP_L1    = 4'd5,   // y = y + |x - w|     (L1 distance)
    OP_L2    = 4'd6,   // y = y + (x - w)^2   (L2 distance)
    OP_WCOEF = 4'd7,   // coef[idx] = x[7:0]  (local memory unit, PE0)
    OP_RD    = 4'd8,   // fire y unchanged
    OP_HOST  = 4'd15   // result for the host, leaves through the system bus
  } op_e;

  typedef struct packed {
    logic [31:0]   dst;        // {core 6b, private 26b}
    logic [15:0]   datum;
    op_e           op;
    logic          simd;
    logic [3:0]    lanes;      // SIMD lanes 1..9
    logic [6:0]    coef;       // coefficient index of lane 0
    logic          fire;       // send the result on
    caddr_t        fire_core;  // core (or group) the result is fired to
    op_e           fire_op;
    logic [6:0]    fire_coef;
    logic [1:0]    rsvd;
  } pkt_t;  // 84 bits

  typedef struct packed {
    op_e           op;
    logic          simd;
    logic [3:0]    lanes;
    logic [VPN_W-1:0] vpn;
    logic [PAGE_AW-1:0] off;
    logic [15:0]   x;
    logic [6:0]    coef;
    logic          fire;
    caddr_t        fire_core;
    op_e           fire_op;
    logic [6:0]    fire_coef;
  } inst_t;

  // Fault / congestion information string: a core (3 digits) or a link
  // abc->bcd written as the 4 digits abcd.
  typedef struct packed {
    logic       valid;
    logic       is_link;
    logic [7:0] s;   // digits s[7:6], s[5:4], s[3:2], s[1:0]; a core uses s[7:2]
  } fcis_t;

  function automatic logic [1:0] digit(caddr_t a, int i);  // i = 0 -> S1
    return a[5-2*i -: 2];
  endfunction

  function automatic logic valid_name(caddr_t a);
    return (a[5:4] != a[3:2]) && (a[3:2] != a[1:0]);
  endfunction

  // k-th (0..2) digit different from d, ascending
  function automatic logic [1:0] nth_other(logic [1:0] d, logic [1:0] k);
    return (k < d) ? k : k + 2'd1;
  endfunction

  // rank (0..2) of digit x among the digits different from d
  function automatic logic [1:0] other_rank(logic [1:0] d, logic [1:0] x);
    return (x < d) ? x : x - 2'd1;
  endfunction

  // Core index 0..35 -> address, and back. Index = 9*S1 + 3*rank(S2) + rank(S3).
  function automatic caddr_t core_addr_of(int idx);
    logic [1:0] s1, s2, s3;
    s1 = 2'(idx / 9);
    s2 = nth_other(s1, 2'((idx % 9) / 3));
    s3 = nth_other(s2, 2'(idx % 3));
    return {s1, s2, s3};
  endfunction

  function automatic int core_index(caddr_t a);
    return 9 * int'(a[5:4]) + 3 * int'(other_rank(a[5:4], a[3:2]))
           + int'(other_rank(a[3:2], a[1:0]));
  endfunction

endpackage
