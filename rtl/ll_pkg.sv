// ll_pkg: types and constants shared by the logic-layer communication platform.
//
// The platform is a 2D mesh network-on-chip on the logic layer of a 3D memory-on-processor
// stack. Every node holds a processor port, a network interface (NI), a 5-port router and an
// adaptive memory controller for the DRAM rank stacked above it. This package defines the
// flit and header layout, the simplified AXI channel payloads used between processor, NI and
// memory controller, the DRAM command set and the address map.
//
// Taken from the design description: 4x4 mesh, 32-bit flits, 2 virtual channels per port
// (one for requests, one for responses), 5 flits per VC buffer, 4-bit transaction ID (T-ID),
// 3-bit sequence number (S-N), bursts of 1 to 8 words, 16 x 256 MB = 4 GB of stacked memory,
// 4 banks per rank, queues of 8 x 32 bits, 1.2 GHz and the true-3D timings of 8.1 ns
// (tRCD, tCAS, tWR, tRP) and 24.3 ns (tRAS), rounded up to whole 1.2 GHz cycles.
// Own choices: the bit layout of the header flit, the address map (node in the top four
// address bits, then row, bank, column), the 8192 x 2048 row/column split of a bank, the mesh
// orientation (north = y-1) and the single-data-rate DRAM command interface.
package ll_pkg;

  // ---------------- network ----------------
  parameter int MESH_X    = 4;
  parameter int MESH_Y    = 4;
  parameter int NUM_NODES = MESH_X * MESH_Y;
  parameter int FLIT_W    = 32;
  parameter int NUM_VC    = 2;   // VC 0: requests, VC 1: responses
  parameter int VC_DEPTH  = 5;   // flits per VC buffer
  parameter int NUM_PORTS = 5;
  parameter int COORD_W   = 2;

  parameter int TID_W   = 4;     // AXI transaction ID (T-ID)
  parameter int SN_W    = 3;     // sequence number (S-N)
  parameter int LEN_W   = 3;     // burst length - 1 (1..8 beats)
  parameter int ADDR_W  = 32;
  parameter int DATA_W  = 32;
  parameter int QUEUE_DEPTH = 8; // every NI / memory-controller queue holds 8 x 32 bits
  parameter int MAX_OUTSTANDING = 6; // reorder buffer: 48 words = 6 requests x 8 beats

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Layout of the head flit of every packet (32 bits).
  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic               resp;   // 0 request, 1 response
    logic               write;  // 0 read,    1 write
    logic [TID_W-1:0]   tid;
    logic [SN_W-1:0]    sn;
    logic [LEN_W-1:0]   len;    // beats - 1
    logic [1:0]         bresp;
    logic [9:0]         rsvd;
  } head_t;

  // ---------------- AXI (processor side) ----------------
  typedef struct packed {
    logic [TID_W-1:0]  id;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } axi_ax_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              last;
  } axi_w_t;

  typedef struct packed {
    logic [TID_W-1:0]  id;
    logic [DATA_W-1:0] data;
    logic              last;
  } axi_r_t;

  typedef struct packed {
    logic [TID_W-1:0] id;
    logic [1:0]       resp;
  } axi_b_t;

  // ---------------- AXI (memory side) ----------------
  // The NI tags each request it hands to the memory controller with everything needed to
  // send the response back; the memory controller returns the tag unchanged.
  typedef struct packed {
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [TID_W-1:0]   tid;
    logic [SN_W-1:0]    sn;
    logic [LEN_W-1:0]   len;
  } mid_t;

  typedef struct packed {
    mid_t              id;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } mc_ax_t;

  typedef struct packed {
    mid_t              id;
    logic [DATA_W-1:0] data;
    logic              last;
  } mc_r_t;

  typedef struct packed {
    mid_t       id;
    logic [1:0] resp;
  } mc_b_t;

  // ---------------- DRAM ----------------
  parameter int NUM_BANKS = 4;
  parameter int BANK_W    = 2;
  parameter int ROW_W     = 13;
  parameter int COL_W     = 11;
  parameter int DADDR_W   = 13;   // multiplexed row / column address pins

  // Timings in 1.2 GHz cycles (true 3D DRAM: 8.1 ns and 24.3 ns).
  parameter int T_RCD = 10;
  parameter int T_CAS = 10;
  parameter int T_WR  = 10;
  parameter int T_RP  = 10;
  parameter int T_RAS = 30;

  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_ACT = 3'd1,
    CMD_RD  = 3'd2,
    CMD_WR  = 3'd3,
    CMD_PRE = 3'd4
  } dram_cmd_e;

  typedef struct packed {
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
  } dram_loc_t;

  // Address map: [31:28] node (y, x), [27:15] row, [14:13] bank, [12:2] column, [1:0] byte.
  function automatic dram_loc_t map_addr(logic [ADDR_W-1:0] a);
    dram_loc_t l;
    l.row  = a[27:15];
    l.bank = a[14:13];
    l.col  = a[12:2];
    return l;
  endfunction

  function automatic logic [COORD_W-1:0] addr_node_x(logic [ADDR_W-1:0] a);
    return a[29:28];
  endfunction

  function automatic logic [COORD_W-1:0] addr_node_y(logic [ADDR_W-1:0] a);
    return a[31:30];
  endfunction

endpackage
