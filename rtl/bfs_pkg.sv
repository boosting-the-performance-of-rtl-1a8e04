// bfs_pkg: types and constants shared by the breadth-first-search engine.
//
// The engine talks to a Hybrid Memory Cube (HMC) through user ports of an
// FPGA-side HMC controller. A port request carries a command, a tag, a
// 16-byte-aligned byte address, a length of 1 to RD_FLITS 16-byte flits,
// write data and a bit mask; the response returns the tag and the data read
// (flit 0 in the low bits). Responses may come back in any order.
// HMC_BWR is the cube's atomic bit write on one flit: only the bits set in
// the mask are changed, in memory, with no read-modify-write on the FPGA.
// Access sizes follow the rule that reads should use large packets and writes
// small ones: neighbour lists and bitmap chunks are read in blocks of up to
// RD_FLITS flits (64 bytes), random bitmap reads and all bit writes use one
// 16-byte flit. The 64-byte block is this design's choice among the cube's
// 16 to 128-byte sizes. The 32-bit vertex ids and byte addresses follow the
// 4 GB cube.
package bfs_pkg;

  localparam int unsigned VID_W  = 32;   // vertex id and CSR index width
  localparam int unsigned ADDR_W = 32;   // byte address, 4 GB cube
  localparam int unsigned FLIT_W = 128;  // one 16-byte HMC flit
  localparam int unsigned FLIT_B = FLIT_W / 8;
  localparam int unsigned RD_FLITS = 4;                 // largest read, in flits
  localparam int unsigned RD_W   = FLIT_W * RD_FLITS;   // 512 bits
  localparam int unsigned RD_B   = RD_W / 8;            // 64 bytes
  localparam int unsigned LEN_W  = 3;                   // flit count field
  localparam int unsigned TAG_W  = 8;    // HMC request tag
  localparam int unsigned CTX_W  = 64;   // per-request context kept on chip

  localparam logic [VID_W-1:0] NULL_VID = '1;  // parent of the root

  typedef enum logic [1:0] {
    HMC_RD  = 2'd0,   // read 1 to RD_FLITS flits
    HMC_WR  = 2'd1,   // write 1 to RD_FLITS flits
    HMC_BWR = 2'd2    // atomic bit write: mem = (mem & ~mask) | (data & mask)
  } hmc_cmd_e;

  // request on an HMC controller user port
  typedef struct packed {
    hmc_cmd_e              cmd;
    logic [TAG_W-1:0]      tag;
    logic [ADDR_W-1:0]     addr;
    logic [LEN_W-1:0]      flits;  // 1..RD_FLITS; BWR always 1
    logic [RD_W-1:0]       data;
    logic [FLIT_W-1:0]     mask;
  } hmc_req_t;

  // response on an HMC controller user port (reads return data, writes an ack)
  typedef struct packed {
    logic [TAG_W-1:0]      tag;
    logic [RD_W-1:0]       data;
  } hmc_rsp_t;

  // request of one kernel client to its command buffer
  typedef struct packed {
    hmc_cmd_e              cmd;
    logic [ADDR_W-1:0]     addr;
    logic [LEN_W-1:0]      flits;
    logic [RD_W-1:0]       data;
    logic [FLIT_W-1:0]     mask;
    logic [CTX_W-1:0]      ctx;
  } cli_req_t;

  // response handed back to the client, with the context it gave
  typedef struct packed {
    logic [RD_W-1:0]       data;
    logic [CTX_W-1:0]      ctx;
  } cli_rsp_t;

  // where the graph and the BFS state lie in the cube (16-byte aligned)
  typedef struct packed {
    logic [ADDR_W-1:0] offsets;    // CSR row offsets, V+1 words of 32 bits
    logic [ADDR_W-1:0] edges;      // CSR neighbour ids, 32 bits each
    logic [ADDR_W-1:0] visited;    // visited bitmap, one bit per vertex
    logic [ADDR_W-1:0] frontier0;  // L2 frontier bitmap, bank 0
    logic [ADDR_W-1:0] frontier1;  // L2 frontier bitmap, bank 1
    logic [ADDR_W-1:0] record;     // per vertex 64 bits: {level, parent}
  } mem_map_t;

  // command buffer clients of one mapper/reducer kernel pair
  localparam int unsigned CLI_OFF = 0;  // mapper: CSR offset reads
  localparam int unsigned CLI_EDG = 1;  // mapper issues neighbour-list reads, reducer gets the data
  localparam int unsigned CLI_VIS = 2;  // reducer: visited bitmap reads
  localparam int unsigned CLI_WR  = 3;  // reducer: bit writes
  localparam int unsigned PE_CLIENTS = 4;

endpackage
