// Shared types and constants of the ScalableCore emulation of an M-Core
// many-core node.
//
// The target is a 2D mesh of nodes (core, router, DMA controller, local
// memory).  Each node is emulated by one ScalableCore Unit.  This package
// holds what more than one module needs: mesh coordinates, router port
// numbering, the flit format of the on-chip network, the bundle of
// target-world signals that crosses a unit boundary each simulated cycle,
// the memory request format of the four node-memory ports and the
// memory-mapped register map of a node.
//
// Followed from the design description: 5 router ports (local, N, E, S, W),
// 2 virtual channels, 32-bit node memory of 512 KB, 4 memory ports.
// Own choices: the flit layout, the packet header layout, the address map.
package sc_pkg;

  // ---------------------------------------------------------------- mesh
  localparam int unsigned XW = 4;           // x coordinate width (mesh up to 16 wide)
  localparam int unsigned YW = 4;           // y coordinate width
  localparam int unsigned NPORT = 5;        // router ports
  localparam int unsigned NDIR  = 4;        // neighbour directions
  localparam int unsigned VCW   = 2;        // width of the VC field in a flit (up to 4 VCs)

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // towards y-1
    P_EAST  = 3'd2,   // towards x+1
    P_SOUTH = 3'd3,   // towards y+1
    P_WEST  = 3'd4    // towards x-1
  } port_e;

  // direction index d (0..3) of a serial link equals router port d+1
  localparam int unsigned D_NORTH = 0;
  localparam int unsigned D_EAST  = 1;
  localparam int unsigned D_SOUTH = 2;
  localparam int unsigned D_WEST  = 3;

  // ---------------------------------------------------------------- flits
  typedef struct packed {
    logic [VCW-1:0] vc;
    logic           head;
    logic           tail;
    logic [31:0]    data;
  } flit_t;

  // Head flit payload: destination, source, command and payload length.
  typedef enum logic [1:0] {
    CMD_PUT = 2'd0,    // payload words are written at the destination
    CMD_GET = 2'd1     // destination answers with a PUT of its own memory
  } cmd_e;

  typedef struct packed {
    logic [XW-1:0] dst_x;
    logic [YW-1:0] dst_y;
    logic [XW-1:0] src_x;
    logic [YW-1:0] src_y;
    cmd_e          cmd;
    logic [13:0]   len;       // number of data words
  } head_t;

  // Target-world signals of one router port that cross to a neighbour unit
  // every simulated cycle: the flit on the link and the credits returned for
  // the neighbour's traffic into this node.
  typedef struct packed {
    logic            valid;
    flit_t           flit;
    logic [3:0]      credit;   // one bit per VC (up to 4)
  } link_t;

  localparam int unsigned LINK_W = $bits(link_t);

  // ---------------------------------------------------------------- memory
  localparam int unsigned MEM_AW = 17;       // word address: 512 KB / 4 B
  localparam int unsigned NMPORT = 4;        // fetch, load/store, DMA read, DMA write
  localparam int unsigned MP_FETCH = 0;
  localparam int unsigned MP_LS    = 1;
  localparam int unsigned MP_DMARD = 2;
  localparam int unsigned MP_DMAWR = 3;

  typedef struct packed {
    logic              re;
    logic              we;
    logic [MEM_AW-1:0] addr;
    logic [31:0]       wdata;
  } mreq_t;

  // Memory-mapped registers: byte address 0x0008_0000 and up (just above the
  // 512 KB node memory).  Word offsets within that window:
  localparam logic [31:0] MMIO_BASE   = 32'h0008_0000;
  localparam int unsigned R_DMA_DST   = 0;   // {dst_x, dst_y} in bits [7:0]
  localparam int unsigned R_DMA_LADDR = 1;   // local word address
  localparam int unsigned R_DMA_RADDR = 2;   // remote word address
  localparam int unsigned R_DMA_LEN   = 3;   // words
  localparam int unsigned R_DMA_CTRL  = 4;   // write: 1 = PUT, 2 = GET; read: busy
  localparam int unsigned R_DMA_RCNT  = 5;   // words received; write clears
  localparam int unsigned R_NODE_ID   = 6;   // read: {x, y}
  localparam int unsigned R_RESULT    = 7;   // write: result word to the host
  localparam int unsigned R_HALT      = 8;   // write: stop the core

endpackage
