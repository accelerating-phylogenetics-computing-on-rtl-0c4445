// upgma_pkg: types and constants shared by the UPGMA processing element.
//
// The board around the processing element has two memory banks (Left and
// Right), each a 32-bit wide RAM with a 19-bit address bus. Both are driven
// through the same request bundle, mem_req_t: one read strobe, one write
// strobe, an address and write data, all sampled on the rising clock edge.
// Read data returns a fixed number of cycles later (RD_LAT in the modules).
//
// Memory layout (this design's choice):
//   Left bank  : distance matrix, D[i][j] at address {i, j} (slot indices of
//                SLOT_W bits each). Only entries with i < j are read or written.
//   Right bank : output tree. Word ROOT_ADDR holds {taxa count, root node id};
//                merge m (0..n-2) writes two words at REC_BASE + 2m:
//                {child a id, child b id} and the merge distance d_ab. The new
//                node's id is n + m and its height is d_ab / 2.
// Node ids: leaves are 0..n-1, internal nodes n..2n-2, in 16-bit fields.
//
// Host register map (LAD space SP_REG), word addresses:
//   REG_CTRL   (0): bit 0 start (write 1 to start a run), bit 1 interrupt
//                   enable, bits 24:16 number of taxa.
//   REG_STATUS (1): bit 0 busy, bit 1 done, bit 2 interrupt pending; writing 1
//                   to bit 1 or bit 2 clears it.
package upgma_pkg;

  localparam int unsigned DATA_W = 32;   // memory data word
  localparam int unsigned ADDR_W = 19;   // memory address bus

  typedef struct packed {
    logic              rd;
    logic              wr;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  localparam mem_req_t MEM_IDLE = '{rd: 1'b0, wr: 1'b0, addr: '0, wdata: '0};

  // Address spaces seen from the host side of the processing element.
  typedef enum logic [1:0] {
    SP_REG   = 2'd0,
    SP_LEFT  = 2'd1,
    SP_RIGHT = 2'd2
  } lad_space_e;

  localparam logic [ADDR_W-1:0] REG_CTRL   = 19'd0;
  localparam logic [ADDR_W-1:0] REG_STATUS = 19'd1;

  localparam int unsigned CTRL_START  = 0;
  localparam int unsigned CTRL_IRQ_EN = 1;
  localparam int unsigned CTRL_N_LSB  = 16;

  localparam int unsigned ST_BUSY = 0;
  localparam int unsigned ST_DONE = 1;
  localparam int unsigned ST_IRQ  = 2;

  localparam logic [ADDR_W-1:0] ROOT_ADDR = 19'd0;
  localparam logic [ADDR_W-1:0] REC_BASE  = 19'd2;

endpackage
