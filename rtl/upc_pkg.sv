// upc_pkg: constants and types shared by the usage parameter control (UPC) device.
//
// The device polices ATM cells on four links with the Virtual Scheduling
// Algorithm (VSA). Every connection owns one record in external memory that
// holds its theoretical arrival time TAT, its cell interval T, its tolerance
// tau, an event/configuration byte E and an all-purpose event counter.
// Link count, the 53-byte cell, the four-cell input FIFO, 64K connections per
// link, a 16-bit extracted index and the counter range of 2^41 follow the
// document; the field widths of TAT, T and tau, the layout of E and the memory
// map are this design's own choices.
package upc_pkg;

  localparam int unsigned NUM_LINKS   = 4;    // independent links
  localparam int unsigned LINK_W      = 2;    // link number width
  localparam int unsigned CELL_BYTES  = 53;   // 1 byte with cell sync + 52 following bytes
  localparam int unsigned HDR_BYTES   = 4;    // header bytes covered by the mask registers
  localparam int unsigned HDR_W       = 8 * HDR_BYTES;
  localparam int unsigned FIFO_CELLS  = 4;    // four-cell input FIFO
  localparam int unsigned EXT_W       = 16;   // extracted header bits (64K connections per link)
  localparam int unsigned TIME_W      = 32;   // width of TAT, T, tau and the time base
  localparam int unsigned CNT_W       = 41;   // per-connection counter, counts up to 2^41
  localparam int unsigned E_W         = 8;    // event/configuration byte E
  localparam int unsigned ADDR_W      = 19;   // external memory word address
  localparam int unsigned CPU_AW      = 4;    // microprocessor register index width

  // Layout of the configuration byte E (this design's own encoding).
  localparam int unsigned E_TAG      = 0;  // 1: tag non-conforming CLP=0 cells, 0: discard them
  localparam int unsigned E_CNT_PASS = 1;  // count passed cells
  localparam int unsigned E_CNT_DISC = 2;  // count discarded cells
  localparam int unsigned E_CNT_TAG  = 3;  // count tagged cells
  localparam int unsigned E_CNT_ONLY = 4;  // counter-only mode: no policing, every cell passes

  // Decision for one cell.
  typedef enum logic [1:0] {
    DEC_PASS    = 2'd0,
    DEC_TAG     = 2'd1,
    DEC_DISCARD = 2'd2
  } decision_e;

  // Connection record as stored in one external memory word.
  typedef struct packed {
    logic [CNT_W-1:0]  cnt;   // event counter
    logic [E_W-1:0]    e;     // configuration byte E
    logic [TIME_W-1:0] tau;   // cell delay variation tolerance
    logic [TIME_W-1:0] t;     // cell interval T (inverse of the peak cell rate)
    logic [TIME_W-1:0] tat;   // theoretical arrival time
  } conn_rec_t;

  localparam int unsigned MEM_W = $bits(conn_rec_t);

  // Input status event bits, one nibble per link.
  localparam int unsigned EV_EARLY   = 0;  // early cell sync
  localparam int unsigned EV_LATE    = 1;  // late cell sync
  localparam int unsigned EV_OVFL    = 2;  // FIFO overflow (FIFO full, cell discarded)
  localparam int unsigned EV_NOCLK   = 3;  // missing byte clock
  localparam int unsigned EV_PER_LINK = 4;

  // Memory map: records at {0, link, index} (direct mode, 256K) or at
  // {0, 2'b00, conn} (table lookup mode, 64K); lookup table at {1, 2'b00, link, index[13:0]}.
  function automatic logic [ADDR_W-1:0] rec_addr_direct(logic [LINK_W-1:0] link,
                                                         logic [EXT_W-1:0] idx);
    return {1'b0, link, idx};
  endfunction

  function automatic logic [ADDR_W-1:0] lut_addr(logic [LINK_W-1:0] link,
                                                  logic [EXT_W-1:0] idx);
    return {1'b1, 2'b00, link, idx[EXT_W-LINK_W-1:0]};
  endfunction

  function automatic logic [ADDR_W-1:0] rec_addr_table(logic [EXT_W-1:0] conn);
    return {1'b0, 2'b00, conn};
  endfunction

endpackage
