// zoro_pkg: types and constants shared by the ZORO request scheduler.
//
// A transaction is a memory request on its way from the CPU side to the memory
// controller: its byte address, a read/write flag and an opaque tag the
// requester uses to match responses. The scheduler never changes a
// transaction; it only reorders them.
//
// The "row" of a transaction is the part of its address that names one DRAM
// row in one bank. The widths follow an 8 GB single-channel, single-rank DDR4
// memory of x8 devices (4 bank groups x 4 banks, 65536 rows, 1024 columns,
// burst of 8 on a 64-bit bus) mapped row:bank:bankgroup:column:offset from the
// most significant bit down. The memory size comes from the evaluated system;
// the geometry and mapping are this design's choice and live only in
// ADDR_W, ROW_LSB and ROW_W.
package zoro_pkg;

  // 8 GB of byte-addressed memory.
  localparam int unsigned ADDR_W  = 33;
  // Requester tag carried through unchanged.
  localparam int unsigned TAG_W   = 8;
  // 6 offset bits (64-byte burst) + 7 column bits (1024 columns / burst of 8).
  localparam int unsigned ROW_LSB = 13;
  // 2 bank-group + 2 bank + 16 row bits: one physical row in one bank.
  localparam int unsigned ROW_W   = ADDR_W - ROW_LSB;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [TAG_W-1:0]  tag_t;

  typedef struct packed {
    addr_t addr;
    logic  is_write;
    tag_t  tag;
  } txn_t;

  // Why a transaction left the scheduler.
  typedef enum logic [1:0] {
    SEND_BYPASS = 2'd0,  // new transaction in the speculated row, never buffered
    SEND_ROWHIT = 2'd1,  // buffered transaction found in the speculated row
    SEND_AGED   = 2'd2   // buffered transaction that reached max retries
  } send_kind_e;

  function automatic row_t row_of(addr_t a);
    return a[ROW_LSB +: ROW_W];
  endfunction

endpackage
