// Shared types and constants of the four-core chip multiprocessor with a
// private two-level cache per core.
//
// The 8-bit word address, the 32-bit data path, the four cores, the MESI block
// states and the 3-bit bus command codes follow the design description; the
// cache depths and the numeric encoding of the MESI states are this design's
// own choices. One cache block holds one 32-bit word.
package cmp_pkg;

  parameter int unsigned ADDR_W     = 8;   // word address width
  parameter int unsigned DATA_W     = 32;  // word / bus data width
  parameter int unsigned N_CPU      = 4;   // processors on the chip
  parameter int unsigned L1_BLOCKS  = 16;  // L1 depth (own choice)
  parameter int unsigned L2_BLOCKS  = 64;  // L2 depth (own choice)

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // MESI block state, stored next to every tag.
  typedef enum logic [1:0] {
    ST_I = 2'd0,
    ST_S = 2'd1,
    ST_E = 2'd2,
    ST_M = 2'd3
  } mesi_t;

  // Commands an L2 puts on the snoopy bus.
  typedef enum logic [2:0] {
    CMD_RELEASE    = 3'b000,  // release the bus / bus idle
    CMD_RD_SHARED  = 3'b001,  // read for shared
    CMD_RD_EXCL    = 3'b010,  // read for exclusive
    CMD_INVALIDATE = 3'b011,  // invalidate other cache copies
    CMD_WRITEBACK  = 3'b111   // write a dirty block back to main memory
  } bus_cmd_t;

  // L1 controller -> L2 controller.
  typedef struct packed {
    logic  data_req;      // DataReq: L1 miss, fetch req_addr
    logic  data_req_wr;   // the miss is for a processor write (needs E or M)
    logic  writethrough;  // Writethrough: write wt_data to req_addr this clock
    addr_t req_addr;      // Request Address (DataReq and Writethrough)
    data_t wt_data;       // write data, straight from the processor data bus
    logic  aknow;         // Aknow: L1 took the requested block this clock
    logic  end_incl;      // EndInclusion: incl_addr leaves L1
    addr_t incl_addr;     // Inclusion address
  } l1_to_l2_t;

  // L2 controller -> L1 controller.
  typedef struct packed {
    logic  data_rdy;      // DataRdy: req_data / new_state answer DataReq
    data_t req_data;      // requested data on the intermediate data bus
    mesi_t new_state;     // Newstate: state for the fill or for a state change
    logic  state_change;  // StateChange: set the L1 copy of state_ch_addr
    addr_t state_ch_addr; // StateChAdd
  } l2_to_l1_t;

  // One L2 controller -> bus side.
  typedef struct packed {
    logic     bus_req;    // BusReq
    bus_cmd_t cmd;        // Cmd, valid while this cache owns the bus
    addr_t    addr;       // Address, valid with cmd
    data_t    wdata;      // write-back data, valid with CMD_WRITEBACK
    logic     data_avail; // DataAvailable: snooped block held clean (S or E)
    logic     wb_request; // WBRequest: snooped block held dirty (M)
    data_t    snoop_data; // data this cache would supply on StrSend
  } l2_bus_out_t;

endpackage
