// The private two-level cache system of one processor: a write-through L1
// joined to a write-back, snooping L2.
//
// The L1 faces the processor (address, data, Read, Write, Inhibit); the L2
// faces the snoopy bus and the bus arbitration unit. Between them run the
// L1-to-L2 signals (DataReq, Request Address, Writethrough, EndInclusion with
// its address, Aknow) and the L2-to-L1 signals (DataRdy with the requested
// word and Newstate, StateChange with StateChAdd). Because the L1 writes
// through on the same clock, the L2 always holds the newest copy of every
// word the processor has written, so the L2 alone can answer snoops.
// The partition and the signal set follow the block diagram of the design
// description; the packing of the signals into two structs is this design's.
module multilevel_cache
  import cmp_pkg::*;
#(
  parameter int unsigned L1_DEPTH = L1_BLOCKS,
  parameter int unsigned L2_DEPTH = L2_BLOCKS
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor
  input  addr_t       cpu_addr,
  input  data_t       cpu_wdata,
  input  logic        cpu_read,
  input  logic        cpu_write,
  output data_t       cpu_rdata,
  output logic        inhibit,
  // bus and arbitration
  output l2_bus_out_t to_bus,
  input  logic        grant,
  input  logic        str_send,
  input  logic        cmd_receive,
  input  logic        mdata_rdy,
  input  logic        str_rec,
  input  bus_cmd_t    snoop_cmd,
  input  addr_t       snoop_addr,
  input  data_t       bus_data
);
  l1_to_l2_t l1_l2;
  l2_to_l1_t l2_l1;

  l1_cache #(.BLOCKS(L1_DEPTH)) u_l1 (
    .clk, .rst_n,
    .cpu_addr, .cpu_wdata, .cpu_read, .cpu_write, .cpu_rdata, .inhibit,
    .to_l2(l1_l2), .from_l2(l2_l1)
  );

  l2_cache #(.BLOCKS(L2_DEPTH)) u_l2 (
    .clk, .rst_n,
    .from_l1(l1_l2), .to_l1(l2_l1),
    .to_bus, .grant, .str_send, .cmd_receive, .mdata_rdy, .str_rec,
    .snoop_cmd, .snoop_addr, .bus_data
  );
endmodule
