// The shared snoopy bus: one 32-bit data path plus command and address lines
// that every L2 watches.
//
// Command and address come from the cache that owns the bus (the arbiter says
// which). The data lines carry, in order of precedence, the word of the cache
// chosen by StrSend (cache-to-cache transfer), the word main memory returns
// with MDataRdy, or the owner's write-back word. With no owner the bus shows
// the release command 000. Purely combinational; on a chip it stands for the
// bus wiring and its drivers. The 32-bit width is the design description's,
// the multiplexer form is this design's choice.
module snoopy_bus
  import cmp_pkg::*;
#(
  parameter int unsigned N = N_CPU,
  localparam int unsigned ID_W = (N > 1) ? $clog2(N) : 1
) (
  input  bus_cmd_t        cache_cmd   [N],
  input  addr_t           cache_addr  [N],
  input  data_t           cache_wdata [N],
  input  data_t           cache_sdata [N],   // words offered to snoops
  input  logic [ID_W-1:0] owner,
  input  logic            owner_valid,
  input  logic [N-1:0]    str_send,
  input  logic            mdata_rdy,
  input  data_t           mem_rdata,
  output bus_cmd_t        bus_cmd,
  output addr_t           bus_addr,
  output data_t           bus_data
);
  always_comb begin
    bus_cmd  = owner_valid ? cache_cmd[owner] : CMD_RELEASE;
    bus_addr = cache_addr[owner];
    bus_data = cache_wdata[owner];
    if (mdata_rdy) bus_data = mem_rdata;
    for (int k = 0; k < N; k++) begin
      if (str_send[k]) bus_data = cache_sdata[k];
    end
  end
endmodule
