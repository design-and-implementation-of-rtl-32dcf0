// Chip multiprocessor memory system: four processor ports, each with its own
// two-level cache, sharing one snoopy bus to an off-chip main memory.
//
// Each multilevel_cache serves one processor. Their L2 caches meet on the
// snoopy_bus; the bus_arbiter grants the bus, routes cache-to-cache transfers
// and drives the main memory port. The processors and the main memory are
// outside this module: their ports are brought out.
// Processor port k: hold cpu_read[k] or cpu_write[k] with cpu_addr[k] and
// cpu_wdata[k] until a clock with inhibit[k] low; cpu_rdata[k] is valid in
// that clock. Memory port: mem_read / mem_write with mem_addr (and mem_wdata)
// are held until mem_rdy (mem_rdata valid) or mem_write_done.
// Four cores on one 32-bit bus follow the design description; the cache
// depths are parameters chosen by this design.
module cmp_top
  import cmp_pkg::*;
#(
  parameter int unsigned N        = N_CPU,
  parameter int unsigned L1_DEPTH = L1_BLOCKS,
  parameter int unsigned L2_DEPTH = L2_BLOCKS
) (
  input  logic         clk,
  input  logic         rst_n,
  // processors
  input  addr_t        cpu_addr  [N],
  input  data_t        cpu_wdata [N],
  input  logic [N-1:0] cpu_read,
  input  logic [N-1:0] cpu_write,
  output data_t        cpu_rdata [N],
  output logic [N-1:0] inhibit,
  // main memory
  output logic         mem_read,
  output logic         mem_write,
  output addr_t        mem_addr,
  output data_t        mem_wdata,
  input  data_t        mem_rdata,
  input  logic         mem_rdy,
  input  logic         mem_write_done
);
  localparam int unsigned ID_W = (N > 1) ? $clog2(N) : 1;

  l2_bus_out_t     l2_out [N];
  bus_cmd_t        c_cmd  [N];
  addr_t           c_addr [N];
  data_t           c_wdat [N];
  data_t           c_sdat [N];
  logic [N-1:0]    bus_req, data_avail, wb_request, grant, str_send;
  logic            cmd_receive, mdata_rdy, str_rec, owner_valid;
  logic [ID_W-1:0] owner;
  bus_cmd_t        bus_cmd;
  addr_t           bus_addr;
  data_t           bus_data;

  for (genvar k = 0; k < N; k++) begin : g_node
    multilevel_cache #(.L1_DEPTH(L1_DEPTH), .L2_DEPTH(L2_DEPTH)) u_cache (
      .clk, .rst_n,
      .cpu_addr(cpu_addr[k]), .cpu_wdata(cpu_wdata[k]),
      .cpu_read(cpu_read[k]), .cpu_write(cpu_write[k]),
      .cpu_rdata(cpu_rdata[k]), .inhibit(inhibit[k]),
      .to_bus(l2_out[k]), .grant(grant[k]), .str_send(str_send[k]),
      .cmd_receive, .mdata_rdy, .str_rec,
      .snoop_cmd(bus_cmd), .snoop_addr(bus_addr), .bus_data
    );
    assign bus_req[k]    = l2_out[k].bus_req;
    assign data_avail[k] = l2_out[k].data_avail;
    assign wb_request[k] = l2_out[k].wb_request;
    assign c_cmd[k]      = l2_out[k].cmd;
    assign c_addr[k]     = l2_out[k].addr;
    assign c_wdat[k]     = l2_out[k].wdata;
    assign c_sdat[k]     = l2_out[k].snoop_data;
  end

  snoopy_bus #(.N(N)) u_bus (
    .cache_cmd(c_cmd), .cache_addr(c_addr), .cache_wdata(c_wdat),
    .cache_sdata(c_sdat), .owner, .owner_valid, .str_send, .mdata_rdy,
    .mem_rdata, .bus_cmd, .bus_addr, .bus_data
  );

  bus_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .bus_req, .data_avail, .wb_request,
    .bus_cmd, .bus_addr, .bus_data,
    .grant, .str_send, .cmd_receive, .mdata_rdy, .str_rec,
    .owner, .owner_valid,
    .mem_read, .mem_write, .mem_addr, .mem_wdata, .mem_rdy, .mem_write_done
  );
endmodule
