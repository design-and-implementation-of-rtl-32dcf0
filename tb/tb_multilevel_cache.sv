// Test of one processor's two-level cache on a bus of its own (bus_arbiter
// and snoopy_bus for one cache, behavioural main memory with 3-clock reads).
//
// Replays the conflict case of the write-policy comparison: addresses 255
// and 127 share an L1 block; 255 is written and 127 read straight after,
// and both must read back correctly. Checks the latencies: L1 hit 1, L2 hit
// 3, main memory 6 + memory latency, write to both levels 1 clock. Checks that
// a dirty L2 block evicted by a conflict reaches main memory. Ends with
// random traffic checked against a reference memory.
module tb_multilevel_cache;
  import cmp_pkg::*;
  localparam int unsigned MEM_LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  addr_t cpu_addr; data_t cpu_wdata, cpu_rdata;
  logic cpu_read = 1'b0, cpu_write = 1'b0, inhibit;
  l2_bus_out_t to_bus;
  logic grant, str_send, cmd_receive, mdata_rdy, str_rec, owner_valid;
  logic [0:0] owner;
  bus_cmd_t bus_cmd; addr_t bus_addr; data_t bus_data;
  logic mem_read, mem_write, mem_rdy, mem_write_done;
  addr_t mem_addr; data_t mem_wdata, mem_rdata;

  multilevel_cache dut (
    .clk, .rst_n, .cpu_addr, .cpu_wdata, .cpu_read, .cpu_write, .cpu_rdata, .inhibit,
    .to_bus, .grant, .str_send, .cmd_receive, .mdata_rdy, .str_rec,
    .snoop_cmd(bus_cmd), .snoop_addr(bus_addr), .bus_data);

  bus_cmd_t c_cmd [1]; addr_t c_addr [1]; data_t c_wdat [1], c_sdat [1];
  assign c_cmd[0] = to_bus.cmd; assign c_addr[0] = to_bus.addr;
  assign c_wdat[0] = to_bus.wdata; assign c_sdat[0] = to_bus.snoop_data;

  snoopy_bus #(.N(1)) u_bus (
    .cache_cmd(c_cmd), .cache_addr(c_addr), .cache_wdata(c_wdat), .cache_sdata(c_sdat),
    .owner, .owner_valid, .str_send, .mdata_rdy, .mem_rdata, .bus_cmd, .bus_addr, .bus_data);

  bus_arbiter #(.N(1)) u_arb (
    .clk, .rst_n, .bus_req(to_bus.bus_req), .data_avail(to_bus.data_avail),
    .wb_request(to_bus.wb_request), .bus_cmd, .bus_addr, .bus_data,
    .grant, .str_send, .cmd_receive, .mdata_rdy, .str_rec, .owner, .owner_valid,
    .mem_read, .mem_write, .mem_addr, .mem_wdata, .mem_rdy, .mem_write_done);

  main_memory_model #(.READ_LAT(MEM_LAT), .WRITE_LAT(1)) u_mem (.*);

  int unsigned checks = 0, failures = 0;
  data_t gold [2**ADDR_W];
  initial for (int a = 0; a < 2**ADDR_W; a++) gold[a] = u_mem.init_word(addr_t'(a));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned lat;
  data_t rd;
  task automatic op(input bit wr, input addr_t a, input data_t d);
    @(negedge clk);
    cpu_addr = a; cpu_wdata = d; cpu_read = !wr; cpu_write = wr;
    lat = 1; #1;
    while (inhibit) begin @(negedge clk); lat++; #1; end
    rd = cpu_rdata;
    checks++;
    if (wr) gold[a] = d;
    else if (rd !== gold[a]) begin failures++; $display("FAIL read %0d got %h want %h", a, rd, gold[a]); end
    @(posedge clk); #1 cpu_read = 1'b0; cpu_write = 1'b0;
  endtask

  task automatic expect_eq(input string what, input int unsigned got, input int unsigned want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, want); end
    else $display("ok   %s: %0d", what, got);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // worst case of the comparison: write 255, then read 127 at once
    op(1, 8'd255, 32'hFFFF_0255); expect_eq("write miss to 255, clocks", lat, 6 + MEM_LAT);
    op(1, 8'd255, 32'hFFFF_1255); expect_eq("write hit to both levels, clocks", lat, 1);
    checks++;
    if (dut.u_l2.u_array.datas[63] !== 32'hFFFF_1255) begin
      failures++; $display("FAIL L2 not written in the same clock");
    end
    op(0, 8'd127, '0);            expect_eq("read miss to 127 from memory, clocks", lat, 6 + MEM_LAT);
    op(0, 8'd255, '0);
    checks++;
    if (rd !== 32'hFFFF_1255) begin failures++; $display("FAIL 255 lost its write"); end
    // 255 was dirty in L2 and evicted by 127: it must now be in main memory
    repeat (10) @(negedge clk);
    checks++;
    if (u_mem.mem[255] !== 32'hFFFF_1255) begin failures++; $display("FAIL write-back of 255"); end
    op(0, 8'd127, '0);
    op(0, 8'd4, '0);
    op(0, 8'd20, '0);             // shares the L1 block of 4, not its L2 block
    op(0, 8'd4, '0);              expect_eq("L1 miss served by L2, clocks", lat, 3);
    op(0, 8'd4, '0);              expect_eq("L1 hit, clocks", lat, 1);

    for (int n = 0; n < 3000; n++)
      op($urandom_range(0, 1) != 0,
         addr_t'($urandom_range(0, 3) * 64 + $urandom_range(0, 1) * 16 + $urandom_range(0, 3)),
         $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
