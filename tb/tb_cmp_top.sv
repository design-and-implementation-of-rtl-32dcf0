// End-to-end test of the four-core cache system, at the default parameters.
//
// Phase 1 (directed): measures the miss latencies (L2 hit, cache-to-cache,
// main memory), the one-clock write to both levels, and replays the
// conflict case of two addresses (255 and 127) that share an L1 block, with
// a write to the first followed at once by a read of the second.
// Phase 2 (random): the four processors issue random reads and writes over a
// small address set that forces sharing, upgrades, invalidations, L1 and L2
// conflict misses and write-backs. Every read is compared with a reference
// memory that applies each write when it completes. At the end every
// protocol mechanism must have occurred at least once.
module tb_cmp_top;
  import cmp_pkg::*;

  localparam int unsigned N        = N_CPU;
  localparam int unsigned MEM_LAT  = 3;
  localparam int unsigned RANDOM_OPS = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  addr_t        cpu_addr  [N];
  data_t        cpu_wdata [N];
  logic [N-1:0] cpu_read, cpu_write, inhibit;
  data_t        cpu_rdata [N];
  logic         mem_read, mem_write, mem_rdy, mem_write_done;
  addr_t        mem_addr;
  data_t        mem_wdata, mem_rdata;

  cmp_top dut (.*);

  main_memory_model #(.READ_LAT(MEM_LAT), .WRITE_LAT(1)) u_mem (
    .clk, .rst_n, .mem_read, .mem_write, .mem_addr, .mem_wdata,
    .mem_rdata, .mem_rdy, .mem_write_done);

  int unsigned checks = 0, failures = 0;
  // initial memory contents, as in main_memory_model
  function automatic data_t init_word(addr_t a);
    return {8'hA5, 8'(a), 8'(~a), 8'(a ^ 8'h3C)};
  endfunction
  logic arb_in_cmd;
  assign arb_in_cmd = (int'(dut.u_arb.state_q) == 1);
  data_t gold [2**ADDR_W];
  initial for (int a = 0; a < 2**ADDR_W; a++) gold[a] = init_word(addr_t'(a));

  // ---------------- watchdog ----------------
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor drivers ----------------
  // op_kind: 0 none, 1 read, 2 write
  logic  random_on = 1'b0;
  int unsigned ops_done [N];
  int unsigned lat_q [N];       // clocks the current request has been held
  logic  done_flag [N];
  data_t last_rdata [N];
  int unsigned last_lat [N];

  function automatic addr_t rand_addr();
    // 4 L2 conflict groups x 2 L1 conflict groups x 4 indexes, plus 255/127
    if ($urandom_range(0, 15) == 0) return ($urandom_range(0, 1) != 0) ? addr_t'(255) : addr_t'(127);
    return addr_t'($urandom_range(0, 3) * 64 + $urandom_range(0, 1) * 16 + $urandom_range(0, 3));
  endfunction

  for (genvar k = 0; k < N; k++) begin : g_drv
    always @(posedge clk) begin
      if (!rst_n) begin
        cpu_read[k] <= 1'b0; cpu_write[k] <= 1'b0;
        cpu_addr[k] <= '0;   cpu_wdata[k] <= '0;
        lat_q[k] <= 0; ops_done[k] = 0; done_flag[k] <= 1'b0;
      end else begin
        done_flag[k] <= 1'b0;
        if ((cpu_read[k] || cpu_write[k]) && !inhibit[k]) begin
          // request completes at this edge
          checks++;
          if (cpu_read[k]) begin
            if (cpu_rdata[k] !== gold[cpu_addr[k]]) begin
              failures++;
              $display("FAIL t=%0d cpu%0d read %0d: got %h want %h", cycle, k,
                       cpu_addr[k], cpu_rdata[k], gold[cpu_addr[k]]);
            end
          end else begin
            gold[cpu_addr[k]] = cpu_wdata[k];
          end
          last_rdata[k] <= cpu_rdata[k];
          last_lat[k]   <= lat_q[k] + 1;
          done_flag[k]  <= 1'b1;
          ops_done[k] = ops_done[k] + 1;
          lat_q[k] <= 0;
          cpu_read[k] <= 1'b0; cpu_write[k] <= 1'b0;
          if (random_on && $urandom_range(0, 3) != 0) begin
            cpu_addr[k]  <= rand_addr();
            cpu_wdata[k] <= $urandom();
            if ($urandom_range(0, 1) != 0) cpu_write[k] <= 1'b1; else cpu_read[k] <= 1'b1;
          end
        end else if (cpu_read[k] || cpu_write[k]) begin
          lat_q[k] <= lat_q[k] + 1;
        end else if (random_on && $urandom_range(0, 2) == 0) begin
          cpu_addr[k]  <= rand_addr();
          cpu_wdata[k] <= $urandom();
          if ($urandom_range(0, 1) != 0) cpu_write[k] <= 1'b1; else cpu_read[k] <= 1'b1;
        end
      end
    end
  end

  // issue one request from the directed phase and wait for it to complete
  task automatic do_op(input int k, input bit wr, input addr_t a, input data_t d,
                       output int unsigned lat);
    @(negedge clk);
    cpu_addr[k] = a; cpu_wdata[k] = d;
    if (wr) cpu_write[k] = 1'b1; else cpu_read[k] = 1'b1;
    do @(posedge clk); while (!done_flag[k]);
    lat = last_lat[k];
  endtask

  task automatic expect_lat(input string what, input int unsigned got, input int unsigned want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s latency %0d, expected %0d", what, got, want);
    end else $display("ok   %s latency %0d clocks", what, got);
  endtask

  // ---------------- mechanism counters ----------------
  int unsigned n_l2_hit, n_c2c, n_c2c_dirty, n_mem_rd, n_inval, n_wb_cmd,
               n_wt, n_endincl, n_statechg, n_holdoff, n_wbbuf_snoop, n_abandon,
               n_rd_shared_e, n_rd_shared_s, n_rd_excl;
  always @(posedge clk) if (rst_n) begin
    if (dut.str_rec && dut.cmd_receive) n_c2c++;
    if (dut.str_rec && |(dut.str_send & dut.wb_request)) n_c2c_dirty++;
    if (dut.mdata_rdy) n_mem_rd++;
    if (dut.bus_cmd == CMD_INVALIDATE && dut.cmd_receive) n_inval++;
    if (dut.bus_cmd == CMD_WRITEBACK && arb_in_cmd) n_wb_cmd++;
    if (dut.bus_cmd == CMD_RD_SHARED && dut.mdata_rdy) n_rd_shared_e++;
    if (dut.bus_cmd == CMD_RD_SHARED && dut.str_rec) n_rd_shared_s++;
    if (dut.bus_cmd == CMD_RD_EXCL && dut.cmd_receive) n_rd_excl++;
    if (arb_in_cmd && dut.bus_cmd == CMD_RELEASE &&
        !dut.bus_req[dut.u_arb.owner_q]) n_abandon++;
  end
  for (genvar k = 0; k < N; k++) begin : g_cnt
    always @(posedge clk) if (rst_n) begin
      if (dut.g_node[k].u_cache.l2_l1.data_rdy &&
          int'(dut.g_node[k].u_cache.u_l2.state_q) == 0) n_l2_hit++;
      if (dut.g_node[k].u_cache.l1_l2.writethrough) n_wt++;
      if (dut.g_node[k].u_cache.l1_l2.end_incl) n_endincl++;
      if (dut.g_node[k].u_cache.l2_l1.state_change) n_statechg++;
      if (dut.g_node[k].u_cache.u_l1.hold_off &&
          (cpu_read[k] || cpu_write[k]) && dut.g_node[k].u_cache.u_l1.state_q == 1'b0) n_holdoff++;
      if (dut.g_node[k].u_cache.u_l2.snp_wb_hit && dut.str_send[k]) n_wbbuf_snoop++;
    end
  end

  task automatic need(input string what, input int unsigned n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end else $display("seen %-34s %0d times", what, n);
  endtask

  // ---------------- the test ----------------
  int unsigned lat;
  initial begin
    cpu_read = '0; cpu_write = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // main memory miss, then L1 hit, L2 hit after an L1 conflict
    do_op(0, 0, 8'd5,  '0, lat); expect_lat("read miss served by main memory", lat, 6 + MEM_LAT);
    do_op(0, 0, 8'd5,  '0, lat); expect_lat("L1 read hit", lat, 1);
    do_op(0, 0, 8'd21, '0, lat);            // same L1 block, other L2 block
    do_op(0, 0, 8'd5,  '0, lat); expect_lat("L1 miss served by L2", lat, 3);
    // write hit on an E block: one clock, reaches L2 in the same clock
    do_op(0, 1, 8'd5, 32'hCAFE_0005, lat); expect_lat("write hit to both levels", lat, 1);
    checks++;
    if (dut.g_node[0].u_cache.u_l2.u_array.datas[5] !== 32'hCAFE_0005) begin
      failures++; $display("FAIL write-through did not reach L2 in the same clock");
    end
    // another core reads it: cache-to-cache from a dirty (M) copy
    do_op(1, 0, 8'd5, '0, lat); expect_lat("read miss served by another cache", lat, 6);
    checks++;
    if (last_rdata[1] !== 32'hCAFE_0005) begin
      failures++; $display("FAIL cache-to-cache data %h", last_rdata[1]);
    end
    // write to a shared block: invalidate the other copy (upgrade)
    do_op(1, 1, 8'd5, 32'hBEEF_0005, lat);
    do_op(0, 0, 8'd5, '0, lat);
    checks++;
    if (last_rdata[0] !== 32'hBEEF_0005) begin
      failures++; $display("FAIL read after remote write %h", last_rdata[0]);
    end
    // the worst case of the write-policy comparison: write 255, then read 127
    do_op(2, 1, 8'd255, 32'h0000_00FF, lat);
    do_op(2, 0, 8'd127, '0, lat);
    do_op(2, 0, 8'd255, '0, lat);
    checks += 2;
    if (last_rdata[2] !== 32'h0000_00FF) begin
      failures++; $display("FAIL 255 read back %h", last_rdata[2]);
    end
    if (gold[127] !== init_word(8'd127)) failures++;

    // random phase
    random_on = 1'b1;
    wait (ops_done[0] + ops_done[1] + ops_done[2] + ops_done[3] >= RANDOM_OPS);
    random_on = 1'b0;
    wait (cpu_read == '0 && cpu_write == '0);
    repeat (20) @(posedge clk);

    // final sweep: every address read by core 3 must match the reference
    for (int a = 0; a < 2**ADDR_W; a++) begin
      if (a % 4 == 0 || a == 127 || a == 255 || (a % 64) < 20) do_op(3, 0, addr_t'(a), '0, lat);
    end

    need("L2 hit (DataRdy from L2)",            n_l2_hit);
    need("write-through",                        n_wt);
    need("EndInclusion",                         n_endincl);
    need("StateChange to L1",                    n_statechg);
    need("L1 hold-off during snoop",             n_holdoff);
    need("main memory read (MDataRdy)",          n_mem_rd);
    need("read for shared -> E",                 n_rd_shared_e);
    need("read for shared -> S (StrRec)",        n_rd_shared_s);
    need("read for exclusive",                   n_rd_excl);
    need("cache-to-cache transfer",              n_c2c);
    need("dirty supplier (WBRequest)",           n_c2c_dirty);
    need("invalidate other copies",              n_inval);
    need("write-back command",                   n_wb_cmd);
    need("snoop served from write-back buffer",  n_wbbuf_snoop);
    need("memory writes",                        u_mem.writes);
    $display("ops completed: %0d %0d %0d %0d, clocks %0d, bus grants abandoned %0d",
             ops_done[0], ops_done[1], ops_done[2], ops_done[3], cycle, n_abandon);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
