// Test of l1_cache against a behavioural L2 written in this testbench.
//
// The L2 model keeps the reference copy of every word (the L1 writes through,
// so it is always current), answers DataReq after 0 to 2 extra clocks with a
// state that allows the request (S or E for reads, E for writes), and now and
// then sends StateChange notices that invalidate or downgrade a block.
// Directed checks: miss latency (3 clocks with an immediate L2 answer), hit
// latency (1 clock), Writethrough in the clock of the write with the right
// address and data, EndInclusion when a dirty block is replaced, the upgrade
// of an S block on a write, invalidation by StateChange, and the hold-off of
// a hit while its block's state is being changed. Then random traffic with
// every read checked against the model.
module tb_l1_cache;
  import cmp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  addr_t cpu_addr; data_t cpu_wdata, cpu_rdata;
  logic cpu_read = 1'b0, cpu_write = 1'b0, inhibit;
  l1_to_l2_t to_l2;
  l2_to_l1_t from_l2;

  l1_cache dut (.*);

  int unsigned checks = 0, failures = 0;
  data_t l2mem [2**ADDR_W];
  initial for (int a = 0; a < 2**ADDR_W; a++) l2mem[a] = {24'h5A5A5A, 8'(a)};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- L2 model ----------------
  int unsigned wait_q = 0, delay = 0;
  logic        force_s = 1'b0;       // answer reads with S
  logic        sc_v = 1'b0;          // StateChange request from the test
  addr_t       sc_a; mesi_t sc_s;
  int unsigned n_wt = 0, n_ei = 0, n_req = 0, n_ack = 0;
  addr_t       last_ei;
  always_comb begin
    from_l2 = '0;
    if (to_l2.data_req && wait_q >= delay) begin
      from_l2.data_rdy  = 1'b1;
      from_l2.req_data  = l2mem[to_l2.req_addr];
      from_l2.new_state = to_l2.data_req_wr ? ST_E : (force_s ? ST_S : ST_E);
    end else if (sc_v) begin
      from_l2.state_change  = 1'b1;
      from_l2.state_ch_addr = sc_a;
      from_l2.new_state     = sc_s;
    end
  end
  always @(posedge clk) begin
    if (to_l2.data_req && !from_l2.data_rdy) wait_q <= wait_q + 1;
    else wait_q <= 0;
    if (to_l2.writethrough) begin
      l2mem[to_l2.req_addr] <= to_l2.wt_data;
      n_wt++;
    end
    if (to_l2.end_incl) begin n_ei++; last_ei <= to_l2.incl_addr; end
    if (to_l2.aknow) n_ack++;
    checks++;
    if (to_l2.aknow !== from_l2.data_rdy) begin failures++; $display("FAIL Aknow not with DataRdy"); end
  end

  // ---------------- processor side ----------------
  int unsigned lat;
  data_t rd;
  task automatic op(input bit wr, input addr_t a, input data_t d);
    @(negedge clk);
    cpu_addr = a; cpu_wdata = d; cpu_read = !wr; cpu_write = wr;
    lat = 1;
    #1;
    while (inhibit) begin @(negedge clk); lat++; #1; end
    rd = cpu_rdata;
    if (wr) begin
      checks += 2;
      if (!to_l2.writethrough || to_l2.req_addr !== a || to_l2.wt_data !== d) begin
        failures++; $display("FAIL writethrough not in the clock of the write");
      end
    end else begin
      checks++;
      if (rd !== l2mem[a]) begin failures++; $display("FAIL read %0d got %h want %h", a, rd, l2mem[a]); end
    end
    @(posedge clk);
    #1 cpu_read = 1'b0; cpu_write = 1'b0;
  endtask

  task automatic expect_eq(input string what, input int unsigned got, input int unsigned want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, want); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    op(0, 8'd3, '0);            expect_eq("read miss latency", lat, 3);
    op(0, 8'd3, '0);            expect_eq("read hit latency", lat, 1);
    op(1, 8'd3, 32'h1111_0003); expect_eq("write hit latency", lat, 1);
    expect_eq("writethrough count", n_wt, 1);
    op(0, 8'd3, '0);            // reads back the written word
    op(0, 8'd19, '0);           expect_eq("conflict miss latency", lat, 3);
    expect_eq("EndInclusion for the dirty block", n_ei, 1);
    expect_eq("EndInclusion address", last_ei, 3);
    op(0, 8'd35, '0);           expect_eq("no EndInclusion for a clean block", n_ei, 1);
    // S block: a write has to go back to the L2 first
    force_s = 1'b1;
    op(0, 8'd40, '0);
    force_s = 1'b0;
    op(1, 8'd40, 32'h2222_0040); expect_eq("write to S block latency", lat, 3);
    // StateChange invalidates the L1 copy
    op(0, 8'd8, '0);
    @(negedge clk); sc_v = 1'b1; sc_a = 8'd8; sc_s = ST_I;
    @(negedge clk); sc_v = 1'b0;
    op(0, 8'd8, '0);            expect_eq("read after invalidation", lat, 3);
    // StateChange for another address with the same index leaves the block
    @(negedge clk); sc_v = 1'b1; sc_a = 8'd24; sc_s = ST_I;
    @(negedge clk); sc_v = 1'b0;
    op(0, 8'd8, '0);            expect_eq("foreign StateChange ignored", lat, 1);
    // hold-off: a hit waits while its block's state changes
    @(negedge clk); sc_v = 1'b1; sc_a = 8'd8; sc_s = ST_S; cpu_addr = 8'd8; cpu_read = 1'b1;
    #1 checks++;
    if (!inhibit) begin failures++; $display("FAIL hit during StateChange of its block"); end
    @(negedge clk); sc_v = 1'b0;
    #1 checks++;
    if (inhibit) begin failures++; $display("FAIL hit after StateChange"); end
    @(posedge clk); #1 cpu_read = 1'b0;
    // a downgraded (S) block misses on a write
    op(1, 8'd8, 32'h3333_0008); expect_eq("write after downgrade latency", lat, 3);

    // random traffic
    for (int n = 0; n < 3000; n++) begin
      addr_t a;
      a = addr_t'($urandom_range(0, 3) * 16 + $urandom_range(0, 3));
      delay   = $urandom_range(0, 2);
      force_s = ($urandom_range(0, 1) != 0);
      if ($urandom_range(0, 7) == 0) begin
        @(negedge clk); sc_v = 1'b1; sc_a = addr_t'($urandom_range(0, 3) * 16 + $urandom_range(0, 3));
        sc_s = ($urandom_range(0, 1) != 0) ? ST_I : ST_S;
        @(negedge clk); sc_v = 1'b0;
      end
      op($urandom_range(0, 1) != 0, a, $urandom);
    end
    delay = 0;
    expect_eq("one Aknow per DataReq answer", n_ack > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
