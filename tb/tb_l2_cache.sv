// Test of l2_cache with the L1 side and the whole bus side driven by this
// testbench, clock by clock.
//
// Checks: read miss -> BusReq, command 001 after Grant, fill with E on
// MDataRdy and with S on StrRec, the word handed to the L1 in the same clock,
// release (000) after the acknowledgement; L1 read hit in the same clock;
// Writethrough makes the block M; snooped read for shared on an M block gives
// WBRequest with the newest word and downgrades to S (with StateChange to the
// L1); snooped read for exclusive on a clean block gives DataAvailable and
// invalidates; write miss -> 010 and M; write to an S block -> 011 and M;
// a dirty replacement goes to the write-back buffer, the miss is served
// first and then the buffer is written back with 111; a snoop that hits the
// buffer is served from it and empties it; no StateChange after EndInclusion.
module tb_l2_cache;
  import cmp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  l1_to_l2_t   from_l1;
  l2_to_l1_t   to_l1;
  l2_bus_out_t to_bus;
  logic grant, str_send, cmd_receive, mdata_rdy, str_rec;
  bus_cmd_t snoop_cmd; addr_t snoop_addr; data_t bus_data;

  l2_cache dut (.*);

  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic idle_bus();
    grant = 0; str_send = 0; cmd_receive = 0; mdata_rdy = 0; str_rec = 0;
    snoop_cmd = CMD_RELEASE; snoop_addr = '0; bus_data = '0;
  endtask

  // the L1 asks for a word; the test plays the bus. ack: 0 memory, 1 cache.
  // Returns the state given to the L1.
  task automatic fetch(input addr_t a, input bit wr, input bit hit_expected,
                       input bit by_cache, input data_t d, input bus_cmd_t want_cmd,
                       output mesi_t st);
    @(negedge clk);
    from_l1 = '0; from_l1.data_req = 1; from_l1.data_req_wr = wr; from_l1.req_addr = a;
    #1;
    if (hit_expected) begin
      chk("hit answered in the same clock", to_l1.data_rdy);
      st = to_l1.new_state;
      from_l1.aknow = 1;
      @(negedge clk); from_l1 = '0;
      return;
    end
    chk("miss gives no DataRdy", !to_l1.data_rdy);
    @(negedge clk); #1;
    chk("BusReq after a miss", to_bus.bus_req);
    chk("no command before Grant", to_bus.cmd == CMD_RELEASE);
    grant = 1;
    @(negedge clk); grant = 0; #1;
    chk($sformatf("command %b", want_cmd), to_bus.cmd == want_cmd);
    chk("address on the bus", to_bus.addr == a);
    // acknowledgement and data, in one clock
    cmd_receive = 1; bus_data = d;
    if (want_cmd != CMD_INVALIDATE) begin
      if (by_cache) str_rec = 1; else mdata_rdy = 1;
    end
    #1;
    chk("DataRdy in the acknowledgement clock", to_l1.data_rdy);
    if (want_cmd != CMD_INVALIDATE) chk("word from the bus to L1", to_l1.req_data == d);
    st = to_l1.new_state;
    from_l1.aknow = 1;
    @(negedge clk);
    idle_bus(); from_l1 = '0; #1;
    chk("release after acknowledgement", to_bus.cmd == CMD_RELEASE && !to_bus.bus_req);
  endtask

  // one snooped command, committed with CmdReceive (StrSend if sel)
  task automatic snoop(input bus_cmd_t c, input addr_t a, input bit sel,
                       output bit avail, output bit wbreq, output data_t sd,
                       output bit sc, output mesi_t sc_state);
    @(negedge clk);
    snoop_cmd = c; snoop_addr = a; #1;
    avail = to_bus.data_avail; wbreq = to_bus.wb_request; sd = to_bus.snoop_data;
    cmd_receive = 1; str_send = sel; #1;
    sc = to_l1.state_change && to_l1.state_ch_addr == a; sc_state = to_l1.new_state;
    @(negedge clk); idle_bus();
  endtask

  mesi_t st, scs; bit av, wb, sc; data_t sd;
  initial begin
    idle_bus(); from_l1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    fetch(8'd10, 0, 0, 0, 32'hAAAA_0010, CMD_RD_SHARED, st); chk("memory read gives E", st == ST_E);
    fetch(8'd10, 0, 1, 0, '0, CMD_RD_SHARED, st);            chk("read hit state E", st == ST_E);
    // write-through
    @(negedge clk); from_l1 = '0; from_l1.writethrough = 1; from_l1.req_addr = 8'd10;
    from_l1.wt_data = 32'hBBBB_0010;
    @(negedge clk); from_l1 = '0;
    snoop(CMD_RD_SHARED, 8'd10, 1, av, wb, sd, sc, scs);
    chk("M block raises WBRequest", wb && !av);
    chk("newest word supplied", sd == 32'hBBBB_0010);
    chk("StateChange to S sent to L1", sc && scs == ST_S);
    snoop(CMD_RD_EXCL, 8'd10, 1, av, wb, sd, sc, scs);
    chk("S block raises DataAvailable", av && !wb);
    chk("StateChange to I sent to L1", sc && scs == ST_I);
    snoop(CMD_RD_SHARED, 8'd10, 0, av, wb, sd, sc, scs);
    chk("invalidated block is silent", !av && !wb);

    fetch(8'd30, 0, 0, 1, 32'hCCCC_0030, CMD_RD_SHARED, st); chk("cache supply gives S", st == ST_S);
    fetch(8'd30, 1, 0, 0, '0, CMD_INVALIDATE, st);           chk("upgrade gives M", st == ST_M);
    fetch(8'd20, 1, 0, 1, 32'hDDDD_0020, CMD_RD_EXCL, st);   chk("read exclusive gives M", st == ST_M);
    // EndInclusion: the L1 drops 20; a snoop then sends no StateChange
    @(negedge clk); from_l1 = '0; from_l1.end_incl = 1; from_l1.incl_addr = 8'd20;
    @(negedge clk); from_l1 = '0;
    snoop(CMD_RD_SHARED, 8'd20, 1, av, wb, sd, sc, scs);
    chk("no StateChange after EndInclusion", !sc && wb && sd == 32'hDDDD_0020);
    fetch(8'd20, 1, 0, 0, 32'hDDDD_0020, CMD_INVALIDATE, st); // S -> M by upgrade

    // dirty replacement: 84 maps on 20 (M); the miss goes first, then 111
    fetch(8'd84, 0, 0, 0, 32'hEEEE_0084, CMD_RD_SHARED, st);
    chk("L2 hands 84 to L1 as E", st == ST_E);
    @(negedge clk); #1 chk("BusReq again for the write-back", to_bus.bus_req);
    grant = 1; @(negedge clk); grant = 0; #1;
    chk("write-back command 111", to_bus.cmd == CMD_WRITEBACK);
    chk("write-back address and word", to_bus.addr == 8'd20 && to_bus.wdata == 32'hDDDD_0020);
    @(negedge clk); #1;
    chk("released after write-back", to_bus.cmd == CMD_RELEASE && !to_bus.bus_req);

    // dirty replacement again; a snoop takes the buffered word first
    fetch(8'd30 + 8'd64, 0, 0, 0, 32'h1234_0094, CMD_RD_SHARED, st);  // 30 (M) -> buffer
    @(negedge clk); #1 chk("BusReq for buffer", to_bus.bus_req);
    snoop(CMD_RD_EXCL, 8'd30, 1, av, wb, sd, sc, scs);
    chk("buffer hit raises WBRequest", wb);
    @(negedge clk); #1;
    chk("buffer emptied by the snoop, BusReq dropped", !to_bus.bus_req);
    repeat (3) @(negedge clk);
    chk("no write-back after the snoop", to_bus.cmd == CMD_RELEASE);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
