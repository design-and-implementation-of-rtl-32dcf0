// Test of bus_arbiter with the caches played by this testbench and the
// behavioural main memory (read latency 3 clocks) attached.
//
// Checks: Grant one clock after BusReq; round-robin order when all four
// request; CmdReceive in the same clock for an invalidate; a cache-to-cache
// read choosing the lowest DataAvailable cache, or the WBRequest cache first,
// with StrSend / StrRec / CmdReceive in the command's first clock; the dirty
// word then written to memory; a memory read completing after the memory
// latency with MDataRdy and CmdReceive; a write-back reaching memory; the bus
// returned when a requester drops BusReq before its command.
module tb_bus_arbiter;
  import cmp_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] bus_req, data_avail, wb_request, grant, str_send;
  bus_cmd_t bus_cmd; addr_t bus_addr; data_t bus_data;
  logic cmd_receive, mdata_rdy, str_rec, owner_valid;
  logic [1:0] owner;
  logic mem_read, mem_write, mem_rdy, mem_write_done;
  addr_t mem_addr; data_t mem_wdata, mem_rdata;

  bus_arbiter dut (.*);
  main_memory_model #(.READ_LAT(3), .WRITE_LAT(2)) u_mem (.*);

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

  // request the bus for cache k and wait for its Grant; returns clocks waited
  task automatic get_bus(input int k, output int unsigned waited);
    @(negedge clk); bus_req[k] = 1; waited = 0;
    do begin @(negedge clk); waited++; #1; end while (!grant[k]);
  endtask

  task automatic release_bus(input int k);
    @(negedge clk); bus_cmd = CMD_RELEASE; bus_req[k] = 0;
    do begin @(negedge clk); #1; end while (owner_valid);
  endtask

  int unsigned w, clk_cnt;
  initial begin
    bus_req = '0; data_avail = '0; wb_request = '0;
    bus_cmd = CMD_RELEASE; bus_addr = '0; bus_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // invalidate
    get_bus(2, w); chk("Grant one clock after BusReq", w == 1);
    chk("owner shown", owner == 2 && owner_valid);
    @(negedge clk); bus_cmd = CMD_INVALIDATE; bus_addr = 8'd7; #1;
    chk("invalidate acknowledged at once", cmd_receive && !mdata_rdy && !str_rec);
    release_bus(2);

    // cache-to-cache, clean suppliers 1 and 3
    get_bus(0, w);
    @(negedge clk); bus_cmd = CMD_RD_SHARED; bus_addr = 8'd9; data_avail = 4'b1010; #1;
    chk("StrSend to the lowest DataAvailable cache", str_send == 4'b0010);
    chk("StrRec and CmdReceive to the requester", str_rec && cmd_receive);
    @(negedge clk); data_avail = '0; #1;
    chk("acknowledge only once", !cmd_receive);
    release_bus(0);

    // cache-to-cache, dirty supplier 3 beats clean 1; word goes to memory
    get_bus(1, w);
    @(negedge clk); bus_cmd = CMD_RD_EXCL; bus_addr = 8'd12; bus_data = 32'h0D1_27;
    data_avail = 4'b0001; wb_request = 4'b1000; #1;
    chk("WBRequest cache chosen", str_send == 4'b1000 && str_rec && cmd_receive);
    @(negedge clk); data_avail = '0; wb_request = '0; bus_data = '0;
    release_bus(1);
    chk("dirty word written to memory", u_mem.mem[12] == 32'h0D1_27);

    // the requester's own WBRequest/DataAvailable lines are ignored
    get_bus(3, w);
    @(negedge clk); bus_cmd = CMD_RD_SHARED; bus_addr = 8'd40; wb_request = 4'b1000; #1;
    chk("requester never supplies itself", str_send == '0);
    clk_cnt = 1;
    while (!mdata_rdy) begin @(negedge clk); clk_cnt++; #1; end
    chk("memory read takes command clock + latency 3", clk_cnt == 4);
    chk("CmdReceive with MDataRdy", cmd_receive && !str_rec);
    chk("memory word on mem_rdata", mem_rdata == u_mem.init_word(8'd40));
    wb_request = '0;
    release_bus(3);

    // write back
    get_bus(2, w);
    @(negedge clk); bus_cmd = CMD_WRITEBACK; bus_addr = 8'd50; bus_data = 32'h5050_5050;
    @(negedge clk); bus_cmd = CMD_RELEASE; bus_req[2] = 0;
    do begin @(negedge clk); #1; end while (owner_valid);
    chk("write-back reached memory", u_mem.mem[50] == 32'h5050_5050);

    // round robin: all four request at once, last owner was 2
    @(negedge clk); bus_req = 4'b1111;
    for (int e = 0; e < 4; e++) begin
      int exp_k;
      exp_k = (3 + e) % 4;
      do begin @(negedge clk); #1; end while (grant == '0);
      chk($sformatf("round-robin grant %0d", exp_k), grant[exp_k]);
      bus_cmd = CMD_INVALIDATE; #1;
      @(negedge clk); bus_cmd = CMD_RELEASE; bus_req[exp_k] = 0;
    end

    // a requester that gives up before its command returns the bus
    get_bus(1, w);
    @(negedge clk); bus_req[1] = 0;
    @(negedge clk); #1 chk("bus returned", !owner_valid);
    get_bus(0, w); chk("next grant after return", w == 1);
    release_bus(0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
