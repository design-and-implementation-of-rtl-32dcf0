// Random test of snoopy_bus: command and address follow the owner (000 with
// no owner), and the data lines follow StrSend, else MDataRdy, else the
// owner's write-back word.
module tb_snoopy_bus;
  import cmp_pkg::*;
  localparam int unsigned N = 4;
  bus_cmd_t cache_cmd [N];
  addr_t cache_addr [N];
  data_t cache_wdata [N], cache_sdata [N];
  logic [1:0] owner;
  logic owner_valid, mdata_rdy;
  logic [N-1:0] str_send;
  data_t mem_rdata, bus_data;
  bus_cmd_t bus_cmd;
  addr_t bus_addr;
  int unsigned checks = 0, failures = 0;

  snoopy_bus dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      data_t want_d;
      bus_cmd_t want_c;
      for (int k = 0; k < N; k++) begin
        cache_cmd[k] = bus_cmd_t'(($urandom_range(0, 4) == 4) ? 7 : $urandom_range(0, 3));
        cache_addr[k] = addr_t'($urandom); cache_wdata[k] = $urandom; cache_sdata[k] = $urandom;
      end
      owner = 2'($urandom); owner_valid = ($urandom_range(0, 3) != 0);
      mdata_rdy = ($urandom_range(0, 2) == 0); mem_rdata = $urandom;
      str_send = '0;
      if ($urandom_range(0, 2) == 0) str_send[$urandom_range(0, N - 1)] = 1'b1;
      #1;
      want_c = owner_valid ? cache_cmd[owner] : CMD_RELEASE;
      want_d = cache_wdata[owner];
      if (mdata_rdy) want_d = mem_rdata;
      for (int k = 0; k < N; k++) if (str_send[k]) want_d = cache_sdata[k];
      checks += 3;
      if (bus_cmd !== want_c) begin failures++; $display("FAIL cmd"); end
      if (bus_addr !== cache_addr[owner]) begin failures++; $display("FAIL addr"); end
      if (bus_data !== want_d) begin failures++; $display("FAIL data"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
