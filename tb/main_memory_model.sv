// Behavioural model of the off-chip main memory, for simulation only.
//
// 256 words of 32 bits. Word a starts as init_word(a). A read (mem_read held
// with mem_addr) is answered with mem_rdy and mem_rdata after READ_LAT clocks,
// counting the first clock of the request as clock 1. A write (mem_write
// held with mem_addr and mem_wdata) is stored and acknowledged with
// mem_write_done after WRITE_LAT clocks. Counters report how many reads and
// writes were served.
module main_memory_model
  import cmp_pkg::*;
#(
  parameter int unsigned READ_LAT  = 1,
  parameter int unsigned WRITE_LAT = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mem_read,
  input  logic  mem_write,
  input  addr_t mem_addr,
  input  data_t mem_wdata,
  output data_t mem_rdata,
  output logic  mem_rdy,
  output logic  mem_write_done
);
  data_t       mem [2**ADDR_W];
  int unsigned rd_cnt, wr_cnt;
  int unsigned reads, writes;

  function automatic data_t init_word(addr_t a);
    return {8'hA5, 8'(a), 8'(~a), 8'(a ^ 8'h3C)};
  endfunction

  initial for (int a = 0; a < 2**ADDR_W; a++) mem[a] = init_word(addr_t'(a));

  assign mem_rdy        = mem_read  && (rd_cnt == READ_LAT - 1);
  assign mem_write_done = mem_write && (wr_cnt == WRITE_LAT - 1);
  assign mem_rdata      = mem[mem_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_cnt <= 0; wr_cnt <= 0; reads <= 0; writes <= 0;
    end else begin
      if (mem_read)  rd_cnt <= mem_rdy ? 0 : rd_cnt + 1;
      if (mem_write) wr_cnt <= mem_write_done ? 0 : wr_cnt + 1;
      if (mem_rdy) reads <= reads + 1;
      if (mem_write_done) begin
        mem[mem_addr] <= mem_wdata;
        writes <= writes + 1;
      end
    end
  end
endmodule
