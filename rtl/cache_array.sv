// Direct-mapped cache storage: the data cache entity, the tag array and the
// per-block MESI state bits of one cache level.
//
// Two asynchronous read ports are provided. Port A serves the processor side
// (L1 requests) and port B the other side (bus snoops in the L2, state-change
// notices in the L1), matching the two tag lookups drawn for the L2 in the
// block diagram. Writes happen on the rising clock edge:
//   * line write (line_we): tag, state and data of block line_idx;
//   * data write (data_we): data and state of block data_idx (a write hit);
//   * state write (state_we): state of block state_idx only.
// If two writes touch the same block in one clock, the later one in the list
// above wins for the state bits. The controllers never issue two writes to the
// same block in one clock. Only the state bits are reset (to I); tags and data
// are never read while their block is I.
module cache_array
  import cmp_pkg::*;
#(
  parameter int unsigned BLOCKS = 16,
  parameter int unsigned TAG_W  = 4,
  localparam int unsigned IDX_W = $clog2(BLOCKS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // read port A
  input  logic [IDX_W-1:0] a_idx,
  output logic [TAG_W-1:0] a_tag,
  output mesi_t            a_state,
  output data_t            a_data,
  // read port B
  input  logic [IDX_W-1:0] b_idx,
  output logic [TAG_W-1:0] b_tag,
  output mesi_t            b_state,
  output data_t            b_data,
  // line write (fill)
  input  logic             line_we,
  input  logic [IDX_W-1:0] line_idx,
  input  logic [TAG_W-1:0] line_tag,
  input  mesi_t            line_state,
  input  data_t            line_data,
  // data write (write hit)
  input  logic             data_we,
  input  logic [IDX_W-1:0] data_idx,
  input  mesi_t            data_state,
  input  data_t            data_wdata,
  // state write
  input  logic             state_we,
  input  logic [IDX_W-1:0] state_idx,
  input  mesi_t            state_new
);
  logic [TAG_W-1:0] tags  [BLOCKS];
  data_t            datas [BLOCKS];
  mesi_t            states[BLOCKS];

  assign a_tag   = tags[a_idx];
  assign a_state = states[a_idx];
  assign a_data  = datas[a_idx];
  assign b_tag   = tags[b_idx];
  assign b_state = states[b_idx];
  assign b_data  = datas[b_idx];

  always_ff @(posedge clk) begin
    if (line_we) begin
      tags[line_idx]  <= line_tag;
      datas[line_idx] <= line_data;
    end
    if (data_we) datas[data_idx] <= data_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BLOCKS; i++) states[i] <= ST_I;
    end else begin
      if (line_we)  states[line_idx]  <= line_state;
      if (data_we)  states[data_idx]  <= data_state;
      if (state_we) states[state_idx] <= state_new;
    end
  end
endmodule
