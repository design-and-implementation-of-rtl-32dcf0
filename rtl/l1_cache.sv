// First-level (L1) data cache of one processor: direct-mapped, one 32-bit
// word per block, write-through to the L2 with no write buffer.
//
// How it works
//   * Read hit: tag equal and state S, E or M; the word is returned in the
//     same clock (cpu_rdata is combinational) and inhibit stays low.
//   * Write hit: tag equal and state E or M; the word is written, the state
//     becomes M, and Writethrough carries the same address and data to the L2,
//     which writes it on the same clock edge. A write therefore reaches both
//     levels in one clock.
//   * Miss: inhibit freezes the processor. If the block being replaced is
//     dirty (M) and belongs to another address, EndInclusion tells the L2 it
//     leaves the L1. From the next clock DataReq asks the L2 for the word (and
//     says whether it is wanted for a write). When DataRdy arrives the word is
//     filled with the state the L2 gives (Newstate) and Aknow is raised in that
//     same clock; the processor's request then hits on the following clock.
//     An L2 hit thus costs 3 clocks from request to completion.
//   * StateChange from the L2 (a snoop downgrade or invalidation, or an L2
//     replacement) rewrites the state of the L1 copy of StateChAdd, if the L1
//     holds that address. A hit to the same block is held off for that clock
//     so that a write can never cross a snoop of its own block.
// Processor interface: a request (cpu_read or cpu_write with cpu_addr and
// cpu_wdata) is held until a clock in which inhibit is low; that clock
// completes it.
// The hit conditions, the write-through timing and the signal set follow the
// design description. The two-state miss controller, the DataReq write flag
// and the hold-off rule are this design's own choices.
module l1_cache
  import cmp_pkg::*;
#(
  parameter int unsigned BLOCKS = L1_BLOCKS,
  localparam int unsigned IDX_W = $clog2(BLOCKS),
  localparam int unsigned TAG_W = ADDR_W - IDX_W
) (
  input  logic      clk,
  input  logic      rst_n,
  // processor side
  input  addr_t     cpu_addr,
  input  data_t     cpu_wdata,
  input  logic      cpu_read,
  input  logic      cpu_write,
  output data_t     cpu_rdata,
  output logic      inhibit,
  // L2 side
  output l1_to_l2_t to_l2,
  input  l2_to_l1_t from_l2
);
  typedef enum logic {L1_IDLE, L1_MISS} l1_state_t;
  l1_state_t state_q;
  addr_t     miss_addr_q;
  logic      miss_wr_q;

  // storage
  logic [TAG_W-1:0] a_tag, b_tag;
  mesi_t            a_state, b_state;
  data_t            a_data;
  logic             line_we, data_we, state_we;

  wire [IDX_W-1:0] req_idx = cpu_addr[IDX_W-1:0];
  wire [TAG_W-1:0] req_tag = cpu_addr[ADDR_W-1:IDX_W];
  wire [IDX_W-1:0] sc_idx  = from_l2.state_ch_addr[IDX_W-1:0];
  wire [TAG_W-1:0] sc_tag  = from_l2.state_ch_addr[ADDR_W-1:IDX_W];
  wire [IDX_W-1:0] mq_idx  = miss_addr_q[IDX_W-1:0];
  wire [TAG_W-1:0] mq_tag  = miss_addr_q[ADDR_W-1:IDX_W];

  cache_array #(.BLOCKS(BLOCKS), .TAG_W(TAG_W)) u_array (
    .clk, .rst_n,
    .a_idx(req_idx), .a_tag, .a_state, .a_data,
    .b_idx(sc_idx),  .b_tag, .b_state, .b_data(),
    .line_we, .line_idx(mq_idx), .line_tag(mq_tag),
    .line_state(from_l2.new_state), .line_data(from_l2.req_data),
    .data_we, .data_idx(req_idx), .data_state(ST_M), .data_wdata(cpu_wdata),
    .state_we, .state_idx(sc_idx), .state_new(from_l2.new_state)
  );

  // processor-side comparator and state-change comparator
  logic pro_equal, pro_hit, sc_hit;
  tag_comparator #(.TAG_W(TAG_W)) u_pro_cmp (
    .addr_tag(req_tag), .stored_tag(a_tag), .valid(a_state != ST_I),
    .equal(pro_equal), .hit(pro_hit));
  tag_comparator #(.TAG_W(TAG_W)) u_sc_cmp (
    .addr_tag(sc_tag), .stored_tag(b_tag), .valid(b_state != ST_I),
    .equal(), .hit(sc_hit));

  logic req, hold_off, rd_hit, wr_hit, miss, victim_dirty;
  always_comb begin
    req      = cpu_read || cpu_write;
    hold_off = from_l2.state_change && (sc_idx == req_idx);
    rd_hit   = (state_q == L1_IDLE) && cpu_read && pro_hit && !hold_off;
    wr_hit   = (state_q == L1_IDLE) && cpu_write && pro_hit && !hold_off &&
               (a_state == ST_E || a_state == ST_M);
    miss     = (state_q == L1_IDLE) && req && !hold_off && !(rd_hit || wr_hit);
    victim_dirty = (a_state == ST_M) && !pro_equal;

    inhibit   = req && !(rd_hit || wr_hit);
    cpu_rdata = a_data;

    line_we  = (state_q == L1_MISS) && from_l2.data_rdy;
    data_we  = wr_hit;
    state_we = from_l2.state_change && sc_hit;

    to_l2              = '0;
    to_l2.data_req     = (state_q == L1_MISS);
    to_l2.data_req_wr  = miss_wr_q;
    to_l2.writethrough = wr_hit;
    to_l2.req_addr     = (state_q == L1_MISS) ? miss_addr_q : cpu_addr;
    to_l2.wt_data      = cpu_wdata;
    to_l2.aknow        = line_we;
    to_l2.end_incl     = miss && victim_dirty;
    to_l2.incl_addr    = {a_tag, req_idx};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= L1_IDLE;
      miss_addr_q <= '0;
      miss_wr_q   <= 1'b0;
    end else begin
      case (state_q)
        L1_IDLE: if (miss) begin
          state_q     <= L1_MISS;
          miss_addr_q <= cpu_addr;
          miss_wr_q   <= cpu_write;
        end
        L1_MISS: if (from_l2.data_rdy) state_q <= L1_IDLE;
        default: state_q <= L1_IDLE;
      endcase
    end
  end

  // A fill and a state change never arrive in the same clock.
  a_fill_xor_change: assert property (@(posedge clk) disable iff (!rst_n)
    !(from_l2.data_rdy && from_l2.state_change));
  // DataRdy only answers an outstanding DataReq.
  a_rdy_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    from_l2.data_rdy |-> state_q == L1_MISS);
endmodule
