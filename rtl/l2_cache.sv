// Second-level (L2) cache of one processor: direct-mapped, one 32-bit word per
// block, write-back to main memory, and the only level that takes part in the
// MESI snooping protocol on the shared bus.
//
// L1 side
//   * Writethrough and EndInclusion are served at once, in any controller
//     state: the word is written and the block becomes M; EndInclusion clears
//     the block's "in L1" bit.
//   * DataReq hits when the tags are equal and the state is S, E or M (read) or
//     E or M (write). DataRdy, the word and its state (Newstate) are returned in
//     the same clock; the L1's Aknow sets the block's "in L1" bit.
//   * On a miss the old block is dropped. A dirty (M) one moves to the one-entry
//     write-back buffer, which is emptied on the bus only after the miss has
//     been served. If the old block is in the L1, StateChange invalidates it
//     there.
// Bus side (requester): BusReq, wait for Grant, put Cmd and Address on the bus,
// wait for the acknowledgement, then take the word from the bus and hand it to
// the L1 in the same clock. The command is chosen when Grant arrives:
//   read miss                      -> read for shared   (001)
//   write miss, block absent       -> read for exclusive (010)
//   write miss, block held in S    -> invalidate other copies (011)
//   write-back buffer full         -> write back (111), no acknowledgement
// and the new state follows the acknowledgement: MDataRdy on a shared read
// gives E, StrRec gives S, every exclusive request gives M. Driving 000 for one
// clock releases the bus.
// Bus side (snooper): the bus-side lookup compares every snooped read or
// invalidate with the tag array and with the write-back buffer. A clean copy
// (S or E) raises DataAvailable, a dirty one (M, or the buffer) WBRequest; the
// word is offered on snoop_data and is taken when the arbiter sends StrSend.
// The state changes when the bus shows CmdReceive: read for exclusive and
// invalidate -> I, read for shared -> S. A copy that is also in the L1 gets the
// same change through StateChange.
// The hit rules, the commands with their acknowledgements and resulting
// states, the snoop actions and the write-back buffer follow the design
// description. The inclusion bit per block, the one-entry buffer, the choice
// of command at grant time and the rule that the controller waits out a
// clock in which a snoop changes a state are this design's own.
module l2_cache
  import cmp_pkg::*;
#(
  parameter int unsigned BLOCKS = L2_BLOCKS,
  localparam int unsigned IDX_W = $clog2(BLOCKS),
  localparam int unsigned TAG_W = ADDR_W - IDX_W
) (
  input  logic        clk,
  input  logic        rst_n,
  // L1 side
  input  l1_to_l2_t   from_l1,
  output l2_to_l1_t   to_l1,
  // bus side, this cache's own lines
  output l2_bus_out_t to_bus,
  input  logic        grant,       // Grant
  input  logic        str_send,    // StrSend: supply snoop_data now
  // bus side, shared lines
  input  logic        cmd_receive, // CmdReceive
  input  logic        mdata_rdy,   // MDataRdy
  input  logic        str_rec,     // StrRec
  input  bus_cmd_t    snoop_cmd,   // command on the bus
  input  addr_t       snoop_addr,  // address on the bus
  input  data_t       bus_data     // data on the bus
);
  typedef enum logic [2:0] {
    L2_IDLE, L2_WB_REQ, L2_BUS_REQ, L2_BUS_CMD, L2_RELEASE
  } l2_state_t;
  l2_state_t state_q;
  bus_cmd_t  cmd_q;
  logic      incl_q [BLOCKS];   // block may be present in the L1
  logic      wb_valid_q;        // write-back buffer
  addr_t     wb_addr_q;
  data_t     wb_data_q;

  // storage and lookups
  logic [TAG_W-1:0] a_tag, b_tag;
  mesi_t            a_state, b_state;
  data_t            a_data, b_data;
  logic             line_we, data_we, state_we;
  logic [IDX_W-1:0] state_idx;
  mesi_t            state_new;
  mesi_t            line_state;

  wire [IDX_W-1:0] req_idx   = from_l1.req_addr[IDX_W-1:0];
  wire [TAG_W-1:0] req_tag   = from_l1.req_addr[ADDR_W-1:IDX_W];
  wire [IDX_W-1:0] snp_idx   = snoop_addr[IDX_W-1:0];
  wire [TAG_W-1:0] snp_tag   = snoop_addr[ADDR_W-1:IDX_W];
  wire [IDX_W-1:0] incl_idx  = from_l1.incl_addr[IDX_W-1:0];

  cache_array #(.BLOCKS(BLOCKS), .TAG_W(TAG_W)) u_array (
    .clk, .rst_n,
    .a_idx(req_idx), .a_tag, .a_state, .a_data,
    .b_idx(snp_idx), .b_tag, .b_state, .b_data,
    .line_we, .line_idx(req_idx), .line_tag(req_tag),
    .line_state, .line_data(bus_data),
    .data_we, .data_idx(req_idx), .data_state(ST_M), .data_wdata(from_l1.wt_data),
    .state_we, .state_idx, .state_new
  );

  // first comparator: L1 requests; second comparator: bus snoops
  logic req_equal, req_valid_hit, snp_hit;
  tag_comparator #(.TAG_W(TAG_W)) u_req_cmp (
    .addr_tag(req_tag), .stored_tag(a_tag), .valid(a_state != ST_I),
    .equal(req_equal), .hit(req_valid_hit));
  tag_comparator #(.TAG_W(TAG_W)) u_snp_cmp (
    .addr_tag(snp_tag), .stored_tag(b_tag), .valid(b_state != ST_I),
    .equal(), .hit(snp_hit));

  // ---------------- snooping ----------------
  logic  snoop_on, snoop_rd, snp_wb_hit, snoop_commit, snoop_chg;
  mesi_t snoop_new;
  always_comb begin
    // a cache never snoops its own transaction
    snoop_on   = (state_q != L2_BUS_CMD) &&
                 (snoop_cmd == CMD_RD_SHARED || snoop_cmd == CMD_RD_EXCL ||
                  snoop_cmd == CMD_INVALIDATE);
    snoop_rd   = snoop_on && (snoop_cmd != CMD_INVALIDATE);
    snp_wb_hit = snoop_rd && wb_valid_q && (wb_addr_q == snoop_addr);
    snoop_commit = snoop_on && cmd_receive;
    snoop_new  = (snoop_cmd == CMD_RD_SHARED) ? ST_S : ST_I;
    snoop_chg  = snoop_commit && snp_hit && (b_state != snoop_new);
  end

  // ---------------- L1 requests ----------------
  logic req_hit, victim_valid, idle_serve, idle_miss;
  always_comb begin
    req_hit = from_l1.data_req_wr ? (req_equal && (a_state == ST_E || a_state == ST_M))
                                  : req_valid_hit;
    // a clock in which a snoop changes a state is waited out
    idle_serve   = (state_q == L2_IDLE) && from_l1.data_req && !snoop_commit;
    idle_miss    = idle_serve && !req_hit && !wb_valid_q;
    victim_valid = (a_state != ST_I) && !req_equal;
  end

  // ---------------- bus transaction ----------------
  logic     ack, bus_fill;
  bus_cmd_t grant_cmd;
  mesi_t    fill_state;
  always_comb begin
    grant_cmd = !from_l1.data_req_wr ? CMD_RD_SHARED :
                (req_equal && a_state == ST_S) ? CMD_INVALIDATE : CMD_RD_EXCL;
    ack = 1'b0;
    fill_state = ST_M;
    if (state_q == L2_BUS_CMD) begin
      case (cmd_q)
        CMD_INVALIDATE: ack = cmd_receive;
        CMD_RD_EXCL:    ack = cmd_receive && (mdata_rdy || str_rec);
        CMD_RD_SHARED: begin
          ack = cmd_receive && (mdata_rdy || str_rec);
          fill_state = str_rec ? ST_S : ST_E;
        end
        default:        ack = 1'b0;
      endcase
    end
    bus_fill = ack && (cmd_q != CMD_INVALIDATE);
  end

  // ---------------- array writes and L1 answers ----------------
  always_comb begin
    line_we    = bus_fill;
    line_state = fill_state;
    data_we    = from_l1.writethrough;
    state_we   = 1'b0;
    state_idx  = snp_idx;
    state_new  = snoop_new;
    to_l1      = '0;
    if (snoop_chg) begin
      state_we = 1'b1;
      if (incl_q[snp_idx]) begin
        to_l1.state_change  = 1'b1;
        to_l1.state_ch_addr = snoop_addr;
        to_l1.new_state     = snoop_new;
      end
    end else if (idle_serve && req_hit) begin
      to_l1.data_rdy  = 1'b1;
      to_l1.req_data  = a_data;
      to_l1.new_state = a_state;
    end else if (idle_miss && victim_valid) begin
      // drop the old block; a dirty one goes to the write-back buffer
      state_we  = 1'b1;
      state_idx = req_idx;
      state_new = ST_I;
      if (incl_q[req_idx]) begin
        to_l1.state_change  = 1'b1;
        to_l1.state_ch_addr = {a_tag, req_idx};
        to_l1.new_state     = ST_I;
      end
    end else if (ack) begin
      to_l1.data_rdy  = 1'b1;
      to_l1.new_state = ST_M;
      to_l1.req_data  = a_data;
      if (bus_fill) begin
        to_l1.req_data  = bus_data;
        to_l1.new_state = fill_state;
      end else begin
        state_we  = 1'b1;          // S -> M after invalidating the others
        state_idx = req_idx;
        state_new = ST_M;
      end
    end
  end

  // ---------------- bus outputs ----------------
  always_comb begin
    to_bus            = '0;
    to_bus.bus_req    = (state_q == L2_BUS_REQ) || (state_q == L2_BUS_CMD) ||
                        ((state_q == L2_WB_REQ) && wb_valid_q);
    to_bus.cmd        = (state_q == L2_BUS_CMD) ? cmd_q : CMD_RELEASE;
    to_bus.addr       = (cmd_q == CMD_WRITEBACK) ? wb_addr_q : from_l1.req_addr;
    to_bus.wdata      = wb_data_q;
    to_bus.data_avail = snoop_rd && snp_hit && (b_state == ST_S || b_state == ST_E);
    to_bus.wb_request = snoop_rd && ((snp_hit && b_state == ST_M) || snp_wb_hit);
    to_bus.snoop_data = snp_wb_hit ? wb_data_q : b_data;
  end

  // ---------------- sequential ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= L2_IDLE;
      cmd_q      <= CMD_RELEASE;
      wb_valid_q <= 1'b0;
      wb_addr_q  <= '0;
      wb_data_q  <= '0;
      for (int i = 0; i < BLOCKS; i++) incl_q[i] <= 1'b0;
    end else begin
      // inclusion bookkeeping
      if (from_l1.end_incl) incl_q[incl_idx] <= 1'b0;
      if (from_l1.aknow)    incl_q[req_idx]  <= 1'b1;
      if (snoop_chg && snoop_new == ST_I) incl_q[snp_idx] <= 1'b0;
      if (idle_miss && victim_valid)      incl_q[req_idx] <= 1'b0;
      // the write-back buffer
      if (idle_miss && victim_valid && a_state == ST_M) begin
        wb_valid_q <= 1'b1;
        wb_addr_q  <= {a_tag, req_idx};
        wb_data_q  <= a_data;
      end
      if (snp_wb_hit && str_send && cmd_receive) wb_valid_q <= 1'b0;

      case (state_q)
        L2_IDLE: begin
          if (idle_serve && !req_hit) begin
            state_q <= wb_valid_q ? L2_WB_REQ : L2_BUS_REQ;
          end else if (wb_valid_q && !from_l1.data_req) begin
            state_q <= L2_WB_REQ;
          end
        end
        L2_WB_REQ: begin
          if (!wb_valid_q) state_q <= L2_IDLE;       // a snoop took it
          else if (grant) begin
            cmd_q   <= CMD_WRITEBACK;
            state_q <= L2_BUS_CMD;
          end
        end
        L2_BUS_REQ: if (grant) begin
          cmd_q   <= grant_cmd;
          state_q <= L2_BUS_CMD;
        end
        L2_BUS_CMD: begin
          if (cmd_q == CMD_WRITEBACK) begin
            wb_valid_q <= 1'b0;
            state_q    <= L2_RELEASE;
          end else if (ack) begin
            state_q <= L2_RELEASE;
          end
        end
        L2_RELEASE: state_q <= wb_valid_q ? L2_WB_REQ : L2_IDLE;
        default:    state_q <= L2_IDLE;
      endcase
    end
  end

  // Writethrough only reaches a block the L2 holds in E or M.
  a_wt_hits: assert property (@(posedge clk) disable iff (!rst_n)
    from_l1.writethrough |-> req_equal && (a_state == ST_E || a_state == ST_M));
  // DataReq and Writethrough are never raised together.
  a_req_xor_wt: assert property (@(posedge clk) disable iff (!rst_n)
    !(from_l1.data_req && from_l1.writethrough));
endmodule
