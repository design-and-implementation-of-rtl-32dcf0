// Central bus arbitration unit of the shared snoopy bus.
//
// It grants the bus to one requesting L2 at a time, watches the command the
// owner puts on the bus, and completes it:
//   * invalidate other copies (011): CmdReceive at once (the snoopers
//     invalidate on that clock);
//   * read for shared / exclusive (001 / 010): if another cache raises
//     DataAvailable or WBRequest, one of them is chosen (WBRequest first, then
//     the lowest index) and gets StrSend, while the requester gets StrRec and
//     CmdReceive; the word moves cache-to-cache in that clock. If the chosen
//     cache raised WBRequest, the word is also written to main memory from the
//     arbiter's write-back register before the next grant. With no copy on
//     chip, main memory is read and MDataRdy with CmdReceive is raised on the
//     clock the memory returns the word;
//   * write back (111): address and word are taken from the bus and written
//     to main memory; there is no acknowledgement;
//   * release (000) after an acknowledgement ends the tenure.
// A requester that drops BusReq before putting a command on the bus gives the
// bus back. Grants rotate round-robin over the requesters.
// Timing: BusReq seen on clock t gives Grant on t+1; a cache-to-cache transfer
// completes on the clock the command first appears; a memory read completes
// on the clock mem_rdy is high.
// Main memory port: mem_read / mem_write with mem_addr and mem_wdata are held
// until mem_rdy or mem_write_done; the read word goes straight onto the bus
// data lines (see snoopy_bus).
// The signals and the choice between cache-to-cache and memory supply follow
// the design description; the round-robin order, the supplier priority and
// the memory handshake are this design's own choices.
module bus_arbiter
  import cmp_pkg::*;
#(
  parameter int unsigned N = N_CPU,
  localparam int unsigned ID_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // from the caches
  input  logic [N-1:0]    bus_req,      // BusReq
  input  logic [N-1:0]    data_avail,   // DataAvailable
  input  logic [N-1:0]    wb_request,   // WBRequest
  // the bus as it stands
  input  bus_cmd_t        bus_cmd,
  input  addr_t           bus_addr,
  input  data_t           bus_data,
  // to the caches
  output logic [N-1:0]    grant,        // Grant
  output logic [N-1:0]    str_send,     // StrSend
  output logic            cmd_receive,  // CmdReceive
  output logic            mdata_rdy,    // MDataRdy
  output logic            str_rec,      // StrRec
  // bus ownership, for the bus multiplexer
  output logic [ID_W-1:0] owner,
  output logic            owner_valid,
  // main memory
  output logic            mem_read,
  output logic            mem_write,
  output addr_t           mem_addr,
  output data_t           mem_wdata,
  input  logic            mem_rdy,
  input  logic            mem_write_done
);
  typedef enum logic [2:0] {
    AR_IDLE, AR_CMD, AR_MEMRD, AR_MEMWR, AR_REL
  } ar_state_t;
  ar_state_t       state_q;
  logic [ID_W-1:0] owner_q, last_q;
  addr_t           addr_q;     // memory address of the current access
  data_t           wbdata_q;   // write-back register

  // round-robin pick, starting after the last owner
  logic [ID_W-1:0] pick;
  logic            any_req;
  always_comb begin
    pick    = last_q;
    any_req = |bus_req;
    for (int k = N; k >= 1; k--) begin
      logic [ID_W:0] c;
      c = ({1'b0, last_q} + (ID_W+1)'(k)) % (ID_W+1)'(N);
      if (bus_req[c[ID_W-1:0]]) pick = c[ID_W-1:0];
    end
  end

  // supplier choice
  logic [N-1:0]    others, cand_wb, cand_av;
  logic            have_sup, sup_dirty;
  logic [ID_W-1:0] sup;
  always_comb begin
    others  = ~(N'(1) << owner_q);
    cand_wb = wb_request & others;
    cand_av = data_avail & others;
    have_sup  = |(cand_wb | cand_av);
    sup_dirty = |cand_wb;
    sup = '0;
    for (int k = N - 1; k >= 0; k--) begin
      if (sup_dirty ? cand_wb[k] : cand_av[k]) sup = ID_W'(k);
    end
  end

  logic is_read;
  always_comb begin
    is_read     = (bus_cmd == CMD_RD_SHARED) || (bus_cmd == CMD_RD_EXCL);
    grant       = '0;
    str_send    = '0;
    cmd_receive = 1'b0;
    mdata_rdy   = 1'b0;
    str_rec     = 1'b0;
    mem_read    = (state_q == AR_MEMRD);
    mem_write   = (state_q == AR_MEMWR);
    mem_addr    = addr_q;
    mem_wdata   = wbdata_q;
    owner       = owner_q;
    owner_valid = (state_q != AR_IDLE);
    case (state_q)
      AR_CMD: begin
        grant[owner_q] = 1'b1;
        if (bus_cmd == CMD_INVALIDATE) cmd_receive = 1'b1;
        else if (is_read && have_sup) begin
          str_send[sup] = 1'b1;
          str_rec       = 1'b1;
          cmd_receive   = 1'b1;
        end
      end
      AR_MEMRD: if (mem_rdy) begin
        mdata_rdy   = 1'b1;
        cmd_receive = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= AR_IDLE;
      owner_q  <= '0;
      last_q   <= ID_W'(N - 1);
      addr_q   <= '0;
      wbdata_q <= '0;
    end else begin
      case (state_q)
        AR_IDLE: if (any_req) begin
          owner_q <= pick;
          last_q  <= pick;
          state_q <= AR_CMD;
        end
        AR_CMD: begin
          if (bus_cmd == CMD_RELEASE) begin
            if (!bus_req[owner_q]) state_q <= AR_IDLE;   // gave the bus back
          end else if (bus_cmd == CMD_INVALIDATE) begin
            state_q <= AR_REL;
          end else if (is_read) begin
            addr_q <= bus_addr;
            if (!have_sup)      state_q <= AR_MEMRD;
            else if (sup_dirty) begin
              wbdata_q <= bus_data;                    // supplier's dirty word
              state_q  <= AR_MEMWR;
            end else            state_q <= AR_REL;
          end else if (bus_cmd == CMD_WRITEBACK) begin
            addr_q   <= bus_addr;
            wbdata_q <= bus_data;
            state_q  <= AR_MEMWR;
          end
        end
        AR_MEMRD: if (mem_rdy)        state_q <= AR_REL;
        AR_MEMWR: if (mem_write_done) state_q <= AR_REL;
        AR_REL:   if (bus_cmd == CMD_RELEASE) state_q <= AR_IDLE;
        default:  state_q <= AR_IDLE;
      endcase
    end
  end

  // At most one grant and one supplier at a time.
  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_send_onehot:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(str_send));
  // MDataRdy and StrRec each come with CmdReceive, never together; StrRec
  // always has a supplier.
  a_mdata_ack: assert property (@(posedge clk) disable iff (!rst_n)
    mdata_rdy |-> cmd_receive && !str_rec);
  a_strrec_ack: assert property (@(posedge clk) disable iff (!rst_n)
    str_rec |-> cmd_receive && (str_send != '0));
endmodule
