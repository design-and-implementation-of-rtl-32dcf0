// Random test of cache_array: line, data and state writes in random mixes
// (including several in one clock to the same block, where the later port
// wins for the state), with both read ports compared against a reference
// model every clock (tags and data once written; their reset value is
// undefined). Also checks that reset leaves every block in state I.
module tb_cache_array;
  import cmp_pkg::*;
  localparam int unsigned BLOCKS = 16, TAG_W = 4, IDX_W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [IDX_W-1:0] a_idx, b_idx, line_idx, data_idx, state_idx;
  logic [TAG_W-1:0] a_tag, b_tag, line_tag;
  mesi_t a_state, b_state, line_state, data_state, state_new;
  data_t a_data, b_data, line_data, data_wdata;
  logic line_we, data_we, state_we;

  cache_array dut (.*);

  logic [TAG_W-1:0] m_tag [BLOCKS];
  mesi_t            m_st  [BLOCKS];
  data_t            m_dat [BLOCKS];
  bit               m_tk  [BLOCKS];   // tag known (block filled once)
  bit               m_dk  [BLOCKS];   // data known
  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks += 3;
    if (a_state !== m_st[a_idx]) begin failures++; $display("FAIL a_state idx %0d", a_idx); end
    if (b_state !== m_st[b_idx]) begin failures++; $display("FAIL b_state idx %0d", b_idx); end
    if ((m_tk[a_idx] && a_tag !== m_tag[a_idx]) || (m_dk[a_idx] && a_data !== m_dat[a_idx])) begin
      failures++; $display("FAIL a line idx %0d", a_idx);
    end
    if ((m_tk[b_idx] && b_tag !== m_tag[b_idx]) || (m_dk[b_idx] && b_data !== m_dat[b_idx])) begin
      failures++; $display("FAIL b line idx %0d", b_idx);
    end
  endtask

  initial begin
    {line_we, data_we, state_we} = '0;
    a_idx = '0; b_idx = '0;
    for (int i = 0; i < BLOCKS; i++) begin m_st[i] = ST_I; m_tk[i] = 0; m_dk[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < BLOCKS; i++) begin
      a_idx = IDX_W'(i); b_idx = IDX_W'(BLOCKS - 1 - i); #1;
      checks++;
      if (a_state !== ST_I || b_state !== ST_I) begin failures++; $display("FAIL reset state %0d", i); end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      line_we = ($urandom_range(0, 2) == 0); data_we = ($urandom_range(0, 2) == 0);
      state_we = ($urandom_range(0, 2) == 0);
      line_idx = IDX_W'($urandom_range(0, 3)); data_idx = IDX_W'($urandom_range(0, 3));
      state_idx = IDX_W'($urandom_range(0, 3));
      line_tag = TAG_W'($urandom); line_state = mesi_t'($urandom_range(0, 3));
      line_data = $urandom; data_state = mesi_t'($urandom_range(0, 3));
      data_wdata = $urandom; state_new = mesi_t'($urandom_range(0, 3));
      a_idx = IDX_W'($urandom_range(0, 3)); b_idx = IDX_W'($urandom_range(0, 3));
      #1 check_reads();
      @(posedge clk);
      if (line_we)  begin m_tag[line_idx] = line_tag; m_dat[line_idx] = line_data; m_st[line_idx] = line_state;
                      m_tk[line_idx] = 1; m_dk[line_idx] = 1; end
      if (data_we)  begin m_dat[data_idx] = data_wdata; m_st[data_idx] = data_state; m_dk[data_idx] = 1; end
      if (state_we) m_st[state_idx] = state_new;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
