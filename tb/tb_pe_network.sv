// Self-checking testbench of the interconnection network with 4 PE ports.
//
// Four PE models issue random occurrence-row reads (one in flight each) to
// two DDR2 channel models whose words encode their own channel and address;
// each response is checked for the right PE, channel ({row[0]}) and address
// ({table, row >> 1}). Short reads from a queue are handed to requesting PEs
// (one per cycle, in order), and PE results are merged into an output queue
// with random back-pressure; every one must arrive exactly once. Also
// counted: cycles in which both memories accepted a request, and grants
// refused to a waiting PE because another PE won.
module tb_pe_network;
  import bwa_pkg::*;
  localparam int N = 4;
  localparam int TW = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0]            mreq_v, mreq_r, mresp_v, rd_req, rd_v, res_v, res_r;
  logic [N-1:0][DW-1:0]    mreq_row;
  table_t [N-1:0]          mreq_tbl;
  occ_row_t [N-1:0]        mresp_d;
  read_t                   rd_data, sr_data;
  result_t [N-1:0]         res_d;
  result_t                 ob_data;
  logic [1:0]              dq_v, dq_r, dr_v;
  logic [1:0][ADDR_W-1:0]  dq_addr;
  logic [1:0][TW-1:0]      dq_tag, dr_tag;
  occ_row_t [1:0]          dr_d;
  logic                    sr_valid, sr_ready, ob_valid, ob_ready;

  pe_network #(.N_PE(N)) u_dut (
    .clk, .rst_n,
    .pe_mem_req_valid(mreq_v), .pe_mem_req_ready(mreq_r), .pe_mem_req_row(mreq_row),
    .pe_mem_req_tbl(mreq_tbl), .pe_mem_resp_valid(mresp_v), .pe_mem_resp_data(mresp_d),
    .pe_rd_req(rd_req), .pe_rd_valid(rd_v), .pe_rd_data(rd_data),
    .pe_res_valid(res_v), .pe_res_ready(res_r), .pe_res_data(res_d),
    .ddr_req_valid(dq_v), .ddr_req_ready(dq_r), .ddr_req_addr(dq_addr), .ddr_req_tag(dq_tag),
    .ddr_resp_valid(dr_v), .ddr_resp_tag(dr_tag), .ddr_resp_data(dr_d),
    .sr_valid, .sr_ready, .sr_data, .ob_valid, .ob_ready, .ob_data
  );

  for (genvar c = 0; c < 2; c++) begin : g_ddr
    ddr2_model #(.LAT(4 + 3*c), .TAG_W(TW), .STALL_PCT(20)) u_ddr (
      .clk, .rst_n, .req_valid(dq_v[c]), .req_ready(dq_r[c]), .req_addr(dq_addr[c]),
      .req_tag(dq_tag[c]), .resp_valid(dr_v[c]), .resp_tag(dr_tag[c]), .resp_data(dr_d[c])
    );
  end

  initial begin
    for (int a = 0; a < 64; a++)
      for (int t = 0; t < 2; t++) begin
        automatic int unsigned addr = {t[0], 31'(a)};
        g_ddr[0].u_ddr.mem[addr] = {32'd0, addr, 32'hC0FFEE00, 32'd0};
        g_ddr[1].u_ddr.mem[addr] = {32'd1, addr, 32'hC0FFEE00, 32'd1};
      end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- PE models
  int both_busy = 0, lost_arb = 0, mem_done[N], res_sent[N];
  bit waiting[N];
  int exp_ch[N];
  int unsigned exp_addr[N];
  read_t   srq[$];
  int      res_seen[int];

  always @(posedge clk) if (rst_n) begin
    if (dq_v[0] && dq_r[0] && dq_v[1] && dq_r[1]) both_busy++;
    for (int p = 0; p < N; p++) begin
      if (mreq_v[p] && !mreq_r[p] && dq_r[mreq_row[p][0]]) lost_arb++;
      if (mresp_v[p]) begin
        checks++;
        if (!waiting[p] || mresp_d[p] != {32'(exp_ch[p]), exp_addr[p], 32'hC0FFEE00, 32'(exp_ch[p])}) begin
          failures++;
          $display("FAIL: PE %0d got %h exp ch %0d addr %h sz %0d", p, mresp_d[p], exp_ch[p], exp_addr[p], g_ddr[0].u_ddr.mem.size());
        end
        waiting[p] = 0;
        mem_done[p]++;
      end
      if (mreq_v[p] && mreq_r[p]) begin
        waiting[p]  = 1;
        exp_ch[p]   = mreq_row[p][0];
        exp_addr[p] = {mreq_tbl[p], mreq_row[p][31:1]};
        mreq_v[p]  <= 1'b0;
      end else if (!mreq_v[p] && !waiting[p] && $urandom_range(3) == 0) begin
        mreq_v[p]   <= 1'b1;
        mreq_row[p] <= $urandom_range(127);
        mreq_tbl[p] <= table_t'($urandom_range(1));
      end
      // short reads
      if (rd_v[p]) begin
        checks++;
        if (!rd_req[p] || srq.size() == 0 || rd_data != srq[0]) begin
          failures++;
          $display("FAIL: PE %0d short read mismatch", p);
        end
      end
      rd_req[p] <= rd_v[p] ? 1'b0 : (rd_req[p] || $urandom_range(7) == 0);
      // results
      if (res_v[p] && res_r[p]) begin
        res_v[p] <= 1'b0;
        res_sent[p]++;
      end else if (!res_v[p] && $urandom_range(2) == 0 && res_sent[p] < 200) begin
        res_v[p]    <= 1'b1;
        res_d[p]    <= '0;
        res_d[p].id <= p * 1000 + res_sent[p];
      end
    end
    if ($countones(rd_v) > 1 || (rd_v != 0) != (sr_valid && sr_ready)) begin
      failures++;
      $display("FAIL: short-read handout not one per pop");
    end
    if (sr_valid && sr_ready) void'(srq.pop_front());
    if (srq.size() < 3) begin
      automatic read_t r = '0;
      r.id = $urandom;
      r.bases = {MAX_READ_LEN/16{$urandom}};
      srq.push_back(r);
    end
    if (ob_valid && ob_ready) begin
      checks++;
      if (res_seen.exists(ob_data.id)) begin
        failures++;
        $display("FAIL: result %0d twice", ob_data.id);
      end
      res_seen[ob_data.id] = 1;
    end
    ob_ready <= $urandom_range(3) != 0;
  end

  assign sr_valid = (srq.size() > 0);
  assign sr_data  = srq.size() > 0 ? srq[0] : '0;

  initial begin
    mreq_v = '0; rd_req = '0; res_v = '0; ob_ready = 0;
    for (int p = 0; p < N; p++) begin waiting[p] = 0; mem_done[p] = 0; res_sent[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (6000) @(posedge clk);
    for (int p = 0; p < N; p++) begin
      checks++;
      if (mem_done[p] < 50) begin
        failures++;
        $display("FAIL: PE %0d served only %0d times", p, mem_done[p]);
      end
    end
    checks++;
    if (res_seen.size() != 4 * 200 || both_busy == 0 || lost_arb == 0) begin
      failures++;
      $display("FAIL: results %0d, both-busy %0d, lost %0d", res_seen.size(), both_busy, lost_arb);
    end
    $display("parallel channel cycles %0d, lost arbitrations %0d", both_busy, lost_arb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
