// Full-size testbench of the accelerator: all parameters at their defaults
// (128 PEs, 80-entry register files, 256-read and 1024-record buffers).
//
// The workload is the size the design was evaluated with: 100 short reads
// against a reference of a few thousand bases (here 2000 random bases,
// indexed in the testbench). Reads are 30 to 60 bases with up to two
// differences. Every read's suffix-array intervals are compared with the
// software model of the algorithm. While at least half of the PEs are busy,
// some PE must be requesting a memory access in every cycle (the memory, not
// the PEs, limits the rate); accesses per cycle are reported.
module tb_bwa_accel_full;
  import bwa_pkg::*;
  import bwa_ref_pkg::*;

  localparam int N       = 128;
  localparam int TW      = (N > 1) ? $clog2(N) : 1;
  localparam int NREADS  = 100;
  localparam int REFLEN  = 2000;
  localparam int MINLEN  = 30;
  localparam int MAXLEN  = 60;
  localparam int ZMAX    = 2;
  localparam int STALL   = 0;   // % of cycles a DDR2 channel refuses
  localparam int SLOWHOST = 0; // 1: host drains results slowly at times

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][DW-1:0]      cfg_c;
  logic [DW-1:0]           cfg_last_row;
  logic                    host_rd_valid, host_rd_ready, sr_low;
  read_t                   host_rd_data;
  logic                    host_res_valid, host_res_ready, ob_almost_full;
  result_t                 host_res_data;
  logic [31:0]             ob_stall_cycles;
  logic [1:0]              dq_v, dq_r, dr_v;
  logic [1:0][ADDR_W-1:0]  dq_addr;
  logic [1:0][TW-1:0]      dq_tag, dr_tag;
  occ_row_t [1:0]          dr_d;
  logic [N-1:0]            pe_busy;

  bwa_accel u_dut (
    .clk, .rst_n, .cfg_c, .cfg_last_row,
    .host_rd_valid, .host_rd_ready, .host_rd_data, .sr_count(), .sr_low,
    .host_res_valid, .host_res_ready, .host_res_data, .ob_count(), .ob_almost_full,
    .ob_stall_cycles,
    .ddr_req_valid(dq_v), .ddr_req_ready(dq_r), .ddr_req_addr(dq_addr), .ddr_req_tag(dq_tag),
    .ddr_resp_valid(dr_v), .ddr_resp_tag(dr_tag), .ddr_resp_data(dr_d),
    .pe_busy
  );

  for (genvar c = 0; c < 2; c++) begin : g_ddr
    ddr2_model #(.LAT(10), .TAG_W(TW), .STALL_PCT(STALL)) u_ddr (
      .clk, .rst_n, .req_valid(dq_v[c]), .req_ready(dq_r[c]), .req_addr(dq_addr[c]),
      .req_tag(dq_tag[c]), .resp_valid(dr_v[c]), .resp_tag(dr_tag[c]), .resp_data(dr_d[c])
    );
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism counters
  longint cycles = 0, ddr_acc[2] = '{0, 0}, both_ch = 0, arb_wait = 0, prunes = 0;
  longint sr_full = 0, sr_low_busy = 0, streamed = 0, ob_af = 0, d_restarts = 0;
  longint many_busy = 0, mem_wanted = 0, many_acc = 0;
  int     overflows = 0, hits = 0;
  bit     mapping = 0;

  for (genvar p = 0; p < N; p++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (u_dut.g_pe[p].u_pe.cmp_op == CMP_Z_LT_D && u_dut.g_pe[p].u_pe.cmp_res) prunes++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (mapping) cycles++;
    for (int c = 0; c < 2; c++) if (dq_v[c] && dq_r[c]) ddr_acc[c]++;
    if (dq_v[0] && dq_r[0] && dq_v[1] && dq_r[1]) both_ch++;
    if (|(u_dut.mem_req_valid & ~u_dut.mem_req_ready)) arb_wait++;
    if (host_rd_valid && !host_rd_ready) sr_full++;
    if (sr_low && |pe_busy) sr_low_busy++;
    if (host_rd_valid && host_rd_ready && |pe_busy) streamed++;
    if (ob_almost_full) ob_af++;
    if ($countones(pe_busy) >= N / 2) begin
      many_busy++;
      if (|dq_v) mem_wanted++;
      many_acc += longint'(dq_v[0] && dq_r[0]) + longint'(dq_v[1] && dq_r[1]);
    end
  end

  // ------------------------------------------------------------------ host
  bwa_index ix;
  byte      reads[NREADS][];
  int       zs[NREADS];
  string    got[int][$];
  bit       ended[int], ovf[int];
  int       n_end = 0;

  // host drains the output buffer
  always @(posedge clk) begin
    if (rst_n && host_res_valid && host_res_ready) begin
      automatic int id = host_res_data.id;
      if (host_res_data.kind == RES_END) begin
        if (ended.exists(id)) begin
          failures++;
          $display("FAIL: read %0d ended twice", id);
        end
        ended[id] = 1;
        ovf[id]   = host_res_data.overflow;
        if (host_res_data.overflow) overflows++;
        n_end++;
      end else begin
        got[id].push_back(hit_key(host_res_data));
        hits++;
      end
    end
    host_res_ready <= (SLOWHOST != 0 && (cycles / 20000) % 2 == 1) ? 1'b0
                                                                   : ($urandom_range(3) != 0);
  end

  function automatic bit same_multiset(string a[$], string b[$]);
    a.sort();
    b.sort();
    if (a.size() != b.size()) return 0;
    foreach (a[j]) if (a[j] != b[j]) return 0;
    return 1;
  endfunction

  function automatic bit is_subset(string a[$], string b[$]);
    int cnt[string];
    foreach (b[j]) cnt[b[j]]++;
    foreach (a[j]) begin
      if (!cnt.exists(a[j]) || cnt[a[j]] == 0) return 0;
      cnt[a[j]]--;
    end
    return 1;
  endfunction

  initial begin
    byte x[];
    host_rd_valid = 0;
    host_rd_data  = '0;
    x = new[REFLEN];
    foreach (x[j]) x[j] = byte'($urandom_range(3));
    ix = new(x);
    cfg_c        = ix.c;
    cfg_last_row = ix.last_row();
    for (int r = 0; r <= ix.n; r++) begin
      automatic int unsigned a = r >> 1;
      if (r % 2 == 0) begin
        g_ddr[0].u_ddr.mem[a]              = ix.occ[r];
        g_ddr[0].u_ddr.mem[a | 32'h8000_0000] = ix.occr[r];
      end else begin
        g_ddr[1].u_ddr.mem[a]              = ix.occ[r];
        g_ddr[1].u_ddr.mem[a | 32'h8000_0000] = ix.occr[r];
      end
    end
    for (int t = 0; t < NREADS; t++) begin
      make_read(ix, $urandom_range(MINLEN, MAXLEN), $urandom_range(0, ZMAX), reads[t]);
      zs[t] = $urandom_range(0, ZMAX);
    end
    repeat (3) @(posedge clk);
    rst_n   = 1;
    mapping = 1;
    // the host streams the reads in while earlier ones are being mapped
    for (int t = 0; t < NREADS; t++) begin
      @(negedge clk);
      host_rd_data  = pack_read(t, reads[t], zs[t]);
      host_rd_valid = 1;
      @(posedge clk);
      while (!host_rd_ready) @(posedge clk);
      @(negedge clk);
      host_rd_valid = 0;
      if (t % 7 == 6) repeat ($urandom_range(5)) @(negedge clk);
    end
    while (n_end < NREADS) @(posedge clk);
    mapping = 0;
    repeat (5) @(posedge clk);

    // ------------------------------------------------- results against model
    for (int t = 0; t < NREADS; t++) begin
      string exp[$];
      exp.delete();
      ix.map_read(reads[t], reads[t].size(), zs[t], exp);
      checks++;
      if (!ended.exists(t)) begin
        failures++;
        $display("FAIL: read %0d never ended", t);
      end else if (ovf[t] ? !is_subset(got[t], exp) : !same_multiset(got[t], exp)) begin
        failures++;
        $display("FAIL: read %0d: %0d hits, expected %0d (overflow %0d)", t, got[t].size(),
                 exp.size(), ovf[t]);
      end
    end
    checks++;
    if (|pe_busy || host_res_valid) begin
      failures++;
      $display("FAIL: accelerator not idle after the last read");
    end

    $display("mapped %0d reads on %0d PEs in %0d cycles: %0d hits, %0d register-file overflows",
             NREADS, N, cycles, hits, overflows);
    $display("DDR2 accesses %0d + %0d (%0.2f per cycle), both channels together %0d cycles",
             ddr_acc[0], ddr_acc[1], real'(ddr_acc[0] + ddr_acc[1]) / real'(cycles), both_ch);
    $display("memory waits %0d, D(i) prunes %0d, reads streamed while mapping %0d",
             arb_wait, prunes, streamed);
    $display("short-read buffer full %0d, low while busy %0d; output buffer almost full %0d, stalls %0d",
             sr_full, sr_low_busy, ob_af, ob_stall_cycles);
    $display("with at least half the PEs busy: %0d cycles, memory requested in %0d, %0.2f accesses per cycle",
             many_busy, mem_wanted, real'(many_acc) / real'(many_busy > 0 ? many_busy : 1));
    // With many PEs working, some PE wants the memory in every cycle.
    checks++;
    if (many_busy == 0 || mem_wanted != many_busy) begin
      failures++;
      $display("FAIL: memory idle while many PEs were busy");
    end
    checks++;
    if (!(arb_wait > 0)) begin
      failures++;
      $display("FAIL: mechanism never happened: memory arbitration wait");
    end
    checks++;
    if (!(both_ch > 0)) begin
      failures++;
      $display("FAIL: mechanism never happened: both DDR2 channels in one cycle");
    end
    checks++;
    if (!(prunes > 0)) begin
      failures++;
      $display("FAIL: mechanism never happened: D(i) prune");
    end
    checks++;
    if (!(hits > 0)) begin
      failures++;
      $display("FAIL: mechanism never happened: hit reported");
    end
    checks++;
    if (!(streamed > 0)) begin
      failures++;
      $display("FAIL: mechanism never happened: read streamed in while mapping");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
