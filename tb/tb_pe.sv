// Self-checking testbench of one processing element.
//
// The testbench plays the short-read buffer, the memory (occurrence rows of
// a bwa_index, with a fixed latency and random refusals) and the output
// buffer (with random back-pressure). It checks:
//  - the worked example X = CCTGAG, W = CGA, one allowed difference: exactly
//    the three intervals [5,5], [6,6] and [3,3], each with no difference left;
//  - random reads with up to two differences against the software model;
//  - a second PE with a 3-entry register file reports the overflow.
module tb_pe;
  import bwa_pkg::*;
  import bwa_ref_pkg::*;

  localparam int LAT = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bwa_index ix;

  // two PEs: u_dut (default depth) and u_small (3-entry register file)
  logic [1:0]      rd_req, rd_valid, mreq_v, mreq_r, mresp_v, res_v, res_r, busy;
  read_t           rd_data;
  logic [1:0][31:0] mreq_row;
  table_t [1:0]    mreq_tbl;
  occ_row_t [1:0]  mresp_d;
  result_t [1:0]   res_d;
  logic [3:0][31:0] cfg_c;
  logic [31:0]     cfg_last;

  pe u_dut (
    .clk, .rst_n, .cfg_c, .cfg_last_row(cfg_last),
    .rd_req(rd_req[0]), .rd_valid(rd_valid[0]), .rd_data,
    .mem_req_valid(mreq_v[0]), .mem_req_ready(mreq_r[0]), .mem_req_row(mreq_row[0]),
    .mem_req_tbl(mreq_tbl[0]), .mem_resp_valid(mresp_v[0]), .mem_resp_data(mresp_d[0]),
    .res_valid(res_v[0]), .res_ready(res_r[0]), .res_data(res_d[0]), .busy(busy[0])
  );

  pe #(.RF_DEPTH(3)) u_small (
    .clk, .rst_n, .cfg_c, .cfg_last_row(cfg_last),
    .rd_req(rd_req[1]), .rd_valid(rd_valid[1]), .rd_data,
    .mem_req_valid(mreq_v[1]), .mem_req_ready(mreq_r[1]), .mem_req_row(mreq_row[1]),
    .mem_req_tbl(mreq_tbl[1]), .mem_resp_valid(mresp_v[1]), .mem_resp_data(mresp_d[1]),
    .res_valid(res_v[1]), .res_ready(res_r[1]), .res_data(res_d[1]), .busy(busy[1])
  );

  // memory responders
  for (genvar p = 0; p < 2; p++) begin : g_mem
    int       wait_cnt = -1;
    occ_row_t pend;
    always @(posedge clk) begin
      mresp_v[p] <= 1'b0;
      mreq_r[p]  <= ($urandom_range(3) != 0);
      if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
      if (wait_cnt == 1) begin
        mresp_v[p] <= 1'b1;
        mresp_d[p] <= pend;
      end
      if (mreq_v[p] && mreq_r[p]) begin
        if (wait_cnt > 0) begin
          failures++;
          $display("FAIL: PE %0d issued a second memory request", p);
        end
        pend     <= (mreq_tbl[p] == TBL_OREV) ? ix.occr[mreq_row[p]] : ix.occ[mreq_row[p]];
        wait_cnt <= LAT;
      end
    end
  end

  always @(posedge clk) res_r <= {$urandom_range(2) != 0, $urandom_range(2) != 0};

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic use_index(byte seq[]);
    ix       = new(seq);
    cfg_c    = ix.c;
    cfg_last = ix.last_row();
  endtask

  // Give read `r` to PE p, collect its hits until the end record.
  task automatic run_read(int p, read_t r, ref string got[$], output bit ovf);
    @(negedge clk);
    while (!rd_req[p]) @(negedge clk);
    rd_data     = r;
    rd_valid[p] = 1'b1;
    @(negedge clk);
    rd_valid[p] = 1'b0;
    forever begin
      @(posedge clk);
      if (res_v[p] && res_r[p]) begin
        if (res_d[p].id != r.id) begin
          failures++;
          $display("FAIL: result id %0d, expected %0d", res_d[p].id, r.id);
        end
        if (res_d[p].kind == RES_END) begin
          ovf = res_d[p].overflow;
          break;
        end
        got.push_back(hit_key(res_d[p]));
      end
    end
  endtask

  function automatic bit same_multiset(string a[$], string b[$]);
    a.sort();
    b.sort();
    if (a.size() != b.size()) return 0;
    foreach (a[j]) if (a[j] != b[j]) return 0;
    return 1;
  endfunction

  initial begin
    byte    x[], w[];
    string  got[$], exp[$];
    bit     ovf;
    read_t  r;
    rd_valid = '0;
    rd_data  = '0;
    use_index('{1, 1, 3, 2, 0, 2});   // CCTGAG
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- worked example: W = CGA, one difference allowed
    w = '{1, 2, 0};
    r = pack_read(7, w, 1);
    got.delete();
    run_read(0, r, got, ovf);
    exp = '{"5:5:0", "6:6:0", "3:3:0"};
    checks++;
    if (!same_multiset(got, exp) || ovf) begin
      failures++;
      $display("FAIL: example gave %p", got);
    end

    // ---- the 3-entry register file overflows on the same read
    got.delete();
    run_read(1, r, got, ovf);
    checks++;
    if (!ovf) begin
      failures++;
      $display("FAIL: overflow not reported");
    end

    // ---- random reads against the software model
    x = new[400];
    foreach (x[j]) x[j] = byte'($urandom_range(3));
    use_index(x);
    for (int t = 0; t < 40; t++) begin
      automatic int len = $urandom_range(8, 40);
      automatic int zmax = $urandom_range(0, 2);
      make_read(ix, len, $urandom_range(0, 2), w);
      r = pack_read(100 + t, w, zmax);
      exp.delete();
      ix.map_read(w, len, zmax, exp);
      got.delete();
      run_read(0, r, got, ovf);
      checks++;
      if (ovf || !same_multiset(got, exp)) begin
        failures++;
        $display("FAIL: read %0d len %0d z %0d: got %0d hits, expected %0d (ovf %0d)",
                 t, len, zmax, got.size(), exp.size(), ovf);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
