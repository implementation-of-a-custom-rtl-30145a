// Interconnection network between the PE array, the two DDR2 memories, the
// short-read buffer and the output buffer.
//
// Occurrence-array reads. The address generator interleaves suffix-array rows
// over the two memories: row r lives in channel r[0], at word address
// {table, r[31:1]} of 128-bit words (one word = O(A..T,r)), so random rows
// spread evenly over both memories and both can work in parallel. Each
// channel has a round-robin arbiter over the PEs whose request targets it and
// passes at most one request per cycle, tagged with the PE index; the
// channel's responses (any latency, in any order) are steered back to the PE
// named by their tag. A PE has at most one read in flight, so each PE gets at
// most one response per cycle.
//
// Short reads. A round-robin arbiter picks one requesting idle PE per cycle
// and hands it the head of the short-read buffer (rd_data is broadcast,
// pe_rd_valid is per PE).
//
// Results. A round-robin arbiter picks one PE with a result per cycle and
// writes it into the output buffer; a full buffer stalls that PE.
//
// All paths are combinational from request to grant. The two-channel row
// interleave, the tags and the arbitration policy are this design's choices;
// the published architecture gives the network's role and the one-access-per-cycle memory
// pipeline shared by all PEs.
module pe_network
  import bwa_pkg::*;
#(
  parameter int unsigned N_PE = 128,
  parameter int unsigned TAG_W = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // PE memory side
  input  logic [N_PE-1:0]             pe_mem_req_valid,
  output logic [N_PE-1:0]             pe_mem_req_ready,
  input  logic [N_PE-1:0][DW-1:0]     pe_mem_req_row,
  input  table_t [N_PE-1:0]           pe_mem_req_tbl,
  output logic [N_PE-1:0]             pe_mem_resp_valid,
  output occ_row_t [N_PE-1:0]         pe_mem_resp_data,
  // PE short-read side
  input  logic [N_PE-1:0]             pe_rd_req,
  output logic [N_PE-1:0]             pe_rd_valid,
  output read_t                       pe_rd_data,
  // PE result side
  input  logic [N_PE-1:0]             pe_res_valid,
  output logic [N_PE-1:0]             pe_res_ready,
  input  result_t [N_PE-1:0]          pe_res_data,
  // DDR2 channels 0 and 1
  output logic [1:0]                  ddr_req_valid,
  input  logic [1:0]                  ddr_req_ready,
  output logic [1:0][ADDR_W-1:0]      ddr_req_addr,
  output logic [1:0][TAG_W-1:0]       ddr_req_tag,
  input  logic [1:0]                  ddr_resp_valid,
  input  logic [1:0][TAG_W-1:0]       ddr_resp_tag,
  input  occ_row_t [1:0]              ddr_resp_data,
  // short-read buffer
  input  logic                        sr_valid,
  output logic                        sr_ready,
  input  read_t                       sr_data,
  // output buffer
  output logic                        ob_valid,
  input  logic                        ob_ready,
  output result_t                     ob_data
);

  // ------------------------------------------------------ occurrence reads
  logic [1:0][N_PE-1:0]  ch_req, ch_grant;
  logic [1:0][TAG_W-1:0] ch_idx;
  logic [1:0]            ch_any;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    always_comb begin
      for (int p = 0; p < N_PE; p++)
        ch_req[c][p] = pe_mem_req_valid[p] && (pe_mem_req_row[p][0] == c[0]);
    end

    rr_arbiter #(.N(N_PE)) u_arb (
      .clk, .rst_n, .req(ch_req[c]), .accept(ddr_req_ready[c]),
      .grant(ch_grant[c]), .grant_idx(ch_idx[c]), .any(ch_any[c])
    );

    // address generation: {table, row / 2}
    assign ddr_req_valid[c] = ch_any[c];
    assign ddr_req_tag[c]   = ch_idx[c];
    assign ddr_req_addr[c]  = {pe_mem_req_tbl[ch_idx[c]], pe_mem_req_row[ch_idx[c]][DW-1:1]};
  end

  always_comb begin
    for (int p = 0; p < N_PE; p++) begin
      pe_mem_req_ready[p]  = (ch_grant[0][p] && ddr_req_ready[0]) ||
                             (ch_grant[1][p] && ddr_req_ready[1]);
      pe_mem_resp_valid[p] = 1'b0;
      pe_mem_resp_data[p]  = ddr_resp_data[0];
      if (ddr_resp_valid[1] && int'(ddr_resp_tag[1]) == p) begin
        pe_mem_resp_valid[p] = 1'b1;
        pe_mem_resp_data[p]  = ddr_resp_data[1];
      end else if (ddr_resp_valid[0] && int'(ddr_resp_tag[0]) == p) begin
        pe_mem_resp_valid[p] = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ short reads
  logic [N_PE-1:0]  rd_grant;
  logic             rd_any;

  rr_arbiter #(.N(N_PE)) u_rd_arb (
    .clk, .rst_n, .req(pe_rd_req), .accept(sr_valid),
    .grant(rd_grant), .grant_idx(), .any(rd_any)
  );

  assign sr_ready    = rd_any;
  assign pe_rd_valid = sr_valid ? rd_grant : '0;
  assign pe_rd_data  = sr_data;

  // ---------------------------------------------------------------- results
  logic [N_PE-1:0]  res_grant;
  logic [TAG_W-1:0] res_idx;
  logic             res_any;

  rr_arbiter #(.N(N_PE)) u_res_arb (
    .clk, .rst_n, .req(pe_res_valid), .accept(ob_ready),
    .grant(res_grant), .grant_idx(res_idx), .any(res_any)
  );

  assign ob_valid     = res_any;
  assign ob_data      = pe_res_data[res_idx];
  assign pe_res_ready = ob_ready ? res_grant : '0;

endmodule
