// BWA short-read mapping accelerator: top level.
//
// A one-dimensional array of N_PE processing elements maps different short
// reads in parallel, each running the BWA inexact backward search on its own
// read. The occurrence arrays O (reference) and O' (reversed reference),
// computed offline by the host, sit in two external DDR2 memories that every
// PE shares through the interconnection network; the reads come from the
// on-chip short-read buffer, which the host refills while mapping runs, and
// the results go to the on-chip output buffer, which the host drains.
//
//   host (PCIe)  -> short_read_buffer -> interconnect -> pe[0..N_PE-1]
//   pe[*] <-> interconnect <-> DDR2 channel 0 / 1   (occurrence rows)
//   pe[*]  -> interconnect -> output_buffer -> host (PCIe)
//
// The PCIe link and the DDR2 memory controllers are outside this RTL: their
// sides are the host_* and ddr_* ports. A DDR2 port is a pipelined read
// port: a request (address, tag) is taken when valid and ready are both high;
// the response carries the same tag and may come any number of cycles later,
// and is always accepted. cfg_c holds C(A..T), the number of reference
// symbols (not counting '$') smaller than each base; cfg_last_row is the
// reference length including '$', minus one. Both must be stable while PEs
// are busy.
//
// Structure, the PE count of 128 and the two memories follow the published architecture;
// the buffer depths and all port protocols are this design's choices.
module bwa_accel
  import bwa_pkg::*;
#(
  parameter int unsigned N_PE     = 128,
  parameter int unsigned RF_DEPTH = 80,
  parameter int unsigned SR_DEPTH = 256,
  parameter int unsigned OB_DEPTH = 1024,
  parameter int unsigned TAG_W    = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // configuration
  input  logic [3:0][DW-1:0]             cfg_c,
  input  logic [DW-1:0]                  cfg_last_row,
  // host: short reads in
  input  logic                           host_rd_valid,
  output logic                           host_rd_ready,
  input  read_t                          host_rd_data,
  output logic [$clog2(SR_DEPTH+1)-1:0]  sr_count,
  output logic                           sr_low,
  // host: results out
  output logic                           host_res_valid,
  input  logic                           host_res_ready,
  output result_t                        host_res_data,
  output logic [$clog2(OB_DEPTH+1)-1:0]  ob_count,
  output logic                           ob_almost_full,
  output logic [31:0]                    ob_stall_cycles,
  // DDR2 channels
  output logic [1:0]                     ddr_req_valid,
  input  logic [1:0]                     ddr_req_ready,
  output logic [1:0][ADDR_W-1:0]         ddr_req_addr,
  output logic [1:0][TAG_W-1:0]          ddr_req_tag,
  input  logic [1:0]                     ddr_resp_valid,
  input  logic [1:0][TAG_W-1:0]          ddr_resp_tag,
  input  occ_row_t [1:0]                 ddr_resp_data,
  // status
  output logic [N_PE-1:0]                pe_busy
);

  logic [N_PE-1:0]           mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [N_PE-1:0][DW-1:0]   mem_req_row;
  table_t [N_PE-1:0]         mem_req_tbl;
  occ_row_t [N_PE-1:0]       mem_resp_data;
  logic [N_PE-1:0]           rd_req, rd_valid;
  read_t                     rd_data;
  logic [N_PE-1:0]           res_valid, res_ready;
  result_t [N_PE-1:0]        res_data;

  logic    sr_valid, sr_ready;
  read_t   sr_data;
  logic    ob_valid, ob_ready;
  result_t ob_data;

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    pe #(.RF_DEPTH(RF_DEPTH)) u_pe (
      .clk, .rst_n,
      .cfg_c, .cfg_last_row,
      .rd_req(rd_req[p]), .rd_valid(rd_valid[p]), .rd_data(rd_data),
      .mem_req_valid(mem_req_valid[p]), .mem_req_ready(mem_req_ready[p]),
      .mem_req_row(mem_req_row[p]), .mem_req_tbl(mem_req_tbl[p]),
      .mem_resp_valid(mem_resp_valid[p]), .mem_resp_data(mem_resp_data[p]),
      .res_valid(res_valid[p]), .res_ready(res_ready[p]), .res_data(res_data[p]),
      .busy(pe_busy[p])
    );
  end

  pe_network #(.N_PE(N_PE), .TAG_W(TAG_W)) u_net (
    .clk, .rst_n,
    .pe_mem_req_valid(mem_req_valid), .pe_mem_req_ready(mem_req_ready),
    .pe_mem_req_row(mem_req_row), .pe_mem_req_tbl(mem_req_tbl),
    .pe_mem_resp_valid(mem_resp_valid), .pe_mem_resp_data(mem_resp_data),
    .pe_rd_req(rd_req), .pe_rd_valid(rd_valid), .pe_rd_data(rd_data),
    .pe_res_valid(res_valid), .pe_res_ready(res_ready), .pe_res_data(res_data),
    .ddr_req_valid, .ddr_req_ready, .ddr_req_addr, .ddr_req_tag,
    .ddr_resp_valid, .ddr_resp_tag, .ddr_resp_data,
    .sr_valid, .sr_ready, .sr_data,
    .ob_valid, .ob_ready, .ob_data
  );

  short_read_buffer #(.DEPTH(SR_DEPTH), .LOW_MARK(SR_DEPTH / 4)) u_srbuf (
    .clk, .rst_n,
    .wr_valid(host_rd_valid), .wr_ready(host_rd_ready), .wr_data(host_rd_data),
    .rd_valid(sr_valid), .rd_ready(sr_ready), .rd_data(sr_data),
    .count(sr_count), .low(sr_low)
  );

  output_buffer #(.DEPTH(OB_DEPTH), .HEADROOM(OB_DEPTH / 8)) u_obuf (
    .clk, .rst_n,
    .wr_valid(ob_valid), .wr_ready(ob_ready), .wr_data(ob_data),
    .rd_valid(host_res_valid), .rd_ready(host_res_ready), .rd_data(host_res_data),
    .count(ob_count), .almost_full(ob_almost_full), .stall_cycles(ob_stall_cycles)
  );

endmodule
