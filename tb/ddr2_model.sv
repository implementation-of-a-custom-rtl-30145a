// Behavioural model of one DDR2 SDRAM channel behind its memory controller,
// as seen by the accelerator: a pipelined read-only port for occurrence rows.
// A request is taken when req_valid and req_ready are both high; its word is
// returned LAT cycles later with the same tag. With STALL_PCT > 0 the port
// randomly refuses requests to exercise back-pressure. The testbench fills
// `mem` directly (unwritten words read as zero). Not synthesizable.
module ddr2_model
  import bwa_pkg::*;
#(
  parameter int unsigned LAT       = 6,
  parameter int unsigned TAG_W     = 7,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [TAG_W-1:0]  req_tag,
  output logic              resp_valid,
  output logic [TAG_W-1:0]  resp_tag,
  output occ_row_t          resp_data
);

  occ_row_t mem [int unsigned];

  logic [LAT-1:0]            pv;
  logic [LAT-1:0][TAG_W-1:0] ptag;
  occ_row_t [LAT-1:0]        pdata;
  longint unsigned           accepted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ready <= 1'b1;
      pv        <= '0;
      accepted  <= 0;
    end else begin
      req_ready <= ($urandom_range(99) >= STALL_PCT);
      pv    <= {pv[LAT-2:0], req_valid && req_ready};
      ptag  <= {ptag[LAT-2:0], req_tag};
      pdata <= {pdata[LAT-2:0], mem.exists(req_addr) ? mem[req_addr] : occ_row_t'(0)};
      if (req_valid && req_ready) accepted <= accepted + 1;
    end
  end

  assign resp_valid = pv[LAT-1];
  assign resp_tag   = ptag[LAT-1];
  assign resp_data  = pdata[LAT-1];

endmodule
