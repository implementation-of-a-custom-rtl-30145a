// Short-read buffer: on-chip FIFO of short reads waiting to be mapped.
//
// The host writes whole reads (bwa_pkg::read_t) through `wr_*`; the
// interconnection network takes the oldest read through `rd_*` and hands it
// to an idle PE. Because the host streams reads in while earlier ones are
// being mapped, the buffer raises `low` when at most LOW_MARK reads remain so
// the host knows to send more. Writes into a full buffer are refused
// (wr_ready low). Both ports are valid/ready, one read per cycle each way;
// `rd_data` is the head entry, available combinationally.
// The FIFO organisation, its depth and the low-water flag are this design's
// own; the published architecture gives only the buffer's role.
module short_read_buffer
  import bwa_pkg::*;
#(
  parameter int unsigned DEPTH    = 256,
  parameter int unsigned LOW_MARK = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_valid,
  output logic                       wr_ready,
  input  read_t                      wr_data,
  output logic                       rd_valid,
  input  logic                       rd_ready,
  output read_t                      rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       low
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  read_t         mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign wr_ready = (count != CW'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr];
  assign low      = (count <= CW'(LOW_MARK));
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (int'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (int'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

endmodule
