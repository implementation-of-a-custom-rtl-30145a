// Output buffer: FIFO of mapping results that the host reads and empties.
//
// PEs write result records (bwa_pkg::result_t: a suffix-array interval hit or
// an end-of-read record) through the interconnection network on `wr_*`; the
// host drains them on `rd_*`. The host is expected to empty the buffer before
// it overflows; `almost_full` (at most HEADROOM free entries) tells it to
// hurry. If the buffer is full anyway, `wr_ready` drops and the writing PE
// stalls, so no result is lost; `stall_cycles` counts the cycles a write
// waited. Valid/ready on both sides, one record per cycle each way.
// The stall on full and the counters are this design's own choices.
module output_buffer
  import bwa_pkg::*;
#(
  parameter int unsigned DEPTH    = 1024,
  parameter int unsigned HEADROOM = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_valid,
  output logic                       wr_ready,
  input  result_t                    wr_data,
  output logic                       rd_valid,
  input  logic                       rd_ready,
  output result_t                    rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       almost_full,
  output logic [31:0]                stall_cycles
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  result_t       mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign wr_ready    = (count != CW'(DEPTH));
  assign rd_valid    = (count != '0);
  assign rd_data     = mem[rptr];
  assign almost_full = (count >= CW'(DEPTH - HEADROOM));
  assign do_wr       = wr_valid && wr_ready;
  assign do_rd       = rd_valid && rd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr         <= '0;
      rptr         <= '0;
      count        <= '0;
      stall_cycles <= '0;
    end else begin
      if (do_wr) wptr <= (int'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (int'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
      if (wr_valid && !wr_ready) stall_cycles <= stall_cycles + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

endmodule
