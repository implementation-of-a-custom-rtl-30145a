// Register file of a processing element: the stack of pending InexRecur calls.
//
// Every expanded call of InexRecur(W,i,z,k,l) produces up to nine new calls;
// their parameters (i,z,k,l) are pushed here, and the PE pops the next call
// when it has finished one, so the search runs depth first. The entry on top
// is always visible on `top` (valid when `empty` is low).
//
// push and pop are single-cycle. A push into a full stack is dropped and sets
// the sticky `overflow` flag, which `clear` resets together with the stack.
// A push and a pop in the same cycle replace the top entry.
//
// DEPTH = 80 entries of 4 x 32 bits is 1.25 kB, the on-chip memory the
// published architecture reports per PE; that this memory holds exactly this stack is this
// design's reading.
module pe_regfile
  import bwa_pkg::*;
#(
  parameter int unsigned DEPTH = 80
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       push,
  input  call_t                      push_data,
  input  logic                       pop,
  output call_t                      top,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);

  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  call_t         mem [DEPTH];
  logic [CW-1:0] sp;
  logic [AW-1:0] top_idx;

  assign empty   = (sp == '0);
  assign full    = (sp == CW'(DEPTH));
  assign count   = sp;
  assign top_idx = empty ? '0 : AW'(sp - 1'b1);
  assign top     = mem[top_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp       <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      sp       <= '0;
      overflow <= 1'b0;
    end else if (push && pop && !empty) begin
      // sp unchanged, top entry replaced below
    end else if (pop && !empty) begin
      sp <= sp - 1'b1;
    end else if (push && !pop) begin
      if (full) overflow <= 1'b1;
      else      sp       <= sp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!clear) begin
      if (push && pop && !empty)    mem[top_idx]  <= push_data;
      else if (push && !pop && !full) mem[AW'(sp)] <= push_data;
    end
  end

endmodule
