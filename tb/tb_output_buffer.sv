// Self-checking testbench of the output buffer: PE-side writes and host
// reads against a queue model; order, count, almost-full, the stall on a
// full buffer and the stall counter are checked every cycle.
module tb_output_buffer;
  import bwa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    wr_valid, wr_ready, rd_valid, rd_ready, almost_full;
  result_t wr_data, rd_data;
  logic [10:0] count;
  logic [31:0] stall_cycles;
  int checks = 0, failures = 0, stalls = 0;
  result_t model[$];

  output_buffer u_dut (.clk, .rst_n, .wr_valid, .wr_ready, .wr_data, .rd_valid,
                       .rd_ready, .rd_data, .count, .almost_full, .stall_cycles);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12000; t++) begin
      automatic int phase = (t / 3000) % 2;   // 0: host slow, 1: host fast
      @(negedge clk);
      wr_valid = $urandom_range(9) < 6;
      rd_ready = (phase == 0) ? ($urandom_range(9) < 2) : ($urandom_range(9) < 9);
      wr_data  = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (wr_ready != (model.size() < 1024) || rd_valid != (model.size() > 0) ||
          int'(count) != model.size() || almost_full != (model.size() >= 896) ||
          int'(stall_cycles) != stalls || (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        $display("FAIL: cycle %0d size %0d count %0d stalls %0d/%0d", t, model.size(),
                 count, stall_cycles, stalls);
      end
      @(posedge clk);
      if (wr_valid && !wr_ready) stalls++;
      if (rd_valid && rd_ready) void'(model.pop_front());
      if (wr_valid && wr_ready) model.push_back(wr_data);
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL: no stall on full buffer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
