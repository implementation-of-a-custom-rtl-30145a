// Self-checking testbench of the short-read buffer: random host writes and
// PE-side reads against a queue model; order, count, full (write refused)
// and the low-water flag are checked every cycle.
module tb_short_read_buffer;
  import bwa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  wr_valid, wr_ready, rd_valid, rd_ready, low;
  read_t wr_data, rd_data;
  logic [8:0] count;
  int checks = 0, failures = 0, fulls = 0;
  read_t model[$];

  short_read_buffer u_dut (.clk, .rst_n, .wr_valid, .wr_ready, .wr_data,
                           .rd_valid, .rd_ready, .rd_data, .count, .low);

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
    for (int t = 0; t < 6000; t++) begin
      automatic int phase = (t / 1000) % 2;   // 0: host faster, 1: PEs faster
      @(negedge clk);
      wr_valid = (phase == 0) ? ($urandom_range(9) < 8) : ($urandom_range(9) < 3);
      rd_ready = (phase == 0) ? ($urandom_range(9) < 3) : ($urandom_range(9) < 8);
      wr_data  = '0;
      wr_data.id    = $urandom;
      wr_data.len   = LEN_W'($urandom);
      wr_data.bases = {MAX_READ_LEN/16{$urandom}};
      #1;
      checks++;
      if (wr_ready != (model.size() < 256) || rd_valid != (model.size() > 0) ||
          int'(count) != model.size() || low != (model.size() <= 64) ||
          (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        $display("FAIL: cycle %0d size %0d count %0d", t, model.size(), count);
      end
      if (!wr_ready) fulls++;
      @(posedge clk);
      if (rd_valid && rd_ready) void'(model.pop_front());
      if (wr_valid && wr_ready) model.push_back(wr_data);
    end
    checks++;
    if (fulls == 0) begin
      failures++;
      $display("FAIL: buffer never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
