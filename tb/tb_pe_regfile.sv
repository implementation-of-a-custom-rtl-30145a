// Self-checking testbench of the PE register file (call stack): random
// push/pop traffic against a queue model, filling it to its 80 entries,
// the overflow flag on a push into a full stack, and clear.
module tb_pe_regfile;
  import bwa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  clear, push, pop, empty, full, overflow;
  call_t din, top;
  logic [6:0] count;
  int checks = 0, failures = 0;
  call_t model[$];
  bit    movf;

  pe_regfile u_dut (.clk, .rst_n, .clear, .push, .push_data(din), .pop, .top,
                    .empty, .full, .count, .overflow);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (empty != (model.size() == 0) || full != (model.size() == 80) ||
        int'(count) != model.size() || overflow != movf ||
        (model.size() > 0 && top != model[$])) begin
      failures++;
      $display("FAIL: size %0d count %0d empty %b full %b ovf %b", model.size(), count,
               empty, full, overflow);
    end
  endtask

  task automatic step(bit ps, bit pp, bit cl);
    @(negedge clk);
    push = ps; pop = pp; clear = cl;
    din  = {$urandom, $urandom, $urandom, $urandom};
    @(posedge clk);
    if (cl) begin
      model.delete(); movf = 0;
    end else if (ps && pp && model.size() > 0) begin
      model[$] = din;
    end else if (pp && !ps && model.size() > 0) begin
      void'(model.pop_back());
    end else if (ps && !pp) begin
      if (model.size() == 80) movf = 1;
      else model.push_back(din);
    end
    #1 check_state();
  endtask

  initial begin
    clear = 0; push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check_state();
    for (int t = 0; t < 3000; t++) begin
      automatic int mode = (t / 300) % 3;   // fill-heavy, pop-heavy, mixed
      automatic bit ps = (mode == 0) ? ($urandom_range(9) < 8) : (mode == 1) ? ($urandom_range(9) < 2)
                                                                   : $urandom_range(1);
      automatic bit pp = !ps || ($urandom_range(9) == 0);
      step(ps, pp, (t % 1000 == 999));
    end
    // fill completely, then one more push
    step(0, 0, 1);
    repeat (81) step(1, 0, 0);
    checks++;
    if (!overflow) begin
      failures++;
      $display("FAIL: overflow flag not set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
