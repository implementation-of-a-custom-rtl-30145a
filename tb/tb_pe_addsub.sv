// Self-checking testbench of the PE ADD/SUB unit: random and corner operands
// for a + b + cin and a - b, compared with 64-bit arithmetic.
module tb_pe_addsub;
  logic [31:0] a, b, y;
  logic        sub, cin;
  int checks = 0, failures = 0;

  pe_addsub u_dut (.a, .b, .sub, .cin, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned e;
    for (int t = 0; t < 2000; t++) begin
      a   = (t < 4) ? 32'hFFFF_FFFF * (t & 1) : $urandom;
      b   = (t < 4) ? 32'd1 : (t % 3 == 0) ? $urandom_range(7) : $urandom;
      sub = $urandom_range(1);
      cin = $urandom_range(1);
      #1;
      e = sub ? (longint'(a) - longint'(b)) : (longint'(a) + longint'(b) + longint'(cin));
      checks++;
      if (y !== e[31:0]) begin
        failures++;
        $display("FAIL: a=%h b=%h sub=%b cin=%b y=%h exp=%h", a, b, sub, cin, y, e[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
