// Self-checking testbench of the PE comparator: for each operation the
// signed comparison is recomputed from the selected operands, including
// negative i and z, equal k and l, and values around zero.
module tb_pe_comparator;
  import bwa_pkg::*;
  logic [31:0] z, i, k, d, l;
  cmp_op_t     op;
  logic        res;
  int checks = 0, failures = 0;

  pe_comparator u_dut (.op, .z, .i, .k, .d, .l, .res);

  function automatic logic [31:0] pick();
    case ($urandom_range(3))
      0: return $urandom_range(4) - 2;
      1: return $urandom_range(100);
      2: return 32'hFFFF_FFFF - $urandom_range(3);
      default: return $urandom;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e;
    for (int t = 0; t < 3000; t++) begin
      z = pick(); i = pick(); k = pick(); d = pick(); l = pick();
      if (t % 5 == 0) l = k;
      op = cmp_op_t'(t % 3);
      #1;
      case (op)
        CMP_Z_LT_D: e = int'(z) < int'(d);
        CMP_I_LT_0: e = int'(i) < 0;
        default:    e = int'(k) <= int'(l);
      endcase
      checks++;
      if (res !== e) begin
        failures++;
        $display("FAIL: op=%s z=%0d i=%0d k=%0d d=%0d l=%0d res=%b", op.name(),
                 int'(z), int'(i), int'(k), int'(d), int'(l), res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
