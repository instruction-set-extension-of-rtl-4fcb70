// tb_leon3_logic_unit: every operation code of the widened logic unit with
// random operands, compared with reference expressions.
module tb_leon3_logic_unit;
  import ise_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic_op_e   op;
  logic [31:0] a, b, y, e;

  leon3_logic_unit dut (.op, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic_op_e ops [10] = '{LOP_AND, LOP_XOR, LOP_OR, LOP_XNOR, LOP_ANDN, LOP_ORN, LOP_PASS2,
                            LOP_SUBBYTE, LOP_SHIFTROW, LOP_MIXCOL};
    for (int i = 0; i < 100; i++) begin
      a = $urandom; b = $urandom;
      foreach (ops[j]) begin
        op = ops[j];
        case (op)
          LOP_AND:      e = a & b;
          LOP_XOR:      e = a ^ b;
          LOP_OR:       e = a | b;
          LOP_XNOR:     e = a ~^ b;
          LOP_ANDN:     e = a & ~b;
          LOP_ORN:      e = a | ~b;
          LOP_PASS2:    e = b;
          LOP_SUBBYTE:  e = subword(a);
          LOP_SHIFTROW: e = rotbytes(a, int'(b % 4));
          default:      e = mixcol(a);
        endcase
        #1;
        checks++;
        if (y !== e) begin
          failures++;
          $display("FAIL op=%s a=%08h b=%08h y=%08h expected %08h", op.name(), a, b, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
