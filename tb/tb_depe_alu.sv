// tb_depe_alu: self-checking test of the DEPE ALU.
// Drives random and corner-case operands through add, sub, the fixed-point
// multiply and the reserved code, and compares with results computed here in
// 64-bit integer arithmetic (the product is divided by 2^16 with rounding
// toward minus infinity, which equals an arithmetic shift).
module tb_depe_alu;
  import depe_pkg::*;

  logic [31:0] a, b, y;
  op_e         op;
  int checks = 0, failures = 0;

  depe_alu dut (.op, .a, .b, .y);

  function automatic logic [31:0] model(op_e o, logic [31:0] x, logic [31:0] z);
    longint sx = longint'(signed'(x));
    longint sz = longint'(signed'(z));
    longint p;
    case (o)
      OP_SUB: return 32'(sx - sz);
      OP_MUL: begin
        p = sx * sz;
        // floor division by 65536
        if (p < 0 && (p % 65536) != 0) return 32'((p / 65536) - 1);
        return 32'(p / 65536);
      end
      default: return 32'(sx + sz);
    endcase
  endfunction

  task automatic check(op_e o, logic [31:0] x, logic [31:0] z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== model(o, x, z)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, x, z, y, model(o, x, z));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corner cases: 1.5 * 2.0 = 3.0, -1.5 * 2.0 = -3.0, small negative product
    check(OP_MUL, 32'h0001_8000, 32'h0002_0000);
    check(OP_MUL, 32'hFFFE_8000, 32'h0002_0000);
    check(OP_MUL, 32'hFFFF_FFFF, 32'h0000_0001);
    check(OP_ADD, 32'h7FFF_FFFF, 32'h0000_0001);
    check(OP_SUB, 32'h0000_0000, 32'h0000_0001);
    for (int i = 0; i < 2000; i++) begin
      check(op_e'(i % 4), $urandom, $urandom);
      check(op_e'(i % 4), {{16{1'b0}}, 16'($urandom)}, {{12{1'b1}}, 20'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
