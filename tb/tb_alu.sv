// Self-checking testbench for alu: every operation on corner values and 200
// random operand pairs, against results computed in the testbench with
// integer arithmetic; Zero is checked on every case, including a - a.
module tb_alu;
  import mc_pkg::*;
  word_t a, b, result;
  alu_op_t op;
  logic zero;
  int checks = 0, failures = 0;

  alu dut (.*);

  function automatic word_t ref_alu(alu_op_t o, word_t x, word_t y);
    longint sx, sy;
    sx = longint'($signed(x)); sy = longint'($signed(y));
    case (o)
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_ADD: return word_t'(longint'(x) + longint'(y));
      ALU_SUB: return word_t'(longint'(x) - longint'(y));
      ALU_SLT: return (sx < sy) ? 32'd1 : 32'd0;
      default: return '0;
    endcase
  endfunction

  task automatic try(alu_op_t o, word_t x, word_t y);
    word_t e;
    op = o; a = x; b = y; #1;
    e = ref_alu(o, x, y);
    checks += 2;
    if (result !== e) begin failures++; $display("%s %h,%h: got %h expected %h", o.name(), x, y, result, e); end
    if (zero !== (e == 0)) begin failures++; $display("%s %h,%h: zero=%b", o.name(), x, y, zero); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_t ops [5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};
    word_t corner [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h0000_0004};
    foreach (ops[k]) foreach (corner[i]) foreach (corner[j]) try(ops[k], corner[i], corner[j]);
    for (int i = 0; i < 200; i++) begin
      word_t x;
      x = $urandom();
      foreach (ops[k]) try(ops[k], x, $urandom());
      try(ALU_SUB, x, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
