// tb_qalu: checks every QALU operation on random and corner 1Q8 operands
// against integer/real reference arithmetic (round to nearest, saturate).
module tb_qalu;
  import qalu_pkg::*;
  int checks = 0, failures = 0;
  qalu_op_e op;
  q_t a, b, y;
  logic zero, neg, ovf;

  qalu dut (.op, .a, .b, .y, .zero, .neg, .ovf);

  function automatic int sat(input longint v, output bit o);
    o = (v > 255) || (v < -256);
    if (v > 255) return 255;
    if (v < -256) return -256;
    return int'(v);
  endfunction

  task automatic check(input qalu_op_e o, input int ia, input int ib);
    int exp_v; bit exp_o; real r;
    op = o; a = q_t'(ia); b = q_t'(ib);
    #1;
    exp_o = 0;
    case (o)
      OP_ADD: exp_v = sat(ia + ib, exp_o);
      OP_SUB: exp_v = sat(ia - ib, exp_o);
      OP_MUL: begin
        r = real'(ia) * real'(ib) / 128.0;
        exp_v = sat(longint'($floor(r + 0.5)), exp_o);
      end
      OP_NEG: exp_v = sat(-ia, exp_o);
      OP_ABS: exp_v = sat(ia < 0 ? -ia : ia, exp_o);
      OP_MAX: exp_v = ia > ib ? ia : ib;
      OP_MIN: exp_v = ia < ib ? ia : ib;
      OP_AND: exp_v = int'($signed(q_t'(ia & ib)));
      OP_OR:  exp_v = int'($signed(q_t'(ia | ib)));
      OP_XOR: exp_v = int'($signed(q_t'(ia ^ ib)));
      OP_NOT: exp_v = int'($signed(q_t'(~ia)));
      OP_SHL: exp_v = sat(longint'(ia) * (longint'(1) << (ib & 7)), exp_o);
      OP_SHR: exp_v = int'($floor(real'(ia) / real'(1 << (ib & 7))));
      default: exp_v = 0;
    endcase
    checks++;
    if (int'(y) != exp_v || ovf != exp_o || zero != (exp_v == 0) || neg != (exp_v < 0)) begin
      failures++;
      $display("FAIL op=%s a=%0d b=%0d y=%0d ovf=%0b exp=%0d/%0b", o.name(), ia, ib, y, ovf, exp_v, exp_o);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qalu_op_e o;
    // corner values: +1, -1, pi/4 and -pi/4 of the 1Q8 format table
    check(OP_ADD, 128, 128);   // 2.0 saturates
    check(OP_MUL, 128, -128);  // 1 * -1
    check(OP_MUL, 100, 100);   // (pi/4)^2
    check(OP_MUL, -256, -256); // saturates at +2
    check(OP_SUB, -256, 1);
    check(OP_ADD, 34, 34);     // 0.2656 + 0.2656
    for (int i = 0; i < 4000; i++) begin
      o = qalu_op_e'($urandom_range(0, 12));
      check(o, int'($urandom_range(0, 511)) - 256, int'($urandom_range(0, 511)) - 256);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
