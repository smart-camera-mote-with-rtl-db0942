// lpa_pe_tb: self-checking test of one processing element.
//
// Drives random control words and memory operands and compares the result,
// the memory write enable, r0 and the flag with a reference model written
// from the operation table (saturating unsigned 10-bit arithmetic, guards,
// compares). A directed part checks single-cycle multiply-accumulate: the
// registers update at the first clock edge after the instruction.
module lpa_pe_tb;
  import ic3d_pkg::*;

  logic clk = 0, rst_n = 0, valid;
  pe_ctrl_t ctrl;
  logic [PIX_W-1:0] mem_c, mem_l, mem_r, res, r0;
  logic we, flag;
  int checks = 0, failures = 0;

  lpa_pe dut (.clk, .rst_n, .valid, .ctrl, .mem_c, .mem_l, .mem_r,
              .res_o(res), .mem_we_o(we), .r0_o(r0), .flag_o(flag));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int m_r0, m_r1, m_flag;

  function automatic int sat(int v);
    return (v > 1023) ? 1023 : ((v < 0) ? 0 : v);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d (op %0d a_sel %0d b_sel %0d sh %0d imm %0d c %0d l %0d r %0d r0 %0d r1 %0d)", what, got, exp, ctrl.op, ctrl.a_sel, ctrl.b_sel, ctrl.shift, ctrl.imm, mem_c, mem_l, mem_r, m_r0, m_r1);
    end
  endtask

  task automatic step_and_check();
    int a, b, d, r, iscmp, nf, en;
    case (ctrl.a_sel)
      A_LEFT: a = mem_l; A_RIGHT: a = mem_r; A_R0: a = m_r0; A_R1: a = m_r1;
      default: a = mem_c;
    endcase
    case (ctrl.b_sel)
      B_R0: b = m_r0; B_R1: b = m_r1; B_IMM: b = ctrl.imm; default: b = mem_c;
    endcase
    d = (ctrl.dst == DST_R1) ? m_r1 : m_r0;
    iscmp = 0; nf = m_flag; r = a;
    case (ctrl.op)
      OP_PASS: r = a;
      OP_ADD:  r = sat(a + b);
      OP_SUB:  r = sat(a - b);
      OP_ABSD: r = (a > b) ? a - b : b - a;
      OP_MUL:  r = sat((a * b) >>> ctrl.shift);
      OP_MAC:  r = sat(d + ((a * b) >>> ctrl.shift));
      OP_MIN:  r = (a < b) ? a : b;
      OP_MAX:  r = (a > b) ? a : b;
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_SHR:  r = a >>> ctrl.shift;
      OP_SHL:  r = sat(a <<< ctrl.shift);
      OP_CGT:  begin iscmp = 1; nf = a > b;  end
      OP_CEQ:  begin iscmp = 1; nf = a == b; end
      OP_CLT:  begin iscmp = 1; nf = a < b;  end
      default: r = a;
    endcase
    en = valid && (ctrl.guard == G_ALL || (ctrl.guard == G_FLAG && m_flag == 1) ||
                   (ctrl.guard == G_NFLAG && m_flag == 0));
    #1;
    if (!iscmp) check("res", res, r);
    check("mem_we", we, en && ctrl.mem_we && !iscmp);
    if (en) begin
      if (iscmp) m_flag = nf;
      else if (ctrl.dst == DST_R0) m_r0 = r;
      else if (ctrl.dst == DST_R1) m_r1 = r;
    end
    @(posedge clk); #1;
    check("r0", r0, m_r0);
    check("flag", flag, m_flag);
  endtask

  initial begin
    valid = 0; ctrl = '0; mem_c = 0; mem_l = 0; mem_r = 0;
    m_r0 = 0; m_r1 = 0; m_flag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // directed: r0 = 5; r0 += 3*4 in one cycle -> 17
    valid = 1; ctrl = '0; ctrl.op = OP_PASS; ctrl.a_sel = A_MEM; ctrl.dst = DST_R0; mem_c = 5;
    step_and_check();
    @(negedge clk);
    ctrl.op = OP_MAC; ctrl.a_sel = A_LEFT; ctrl.b_sel = B_IMM; ctrl.imm = 4; mem_l = 3;
    step_and_check();
    check("mac_direct", r0, 17);
    // random
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 7) != 0);
      ctrl.op     = lpa_op_e'($urandom_range(0, 15));
      ctrl.a_sel  = a_sel_e'($urandom_range(0, 4));
      ctrl.b_sel  = b_sel_e'($urandom_range(0, 3));
      ctrl.dst    = dst_e'($urandom_range(0, 2));
      ctrl.mem_we = 1'($urandom);
      ctrl.guard  = guard_e'($urandom_range(0, 2));
      ctrl.mirror = 1'($urandom);
      ctrl.shift  = 4'($urandom_range(0, 15));
      ctrl.imm    = 10'($urandom);
      mem_c = ($urandom_range(0, 3) == 0) ? 10'h3FF : 10'($urandom);
      mem_l = 10'($urandom);
      mem_r = 10'($urandom);
      step_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
