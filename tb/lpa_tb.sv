// lpa_tb: self-checking test of the linear processor array.
//
// With a reduced array (NUM_PE = 12) it checks: left/right neighbour access
// in both end modes (coupled ring and mirror reflection) against index
// arithmetic computed here, a broadcast compare followed by a flag-guarded
// store (only PEs whose pixel exceeds a threshold write), and a three-tap
// horizontal sum with MAC (coefficients 1, 2, 1) compared with a direct sum.
module lpa_tb;
  import ic3d_pkg::*;
  localparam int N = 12;

  logic clk = 0, rst_n = 0, valid;
  pe_ctrl_t ctrl;
  logic [N-1:0][PIX_W-1:0] line_i, line_o, r0;
  logic [N-1:0] wmask, flags;
  int checks = 0, failures = 0;

  lpa #(.NUM_PE(N)) dut (.clk, .rst_n, .valid, .ctrl, .line_i, .line_o, .wmask_o(wmask),
                         .r0_o(r0), .flags_o(flags));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string s, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", s, got, exp); end
  endtask

  function automatic int nb(int p, int dir, bit mirror);
    int q = p + dir;
    if (q < 0)  q = mirror ? 1 : N - 1;
    if (q >= N) q = mirror ? N - 2 : 0;
    return q;
  endfunction

  task automatic issue(pe_ctrl_t c);
    @(negedge clk); valid = 1; ctrl = c;
  endtask

  initial begin
    pe_ctrl_t c;
    int thr, x[N];
    valid = 0; ctrl = '0; line_i = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int p = 0; p < N; p++) begin x[p] = $urandom_range(0, 1023); line_i[p] = 10'(x[p]); end
      for (int m = 0; m < 2; m++)
        for (int d = 0; d < 2; d++) begin
          c = '0; c.op = OP_PASS; c.a_sel = d ? A_RIGHT : A_LEFT; c.mem_we = 1; c.mirror = 1'(m);
          issue(c); #1;
          for (int p = 0; p < N; p++) begin
            chk($sformatf("nb m%0d d%0d p%0d", m, d, p), line_o[p], x[nb(p, d ? 1 : -1, 1'(m))]);
            chk("wmask", wmask[p], 1);
          end
        end
      // compare then guarded store of the immediate
      thr = $urandom_range(100, 900);
      c = '0; c.op = OP_CGT; c.a_sel = A_MEM; c.b_sel = B_IMM; c.imm = 10'(thr);
      issue(c);
      #1; chk("cmp no store", int'(|wmask), 0);
      c = '0; c.op = OP_PASS; c.a_sel = A_MEM; c.mem_we = 1; c.guard = G_FLAG;
      issue(c); #1;
      for (int p = 0; p < N; p++) begin
        chk("flag", flags[p], x[p] > thr);
        chk("guarded we", wmask[p], x[p] > thr);
      end
      c.guard = G_NFLAG;
      issue(c); #1;
      for (int p = 0; p < N; p++) chk("nguarded we", wmask[p], x[p] <= thr);
      // 3-tap [1 2 1] >> 2 with mirror ends: r0 = L*1; r0 += C*2; r0 += R*1; then >>2
      for (int p = 0; p < N; p++) begin x[p] = $urandom_range(0, 255); line_i[p] = 10'(x[p]); end
      c = '0; c.op = OP_PASS; c.a_sel = A_LEFT; c.dst = DST_R0; c.mirror = 1; issue(c);
      c = '0; c.op = OP_MAC; c.a_sel = A_MEM; c.b_sel = B_IMM; c.imm = 2; c.dst = DST_R0; c.mirror = 1; issue(c);
      c = '0; c.op = OP_MAC; c.a_sel = A_RIGHT; c.b_sel = B_IMM; c.imm = 1; c.dst = DST_R0; c.mirror = 1; issue(c);
      c = '0; c.op = OP_SHR; c.a_sel = A_R0; c.shift = 2; c.dst = DST_R0; issue(c);
      @(negedge clk); valid = 0; #1;
      for (int p = 0; p < N; p++)
        chk($sformatf("filt p%0d", p), r0[p], (x[nb(p, -1, 1)] + 2 * x[p] + x[nb(p, 1, 1)]) >> 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
