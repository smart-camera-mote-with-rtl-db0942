// ic3d_tb: self-checking test of the IC3D vision processor.
//
// Reduced array (NUM_PE = 16), CIF-style mode: one pixel per PE. A program
// loaded through the program port processes H lines: it stores channels 0
// and 1 of each line, smooths channel 0 with taps 1/4, 2/4, 1/4 (coupled
// ends, so the line is circular), thresholds it, builds a binary map with a
// flag-guarded store, counts the set flags, writes the count over the
// external bus, and streams out smoothed line, map and channel 1. Every output
// pixel and every count is compared with a pixel-domain model. It also checks
// that array instructions run one per clock: the distance in cycles between
// the first VIN and CNTF of a line equals the number of instructions between
// them, and that the interrupt fires once at the end.
module ic3d_tb;
  import ic3d_pkg::*;
  localparam int N = 16, H = 12, THR = 300;

  logic clk = 0, rst_n = 0;
  logic vin_valid = 0, vin_line_end = 0, vout_valid, vout_last, vout_ready = 1;
  logic [2:0][PIX_W-1:0] vin_data = '0, vout_data;
  logic prog_we = 0, start = 0, running, halted;
  logic [7:0] prog_addr = 0;
  gcp_instr_t prog_wdata = '0;
  logic x_en, x_we, x_sem, irq, irq_ack = 0;
  logic [16:0] x_addr;
  logic [7:0] x_wdata, x_rdata = 0;
  logic [15:0] st_lines, st_ovr, st_wait, st_hz, st_byp, acc;
  int checks = 0, failures = 0;
  logic [7:0] xmem [int];

  ic3d #(.NUM_PE(N)) dut (.clk, .rst_n, .ppe2(1'b0), .vin_valid, .vin_data, .vin_line_end,
    .vout_valid, .vout_data, .vout_last, .vout_ready, .prog_we, .prog_addr, .prog_wdata,
    .start, .running, .halted, .x_en, .x_we, .x_sem, .x_addr, .x_wdata, .x_rdata, .irq, .irq_ack,
    .stat_vin_lines(st_lines), .stat_vin_overruns(st_ovr), .stat_wait_stalls(st_wait),
    .stat_hz_stalls(st_hz), .stat_bypass(st_byp), .acc_o(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string s, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s got %0d exp %0d", s, got, exp); end
  endtask

  always_ff @(posedge clk) begin
    if (x_en && x_we) xmem[int'(x_addr)] = x_wdata;
    if (x_en && !x_we) x_rdata <= xmem.exists(int'(x_addr)) ? xmem[int'(x_addr)] : 8'h00;
  end

  function automatic gcp_instr_t ctl(gcp_cls_e cls, int imm = 0);
    gcp_instr_t i = '0; i.cls = cls; i.imm = IMM_W'(imm); return i;
  endfunction
  function automatic gcp_instr_t xfer(gcp_cls_e cls, int chan, int line, bit flag);
    gcp_instr_t i = '0;
    i.cls = cls; i.chan = CH_W'(chan); i.flag = flag; i.rd_addr = LINE_AW'(line); i.wr_addr = LINE_AW'(line);
    return i;
  endfunction
  function automatic gcp_instr_t op(lpa_op_e o, a_sel_e a, int rd, b_sel_e b, int imm, dst_e d,
                                    int wr = -1, int sh = 0, guard_e g = G_ALL);
    gcp_instr_t i = '0;
    i.cls = I_LPA; i.pe.op = o; i.pe.a_sel = a; i.pe.b_sel = b; i.pe.imm = PIX_W'(imm); i.pe.dst = d;
    i.pe.mem_we = (wr >= 0); i.pe.shift = SHIFT_W'(sh); i.pe.guard = g;
    i.rd_addr = LINE_AW'(rd); i.wr_addr = LINE_AW'((wr >= 0) ? wr : 0);
    return i;
  endfunction

  gcp_instr_t prog [$];
  int exp_q [$], exp_cnt [H], img [N], raw [N];
  int vin_t = -1, cntf_t = -1, n_out = 0, ox = 0, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.u_gcp.ex_vin && vin_t < 0) vin_t = cyc;
    if (rst_n && dut.u_gcp.s1_valid && dut.u_gcp.s1.cls == I_CNTF && cntf_t < 0) cntf_t = cyc;
    if (rst_n && vout_valid && vout_ready) begin
      for (int c = 0; c < 3; c++) chk($sformatf("out l%0d x%0d c%0d", n_out, ox, c), vout_data[c], exp_q.pop_front());
      ox++;
      if (vout_last) begin chk("len", ox, N); ox = 0; n_out++; end
    end
  end

  initial begin
    prog.push_back(ctl(I_SETXA, 'h40));
    prog.push_back(ctl(I_LOOP, H));
    prog.push_back(ctl(I_WAITV));                                      // 2
    prog.push_back(xfer(I_VIN, 0, 0, 0));                              // 3
    prog.push_back(xfer(I_VIN, 1, 1, 1));
    prog.push_back(op(OP_MUL, A_LEFT,  0, B_IMM, 1, DST_R0, -1, 2));
    prog.push_back(op(OP_MAC, A_MEM,   0, B_IMM, 2, DST_R0, -1, 2));
    prog.push_back(op(OP_MAC, A_RIGHT, 0, B_IMM, 1, DST_R0, 2, 2));
    prog.push_back(op(OP_CGT, A_R0, 0, B_IMM, THR, DST_NONE));
    prog.push_back(op(OP_AND, A_MEM, 3, B_IMM, 0, DST_NONE, 3));
    prog.push_back(op(OP_OR,  A_MEM, 3, B_IMM, 1023, DST_NONE, 3, 0, G_FLAG));
    prog.push_back(ctl(I_CNTF));                                       // 11
    prog.push_back(ctl(I_XWR));
    prog.push_back(ctl(I_WAITO));
    prog.push_back(xfer(I_VOUT, 0, 2, 0));
    prog.push_back(xfer(I_VOUT, 1, 3, 0));
    prog.push_back(xfer(I_VOUT, 2, 1, 1));
    prog.push_back(ctl(I_DJNZ, 2));
    prog.push_back(ctl(I_IRQ));
    prog.push_back(ctl(I_HALT));
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (prog[k]) begin @(negedge clk); prog_we = 1; prog_addr = 8'(k); prog_wdata = prog[k]; end
    @(negedge clk); prog_we = 0; start = 1; @(negedge clk); start = 0;
    for (int y = 0; y < H; y++) begin
      int cnt, s;
      cnt = 0;
      for (int x = 0; x < N; x++) begin img[x] = $urandom_range(0, 1023); raw[x] = $urandom_range(0, 1023); end
      for (int x = 0; x < N; x++) begin
        s = (img[(x + N - 1) % N] >> 2) + ((2 * img[x]) >> 2) + (img[(x + 1) % N] >> 2);
        exp_q.push_back(s); exp_q.push_back((s > THR) ? 1023 : 0); exp_q.push_back(raw[x]);
        if (s > THR) cnt++;
      end
      exp_cnt[y] = cnt;
      for (int x = 0; x < N; x++) begin
        @(negedge clk); vin_valid = 1; vin_data[0] = 10'(img[x]); vin_data[1] = 10'(raw[x]); vin_data[2] = 0;
      end
      @(negedge clk); vin_valid = 0; vin_line_end = 1;
      @(negedge clk); vin_line_end = 0;
      repeat (20) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    chk("halted", halted, 1);
    chk("irq", irq, 1);
    chk("lines out", n_out, H);
    chk("overruns", st_ovr, 0);
    for (int y = 0; y < H; y++) chk($sformatf("count %0d", y), xmem[32'h40 + y], exp_cnt[y]);
    chk("one instruction per clock", cntf_t - vin_t, 11 - 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
