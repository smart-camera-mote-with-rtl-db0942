// gcp_tb: self-checking test of the global control processor.
//
// Loads a small program through the program port and runs it against a
// testbench-side memory on the external bus, with PE registers/flags and the
// video-processor status driven from here. The program exercises LDI, SETXA,
// XWR, LOOP/DJNZ around an array instruction, WAITV and WAITO stalls, VIN and
// VOUT transfers, GETPE, CNTF, XRD (with its interlock), a taken BNZ, IRQ and
// HALT. Checks: memory contents written over the bus, the number and fields
// of broadcast operations and transfers, stall counters, interrupt handshake.
module gcp_tb;
  import ic3d_pkg::*;
  localparam int N = 8;

  logic clk = 0, rst_n = 0;
  logic prog_we, start, running, halted;
  logic [7:0] prog_addr, pc;
  gcp_instr_t prog_wdata;
  logic rd_en, ex_lpa_valid, ex_vin, ex_vin_release, ex_vout_load, ex_vout_start, ex_sub;
  logic [LINE_AW-1:0] rd_addr, ex_wr_addr;
  pe_ctrl_t ex_pe;
  logic [CH_W-1:0] ex_chan;
  logic [N-1:0][PIX_W-1:0] pe_r0;
  logic [N-1:0] pe_flags;
  logic vin_ready, vout_busy;
  logic x_en, x_we, x_sem, irq, irq_ack;
  logic [16:0] x_addr;
  logic [7:0] x_wdata, x_rdata;
  logic [15:0] acc, wst, hst;
  int checks = 0, failures = 0;
  int n_lpa = 0, n_vin = 0, n_vout = 0, vout_rd_ok = 0;
  logic [7:0] xmem [int];

  gcp #(.NUM_PE(N)) dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .start, .running, .halted,
    .pc_o(pc), .rd_en, .rd_addr, .ex_lpa_valid, .ex_pe, .ex_wr_addr, .ex_vin, .ex_vin_release,
    .ex_vout_load, .ex_vout_start, .ex_chan, .ex_sub, .pe_r0, .pe_flags, .vin_ready, .vout_busy,
    .x_en, .x_we, .x_sem, .x_addr, .x_wdata, .x_rdata, .irq, .irq_ack,
    .acc_o(acc), .stat_wait_stalls(wst), .stat_hz_stalls(hst));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string s, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", s, got, exp); end
  endtask

  // external memory, one cycle read latency
  always_ff @(posedge clk) begin
    if (x_en && x_we) xmem[int'(x_addr)] = x_wdata;
    if (x_en && !x_we) x_rdata <= xmem.exists(int'(x_addr)) ? xmem[int'(x_addr)] : 8'h00;
  end

  // execute-stage monitor
  always @(posedge clk) if (rst_n) begin
    if (ex_lpa_valid) begin
      n_lpa++;
      chk("lpa op", ex_pe.op, OP_ABSD);
    end
    if (ex_vin) begin
      n_vin++;
      chk("vin addr", ex_wr_addr, 7); chk("vin chan", ex_chan, 2); chk("vin sub", ex_sub, 1);
      chk("vin release", ex_vin_release, 1);
    end
    if (ex_vout_load) begin
      n_vout++;
      chk("vout start", ex_vout_start, 1);
    end
    if (rd_en && rd_addr == 9) vout_rd_ok++;
  end

  function automatic gcp_instr_t ins(gcp_cls_e cls, int imm = 0);
    gcp_instr_t i = '0;
    i.cls = cls; i.imm = IMM_W'(imm);
    return i;
  endfunction

  gcp_instr_t p [20];

  initial begin
    prog_we = 0; start = 0; irq_ack = 0; vin_ready = 0; vout_busy = 1; prog_addr = 0; prog_wdata = '0;
    for (int i = 0; i < N; i++) pe_r0[i] = 10'(40 + i);
    pe_flags = 8'b1011_0010;
    p[0]  = ins(I_LDI, 5);
    p[1]  = ins(I_SETXA, 'h100);
    p[2]  = ins(I_XWR);
    p[3]  = ins(I_LOOP, 3);
    p[4]  = ins(I_LPA); p[4].pe.op = OP_ABSD; p[4].rd_addr = 1;
    p[5]  = ins(I_DJNZ, 4);
    p[6]  = ins(I_WAITV);
    p[7]  = ins(I_VIN); p[7].wr_addr = 7; p[7].chan = 2; p[7].sub = 1; p[7].flag = 1;
    p[8]  = ins(I_GETPE, 3);
    p[9]  = ins(I_XWR);
    p[10] = ins(I_CNTF);
    p[11] = ins(I_XWR);
    p[12] = ins(I_SETXA, 'h100);
    p[13] = ins(I_XRD);
    p[14] = ins(I_BNZ, 16);
    p[15] = ins(I_LDI, 99);
    p[16] = ins(I_IRQ);
    p[17] = ins(I_WAITO);
    p[18] = ins(I_VOUT); p[18].rd_addr = 9; p[18].flag = 1;
    p[19] = ins(I_HALT);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = p[i];
    end
    @(negedge clk); prog_we = 0; start = 1;
    @(negedge clk); start = 0;
    repeat (30) @(negedge clk);
    chk("waiting on video", pc, 6);
    vin_ready = 1;
    @(negedge clk);
    @(negedge clk); vin_ready = 0;  // released by VIN
    repeat (40) @(negedge clk);
    chk("waiting on output", pc, 17);
    vout_busy = 0;
    repeat (10) @(negedge clk);
    chk("halted", halted, 1);
    chk("running", running, 0);
    chk("mem100", xmem[32'h100], 5);
    chk("mem101 getpe", xmem[32'h101], 43);
    chk("mem102 cntf", xmem[32'h102], 4);
    chk("acc from xrd", acc, 5);
    chk("lpa x3", n_lpa, 3);
    chk("vin x1", n_vin, 1);
    chk("vout x1", n_vout, 1);
    chk("vout read line 9", vout_rd_ok, 1);
    chk("irq", irq, 1);
    chk("wait stalls", int'(wst >= 30), 1);
    chk("hz stalls", int'(hst >= 1), 1);
    @(negedge clk); irq_ack = 1; @(negedge clk); irq_ack = 0;
    chk("irq cleared", irq, 0);
    $display("wait stalls %0d hz stalls %0d", wst, hst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
