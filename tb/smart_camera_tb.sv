// smart_camera_tb: end-to-end test of the camera core at its default sizes
// (320 PEs, 64 lines, 3 channels, 128K x 8 dual-port RAM).
//
// The host side is modelled here: it downloads an IC3D program over I2C,
// writes a run command into bank 1 of the dual-port RAM and starts the IC3D.
// The program processes full VGA frames (640 x H, two pixels per PE,
// interlaced into even/odd memory lines) and per line:
//   - stores channel 0 (luma) and channel 2 (pass-through) via VIN,
//   - smooths luma horizontally with taps 1/4, 2/4, 1/4 (MUL/MAC; the array
//     ends are coupled, so the line is treated as circular),
//   - computes |dE/dx| on the even pixels with mirrored ends and |dE/dy|
//     against the previous line, adds them, thresholds (compare -> flag),
//   - builds a binary edge map with a flag-guarded store,
//   - counts the edge PEs (CNTF) and writes the count's low byte to the
//     dual-port RAM at 0x100 + line,
//   - streams smoothed luma, edge map and pass-through channel out.
// At frame start the program takes semaphore 0 (retrying until granted) and
// reads the host's run command; at frame end it releases the semaphore and
// interrupts the host, which then reads the per-line counts.
// Every output pixel and every count is compared with a pixel-domain model
// computed here. The test also counts how often each mechanism occurred
// (video-sync stalls, interlock stalls, memory bypass, coupled and mirrored
// neighbour reads, guarded stores, semaphore refusal, bank-allocation
// refusal, interrupt, input overrun) and fails if one never did.
module smart_camera_tb;
  import ic3d_pkg::*;
  localparam int W = 640, H = 480, NF = 2, THR = 400, BLANK = 100;
  localparam int P = W / 2;

  logic clk = 0, rst_n = 0;
  logic ppe2 = 1;
  logic vin_valid = 0, vin_line_end = 0;
  logic [2:0][PIX_W-1:0] vin_data = '0;
  logic vout_valid, vout_last, vout_ready = 1;
  logic [2:0][PIX_W-1:0] vout_data;
  logic host_en = 0, host_we = 0, host_sem = 0, host_bank = 0;
  logic [15:0] host_addr = 0;
  logic [7:0] host_wdata = 0, host_rdata;
  logic host_busy, host_denied, host_irq, host_irq_ack = 0;
  logic scl = 1, sda_m = 1, sda_oe, sda;
  logic start = 0, running, halted, ic3d_denied;
  logic [15:0] st_lines, st_ovr, st_wait, st_hz, st_byp, acc;

  assign sda = sda_m & ~sda_oe;

  smart_camera dut (
    .clk, .rst_n, .ppe2, .vin_valid, .vin_data, .vin_line_end,
    .vout_valid, .vout_data, .vout_last, .vout_ready,
    .host_en, .host_we, .host_sem, .host_bank, .host_addr, .host_wdata, .host_rdata,
    .host_busy, .host_denied, .host_irq, .host_irq_ack,
    .i2c_scl(scl), .i2c_sda(sda), .i2c_sda_oe(sda_oe),
    .ic3d_start(start), .ic3d_running(running), .ic3d_halted(halted), .ic3d_denied,
    .stat_vin_lines(st_lines), .stat_vin_overruns(st_ovr), .stat_wait_stalls(st_wait),
    .stat_hz_stalls(st_hz), .stat_bypass(st_byp), .ic3d_acc(acc));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_irq = 0, n_sem_refused = 0, n_bank_denied = 0, n_mirror = 0, n_couple = 0, n_guarded = 0;
  int n_out_lines = 0, n_frames_done = 0;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string s, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", s, got, exp);
    end
  endtask

  // ------------------------------------------------------------ program
  localparam int L_E = 0, L_O = 1, S_E = 2, S_O = 3, PREV = 4, EDGE = 6, Z_E = 8, Z_O = 9;
  gcp_instr_t prog [$];

  function automatic gcp_instr_t ctl(gcp_cls_e cls, int imm = 0, bit sub = 0);
    gcp_instr_t i = '0;
    i.cls = cls; i.imm = IMM_W'(imm); i.sub = sub;
    return i;
  endfunction
  function automatic gcp_instr_t xfer(gcp_cls_e cls, int chan, int sub, int line, bit flag);
    gcp_instr_t i = '0;
    i.cls = cls; i.chan = CH_W'(chan); i.sub = 1'(sub); i.flag = flag;
    i.rd_addr = LINE_AW'(line); i.wr_addr = LINE_AW'(line);
    return i;
  endfunction
  function automatic gcp_instr_t op(lpa_op_e o, a_sel_e a, int rd, b_sel_e b, int imm, dst_e d,
                                    int wr = -1, int sh = 0, bit mir = 0, guard_e g = G_ALL);
    gcp_instr_t i = '0;
    i.cls = I_LPA; i.pe.op = o; i.pe.a_sel = a; i.pe.b_sel = b; i.pe.imm = PIX_W'(imm);
    i.pe.dst = d; i.pe.mem_we = (wr >= 0); i.pe.shift = SHIFT_W'(sh); i.pe.mirror = mir;
    i.pe.guard = g; i.rd_addr = LINE_AW'(rd); i.wr_addr = LINE_AW'((wr >= 0) ? wr : 0);
    return i;
  endfunction

  task automatic build_program();
    int loop_top;
    prog.push_back(ctl(I_WAITV));                  // 0  frame starts with its first line
    prog.push_back(ctl(I_LDI, 0));                 //    request semaphore 0
    prog.push_back(ctl(I_SETXA, 0));
    prog.push_back(ctl(I_XWR, 0, 1));
    prog.push_back(ctl(I_SETXA, 0));
    prog.push_back(ctl(I_XRD, 0, 1));              //    acc = 0 when granted
    prog.push_back(ctl(I_BNZ, 1));                 //    retry
    prog.push_back(ctl(I_SETXA, 'h10000));         // 7  host run command
    prog.push_back(ctl(I_XRD));
    prog.push_back(ctl(I_BNZ, 11));
    prog.push_back(ctl(I_HALT));
    prog.push_back(op(OP_AND, A_MEM, 0, B_IMM, 0, DST_NONE, PREV));  // 11 previous line := 0
    prog.push_back(ctl(I_SETXA, 'h100));
    prog.push_back(ctl(I_LOOP, H));
    loop_top = prog.size();
    prog.push_back(ctl(I_WAITV));
    prog.push_back(xfer(I_VIN, 0, 0, L_E, 0));
    prog.push_back(xfer(I_VIN, 0, 1, L_O, 0));
    prog.push_back(xfer(I_VIN, 2, 0, Z_E, 0));
    prog.push_back(xfer(I_VIN, 2, 1, Z_O, 1));
    // smoothing, coupled ends: even = (O[p-1] + 2E[p] + O[p]) / 4, odd = (E[p] + 2O[p] + E[p+1]) / 4
    prog.push_back(op(OP_MUL, A_LEFT,  L_O, B_IMM, 1, DST_R0, -1, 2));
    prog.push_back(op(OP_MAC, A_MEM,   L_E, B_IMM, 2, DST_R0, -1, 2));
    prog.push_back(op(OP_MAC, A_MEM,   L_O, B_IMM, 1, DST_R0, S_E, 2));
    prog.push_back(op(OP_MUL, A_RIGHT, L_E, B_IMM, 1, DST_R1, -1, 2));
    prog.push_back(op(OP_MAC, A_MEM,   L_O, B_IMM, 2, DST_R1, -1, 2));
    prog.push_back(op(OP_MAC, A_MEM,   L_E, B_IMM, 1, DST_R1, S_O, 2));
    // gradients on the even pixels, mirrored ends
    prog.push_back(op(OP_PASS, A_LEFT,  S_E,  B_R0, 0, DST_R1, -1, 0, 1));
    prog.push_back(op(OP_ABSD, A_RIGHT, S_E,  B_R1, 0, DST_R1, -1, 0, 1));
    prog.push_back(op(OP_PASS, A_MEM,   PREV, B_R0, 0, DST_R0));
    prog.push_back(op(OP_ABSD, A_MEM,   S_E,  B_R0, 0, DST_R0));
    prog.push_back(op(OP_ADD,  A_R0,    0,    B_R1, 0, DST_R0));
    prog.push_back(op(OP_CGT,  A_R0,    0,    B_IMM, THR, DST_NONE));
    prog.push_back(op(OP_AND,  A_MEM,   EDGE, B_IMM, 0, DST_NONE, EDGE));
    prog.push_back(op(OP_OR,   A_MEM,   EDGE, B_IMM, 1023, DST_NONE, EDGE, 0, 0, G_FLAG));
    prog.push_back(ctl(I_CNTF));
    prog.push_back(ctl(I_XWR));
    prog.push_back(op(OP_PASS, A_MEM, S_E, B_R0, 0, DST_NONE, PREV));
    prog.push_back(ctl(I_WAITO));
    prog.push_back(xfer(I_VOUT, 0, 0, S_E, 0));
    prog.push_back(xfer(I_VOUT, 0, 1, S_O, 0));
    prog.push_back(xfer(I_VOUT, 1, 0, EDGE, 0));
    prog.push_back(xfer(I_VOUT, 1, 1, EDGE, 0));
    prog.push_back(xfer(I_VOUT, 2, 0, Z_E, 0));
    prog.push_back(xfer(I_VOUT, 2, 1, Z_O, 1));
    prog.push_back(ctl(I_DJNZ, loop_top));
    prog.push_back(ctl(I_LDI, 1));                 // release semaphore 0
    prog.push_back(ctl(I_SETXA, 0));
    prog.push_back(ctl(I_XWR, 0, 1));
    prog.push_back(ctl(I_IRQ));
    prog.push_back(ctl(I_JMP, 0));
  endtask

  // ------------------------------------------------------------ I2C master
  task automatic q(); repeat (4) @(posedge clk); endtask
  task automatic i2c_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin sda_m = b[i]; q(); scl = 1; q(); q(); scl = 0; q(); end
    sda_m = 1; q(); scl = 1; q(); chk("i2c ack", int'(!sda), 1); q(); scl = 0; q();
  endtask
  task automatic i2c_load();
    logic [71:0] w;
    sda_m = 1; scl = 1; q(); sda_m = 0; q(); scl = 0; q();
    i2c_byte({7'h2A, 1'b0}); i2c_byte(8'h00); i2c_byte(8'h00);
    foreach (prog[k]) begin
      w = 72'(prog[k]);
      for (int j = 8; j >= 0; j--) i2c_byte(w[j*8 +: 8]);
    end
    sda_m = 0; q(); scl = 1; q(); sda_m = 1; q();
  endtask

  // ------------------------------------------------------------ host bus
  task automatic host_acc(bit we, bit sem, bit bank, int addr, int d, output int rd, output bit denied);
    @(negedge clk);
    host_en = 1; host_we = we; host_sem = sem; host_bank = bank; host_addr = 16'(addr); host_wdata = 8'(d);
    @(negedge clk);
    host_en = 0; host_we = 0; host_sem = 0;
    rd = host_rdata; denied = host_denied;
  endtask

  // ------------------------------------------------------------ reference model
  int yimg [W], zimg [W], prev_e [P];
  int exp_q [$];            // expected outputs, 3 words per pixel
  int exp_cnt [NF][H];

  function automatic int absd(int a, int b); return (a > b) ? a - b : b - a; endfunction

  task automatic model_line(int f, int y);
    int s [W], e [P], h, v, g, cnt;
    for (int x = 0; x < W; x++)
      s[x] = (yimg[(x + W - 1) % W] >> 2) + ((2 * yimg[x]) >> 2) + (yimg[(x + 1) % W] >> 2);
    for (int p = 0; p < P; p++) e[p] = s[2 * p];
    cnt = 0;
    for (int p = 0; p < P; p++) begin
      int l = (p == 0) ? 1 : p - 1, r = (p == P - 1) ? P - 2 : p + 1;
      h = absd(e[r], e[l]);
      v = absd(e[p], (y == 0) ? 0 : prev_e[p]);
      g = (h + v > 1023) ? 1023 : h + v;
      if (g > THR) cnt++;
      exp_q.push_back(s[2 * p]);     exp_q.push_back((g > THR) ? 1023 : 0); exp_q.push_back(zimg[2 * p]);
      exp_q.push_back(s[2 * p + 1]); exp_q.push_back((g > THR) ? 1023 : 0); exp_q.push_back(zimg[2 * p + 1]);
    end
    for (int p = 0; p < P; p++) prev_e[p] = e[p];
    exp_cnt[f][y] = cnt & 255;
  endtask

  // ------------------------------------------------------------ video source
  event frame_go;
  bit   video_done = 0;

  task automatic send_line(int f, int y, bit model = 1);
    // smooth diagonal ramp plus a bright moving block plus noise
    for (int x = 0; x < W; x++) begin
      int b = (x >= 100 + 40 * f + y / 4 && x < 180 + 40 * f + y / 4 && (y % 64) < 40) ? 700 : 0;
      yimg[x] = (x + y) % 256 + b + $urandom_range(0, 40);
      zimg[x] = $urandom_range(0, 1023);
    end
    if (model) model_line(f, y);
    for (int x = 0; x < W; x++) begin
      @(negedge clk);
      vin_valid = 1; vin_data[0] = 10'(yimg[x]); vin_data[1] = 10'($urandom); vin_data[2] = 10'(zimg[x]);
    end
    @(negedge clk); vin_valid = 0; vin_line_end = 1;
    @(negedge clk); vin_line_end = 0;
    repeat (BLANK) @(negedge clk);
  endtask

  // ------------------------------------------------------------ output checker
  int out_x = 0;
  always @(posedge clk) if (rst_n && vout_valid && vout_ready) begin
    for (int c = 0; c < 3; c++) begin
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else chk($sformatf("out line %0d x %0d c %0d", n_out_lines, out_x, c), vout_data[c], exp_q.pop_front());
    end
    out_x++;
    if (vout_last) begin
      chk("line length", out_x, W);
      out_x = 0; n_out_lines++;
    end
  end
  always @(negedge clk) vout_ready <= ($urandom_range(0, 19) != 0);

  // mechanism monitors
  always @(posedge clk) if (rst_n && dut.u_ic3d.u_gcp.ex_lpa_valid) begin
    if (dut.u_ic3d.u_gcp.ex_pe.a_sel inside {A_LEFT, A_RIGHT}) begin
      if (dut.u_ic3d.u_gcp.ex_pe.mirror) n_mirror++; else n_couple++;
    end
    if (dut.u_ic3d.u_gcp.ex_pe.guard != G_ALL && |dut.u_ic3d.lpa_wmask && !(&dut.u_ic3d.lpa_wmask))
      n_guarded++;
  end

  initial begin
    int rd; bit den;
    build_program();
    repeat (3) @(posedge clk); rst_n = 1;
    i2c_load();
    $display("program of %0d words loaded at cycle %0t", prog.size(), $time / 10);
    host_acc(1, 0, 1, 'h0000, 1, rd, den);            // run command, bank 1
    host_acc(1, 1, 0, 8, 1, rd, den);                 // bank 0 allocated to the IC3D
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      begin : video
        for (int f = 0; f < NF; f++) begin
          for (int y = 0; y < H; y++) send_line(f, y);
          @(frame_go);
        end
        video_done = 1;
      end
      begin : host
        for (int f = 0; f < NF; f++) begin
          repeat (2000) @(negedge clk);
          host_acc(1, 1, 0, 0, 0, rd, den);           // try semaphore during the frame
          host_acc(0, 1, 0, 0, 0, rd, den);
          if (rd[0]) n_sem_refused++;
          host_acc(0, 0, 0, 'h100, 0, rd, den);       // bank 0 is the IC3D's now
          if (den) n_bank_denied++;
          while (!host_irq) @(negedge clk);
          n_irq++;
          host_acc(1, 1, 0, 8, 0, rd, den);           // bank 0 shared again
          host_acc(1, 1, 0, 0, 0, rd, den);           // take the semaphore
          host_acc(0, 1, 0, 0, 0, rd, den);
          chk("host got semaphore", rd[0], 0);
          for (int y = 0; y < H; y++) begin
            host_acc(0, 0, 0, 'h100 + y, 0, rd, den);
            chk($sformatf("count f%0d y%0d", f, y), rd, exp_cnt[f][y]);
          end
          if (f == NF - 1) host_acc(1, 0, 1, 'h0000, 0, rd, den);   // stop after this frame
          host_acc(1, 1, 0, 8, 1, rd, den);
          host_acc(1, 1, 0, 0, 1, rd, den);           // release semaphore
          @(negedge clk); host_irq_ack = 1; @(negedge clk); host_irq_ack = 0;
          n_frames_done++;
          ->frame_go;
        end
      end
    join
    repeat (3000) @(negedge clk);
    chk("all lines out", n_out_lines, NF * H);
    chk("expected queue empty", exp_q.size(), 0);
    chk("no overrun in normal run", st_ovr, 0);
    // one more line lets the program read the stop command and halt; the
    // next line then finds the held one unconsumed: input overrun
    for (int y = 0; y < 2; y++) send_line(0, y, 0);
    chk("halted on stop command", halted, 1);
    chk("overrun counted", st_ovr, 1);
    $display("mechanisms: wait_stalls=%0d interlock_stalls=%0d bypass=%0d coupled=%0d mirrored=%0d guarded=%0d",
             st_wait, st_hz, st_byp, n_couple, n_mirror, n_guarded);
    $display("            irq=%0d sem_refused=%0d bank_denied=%0d overruns=%0d frames=%0d lines_in=%0d",
             n_irq, n_sem_refused, n_bank_denied, st_ovr, n_frames_done, st_lines);
    chk("mech wait stall", int'(st_wait > 0), 1);
    chk("mech interlock stall", int'(st_hz > 0), 1);
    chk("mech bypass", int'(st_byp > 0), 1);
    chk("mech coupled", int'(n_couple > 0), 1);
    chk("mech mirrored", int'(n_mirror > 0), 1);
    chk("mech guarded", int'(n_guarded > 0), 1);
    chk("mech irq", n_irq, NF);
    chk("mech semaphore refused", int'(n_sem_refused > 0), 1);
    chk("mech bank denied", int'(n_bank_denied > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
