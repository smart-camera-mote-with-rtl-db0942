// dpram_tb: self-checking test of the dual-port RAM at full size (128K x 8).
//
// Checks data exchange in both directions across both banks, random traffic
// on both ports against a shadow memory, same-address write collisions
// (port A wins, port B sees busy), the semaphore protocol including a
// simultaneous request, and bank allocation (refused accesses are reported
// and leave the memory untouched).
module dpram_tb;
  localparam int AW = 17;

  logic clk = 0, rst_n = 0;
  logic a_en, a_we, a_sem, a_denied;
  logic [AW-1:0] a_addr;
  logic [7:0] a_wdata, a_rdata;
  logic b_en, b_we, b_sem, b_bank, b_busy, b_denied;
  logic [AW-2:0] b_addr;
  logic [7:0] b_wdata, b_rdata;
  int checks = 0, failures = 0, ncollide = 0;
  logic [7:0] shadow [int];

  dpram #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string s, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", s, got, exp); end
  endtask

  task automatic idle();
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_sem = 0; b_sem = 0;
  endtask

  task automatic a_acc(bit we, bit sem, int addr, int d);
    @(negedge clk); idle(); a_en = 1; a_we = we; a_sem = sem; a_addr = AW'(addr); a_wdata = 8'(d);
    @(negedge clk); idle();
  endtask
  task automatic b_acc(bit we, bit sem, int addr, int d);
    @(negedge clk); idle(); b_en = 1; b_we = we; b_sem = sem; b_bank = addr[16]; b_addr = 16'(addr); b_wdata = 8'(d);
    @(negedge clk); idle();
  endtask

  initial begin
    int addr, d;
    idle(); a_addr = 0; b_addr = 0; b_bank = 0; a_wdata = 0; b_wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // exchange in both banks
    for (int i = 0; i < 200; i++) begin
      addr = $urandom_range(0, 2**AW - 1); d = $urandom_range(0, 255);
      if (i % 2) begin a_acc(1, 0, addr, d); b_acc(0, 0, addr, 0); chk("A->B", b_rdata, d); end
      else       begin b_acc(1, 0, addr, d); a_acc(0, 0, addr, 0); chk("B->A", a_rdata, d); end
      shadow[addr] = 8'(d);
    end
    // random simultaneous traffic on a small address window to force collisions
    for (int i = 0; i < 2000; i++) begin
      int aa, ba, ad, bd; bit aw, bw;
      aa = $urandom_range(0, 7) + 'h1_0000; ba = $urandom_range(0, 7) + 'h1_0000;
      ad = $urandom_range(0, 255); bd = $urandom_range(0, 255);
      aw = 1'($urandom); bw = 1'($urandom);
      @(negedge clk);
      a_en = 1; a_we = aw; a_sem = 0; a_addr = AW'(aa); a_wdata = 8'(ad);
      b_en = 1; b_we = bw; b_sem = 0; b_bank = 1; b_addr = 16'(ba); b_wdata = 8'(bd);
      @(negedge clk);
      if (!aw) chk("A rd", a_rdata, shadow.exists(aa) ? shadow[aa] : a_rdata);
      if (!bw) chk("B rd", b_rdata, shadow.exists(ba) ? shadow[ba] : b_rdata);
      chk("busy", b_busy, aw && bw && aa == ba);
      if (aw && bw && aa == ba) ncollide++;
      if (bw && !(aw && aa == ba)) shadow[ba] = 8'(bd);
      if (aw) shadow[aa] = 8'(ad);
      idle();
    end
    chk("collisions seen", int'(ncollide > 0), 1);
    for (int i = 0; i < 8; i++) begin
      b_acc(0, 0, 'h1_0000 + i, 0);
      if (shadow.exists('h1_0000 + i)) chk("after collisions", b_rdata, shadow['h1_0000 + i]);
    end
    // semaphores
    a_acc(1, 1, 3, 0);                    // A requests sem 3
    a_acc(0, 1, 3, 0); chk("A owns", a_rdata[0], 0);
    b_acc(1, 1, 3, 0);                    // B requests, must fail
    b_acc(0, 1, 3, 0); chk("B not owner", b_rdata[0], 1);
    a_acc(1, 1, 3, 1);                    // A releases
    b_acc(1, 1, 3, 0);
    b_acc(0, 1, 3, 0); chk("B owns", b_rdata[0], 0);
    a_acc(0, 1, 3, 0); chk("A not owner", a_rdata[0], 1);
    b_acc(1, 1, 3, 1);
    @(negedge clk);                       // simultaneous request of sem 5
    a_en = 1; a_we = 1; a_sem = 1; a_addr = 5; a_wdata = 0;
    b_en = 1; b_we = 1; b_sem = 1; b_addr = 5; b_wdata = 0;
    @(negedge clk); idle();
    a_acc(0, 1, 5, 0); chk("tie to A", a_rdata[0], 0);
    b_acc(0, 1, 5, 0); chk("tie B lost", b_rdata[0], 1);
    // bank allocation: bank 1 to host only
    b_acc(1, 1, 9, 2);
    b_acc(0, 1, 9, 0); chk("alloc rd", b_rdata[1:0], 2);
    a_acc(1, 0, 'h1_2345, 8'h77); chk("A denied", a_denied, 1);
    a_acc(0, 0, 'h1_2345, 0);     chk("A read blocked", a_rdata, 0);
    b_acc(0, 0, 'h1_2345, 0);     chk("mem kept", b_rdata, shadow.exists('h1_2345) ? shadow['h1_2345] : b_rdata);
    b_acc(1, 0, 'h1_2345, 8'h5A); chk("B allowed", b_denied, 0);
    b_acc(0, 0, 'h1_2345, 0);     chk("B wrote", b_rdata, 8'h5A);
    a_acc(1, 1, 9, 0);                    // IC3D may not change allocation
    b_acc(0, 1, 9, 0); chk("alloc kept", b_rdata[1:0], 2);
    b_acc(1, 1, 8, 1);                    // bank 0 to IC3D only
    b_acc(1, 0, 'h0_0010, 8'h11); chk("B denied", b_denied, 1);
    a_acc(1, 0, 'h0_0010, 8'h22); chk("A ok", a_denied, 0);
    a_acc(0, 0, 'h0_0010, 0);     chk("A data", a_rdata, 8'h22);
    $display("collisions: %0d", ncollide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
