// line_memory_tb: self-checking test of the line memory.
//
// Uses a reduced array width (NUM_PE = 16) but the full 64 lines. Writes
// random lines with random per-PE masks while reading random lines, and
// compares every read with a shadow copy, including the one-cycle read
// latency and forwarding of a same-cycle write to the same line.
module line_memory_tb;
  import ic3d_pkg::*;
  localparam int N = 16, L = 64;

  logic clk = 0, re;
  logic [5:0] raddr, waddr;
  logic [N-1:0][PIX_W-1:0] rdata, wdata, exp_q;
  logic [N-1:0] wmask;
  logic bypass;
  int checks = 0, failures = 0, nbypass = 0;
  logic [N-1:0][PIX_W-1:0] shadow [L];
  logic pend;

  line_memory #(.NUM_PE(N), .LINES(L)) dut (.clk, .re, .raddr, .rdata, .waddr, .wmask, .wdata, .bypass_o(bypass));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; wmask = '1; pend = 0;
    // fill every line
    for (int l = 0; l < L; l++) begin
      @(negedge clk);
      waddr = 6'(l);
      for (int p = 0; p < N; p++) wdata[p] = 10'($urandom);
      shadow[l] = wdata;
    end
    @(negedge clk); wmask = '0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== exp_q) begin failures++; $display("FAIL read %0d", i); end
      end
      re    = 1'($urandom_range(0, 3) != 0);
      raddr = 6'($urandom);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : 6'($urandom);
      wmask = N'($urandom);
      for (int p = 0; p < N; p++) wdata[p] = 10'($urandom);
      // expected read value: write-first for masked columns
      for (int p = 0; p < N; p++)
        exp_q[p] = (wmask[p] && waddr == raddr) ? wdata[p] : shadow[raddr][p];
      if (re && waddr == raddr && |wmask) nbypass++;
      for (int p = 0; p < N; p++) if (wmask[p]) shadow[waddr][p] = wdata[p];
      pend = re;
      if (!re) exp_q = rdata; // output holds when not reading
      #1;
      checks++;
      if (bypass !== (re && waddr == raddr && |wmask)) begin failures++; $display("FAIL bypass flag"); end
    end
    @(negedge clk);
    checks++;
    if (nbypass == 0) begin failures++; $display("FAIL no bypass exercised"); end
    $display("bypass cases: %0d", nbypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
