// video_out_proc_tb: self-checking test of the video output processor.
//
// Reduced array (NUM_PE = 8), three channels. Loads random sub-lines, starts
// output and checks, under a randomly stalling ready, that exactly k*NUM_PE
// pixels come out per channel in re-interlaced order (pixel x from PE x/k,
// sub-line x mod k), that vout_last marks the final one and busy drops after
// it. With ready always high the line takes exactly k*NUM_PE cycles.
module video_out_proc_tb;
  import ic3d_pkg::*;
  localparam int N = 8, C = 3;

  logic clk = 0, rst_n = 0, ppe2, load, load_sub, start, busy, vout_valid, vout_last, vout_ready;
  logic [CH_W-1:0] load_chan;
  logic [N-1:0][PIX_W-1:0] load_line;
  logic [C-1:0][PIX_W-1:0] vout_data;
  int checks = 0, failures = 0;
  int px [C][2][N];

  video_out_proc #(.NUM_PE(N), .CHANNELS(C)) dut (.clk, .rst_n, .ppe2, .load, .load_chan, .load_sub,
    .load_line, .start, .busy, .vout_valid, .vout_data, .vout_last, .vout_ready);

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

  initial begin
    ppe2 = 0; load = 0; load_sub = 0; start = 0; vout_ready = 1; load_chan = 0; load_line = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      int k, x, cyc;
      bit stall;
      k = (rep % 2) + 1; x = 0; cyc = 0;
      stall = (rep >= 2);
      ppe2 = (k == 2);
      for (int c = 0; c < C; c++)
        for (int s = 0; s < k; s++) begin
          @(negedge clk);
          load = 1; load_chan = CH_W'(c); load_sub = 1'(s);
          for (int p = 0; p < N; p++) begin px[c][s][p] = $urandom_range(0, 1023); load_line[p] = 10'(px[c][s][p]); end
          start = (c == C - 1) && (s == k - 1);
        end
      @(negedge clk); load = 0; start = 0;
      while (x < k * N && cyc < 1000) begin
        vout_ready = stall ? 1'($urandom_range(0, 2) != 0) : 1'b1;
        #1;
        chk("valid", vout_valid, 1);
        if (vout_ready) begin
          for (int c = 0; c < C; c++) chk($sformatf("px c%0d x%0d", c, x), vout_data[c], px[c][x % k][x / k]);
          chk("last", vout_last, x == k * N - 1);
          x++;
        end
        @(negedge clk); cyc++;
      end
      if (!stall) chk("cycles", cyc, k * N);
      chk("done", busy, 0);
      $display("rep %0d k %0d cycles %0d", rep, k, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
