// video_in_proc_tb: self-checking test of the video input processor.
//
// Reduced array (NUM_PE = 8), three channels. Streams lines with random gaps
// in CIF mode (1 pixel per PE) and VGA mode (2 pixels per PE), then reads
// every channel and sub-line of the held line and compares it with the
// de-interlacing rule pixel x -> PE x/k, sub-line x mod k. Also checks
// line_ready/release and that a line arriving before the previous one was
// released is counted as an overrun and replaces it.
module video_in_proc_tb;
  import ic3d_pkg::*;
  localparam int N = 8, C = 3;

  logic clk = 0, rst_n = 0, ppe2, pix_valid, line_end, rd_sub, release_i, line_ready;
  logic [C-1:0][PIX_W-1:0] pix_data;
  logic [CH_W-1:0] rd_chan;
  logic [N-1:0][PIX_W-1:0] line_o;
  logic [15:0] overruns, lines;
  int checks = 0, failures = 0;
  int px [C][2*N];

  video_in_proc #(.NUM_PE(N), .CHANNELS(C)) dut (.clk, .rst_n, .ppe2, .pix_valid, .pix_data, .line_end,
    .rd_chan, .rd_sub, .line_o, .release_i, .line_ready, .overrun_cnt(overruns), .line_cnt(lines));

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

  task automatic send_line(int k);
    for (int x = 0; x < k * N; x++) begin
      while ($urandom_range(0, 2) == 0) begin @(negedge clk); pix_valid = 0; end
      @(negedge clk);
      pix_valid = 1;
      for (int c = 0; c < C; c++) begin px[c][x] = $urandom_range(0, 1023); pix_data[c] = 10'(px[c][x]); end
    end
    @(negedge clk); pix_valid = 0; line_end = 1;
    @(negedge clk); line_end = 0;
  endtask

  task automatic check_hold(int k);
    for (int c = 0; c < C; c++)
      for (int s = 0; s < k; s++) begin
        rd_chan = CH_W'(c); rd_sub = 1'(s); #1;
        for (int p = 0; p < N; p++) chk($sformatf("c%0d s%0d p%0d", c, s, p), line_o[p], px[c][p * k + s]);
      end
  endtask

  initial begin
    ppe2 = 0; pix_valid = 0; line_end = 0; rd_sub = 0; rd_chan = 0; release_i = 0; pix_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      int k;
      k = (rep % 2) + 1;
      ppe2 = (k == 2);
      send_line(k);
      chk("ready", line_ready, 1);
      check_hold(k);
      @(negedge clk); release_i = 1; @(negedge clk); release_i = 0;
      chk("released", line_ready, 0);
    end
    chk("no overrun yet", overruns, 0);
    // overrun: two lines without release, newest kept
    ppe2 = 1;
    send_line(2);
    send_line(2);
    chk("overrun", overruns, 1);
    check_hold(2);
    chk("lines", lines, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
