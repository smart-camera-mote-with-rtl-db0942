// video_in_proc: IC3D video input processor.
//
// Receives CHANNELS pixel streams that share one timing (pix_valid marks a
// pixel on every channel, line_end closes the line). Pixels are de-interlaced
// onto the processor array while they arrive: with k pixels per PE (k = 1 for
// CIF, 2 for VGA, selected by ppe2) pixel x goes to PE x/k of sub-line x mod k,
// so a VGA line becomes two memory lines, one with the even and one with the
// odd pixels, and every PE owns two horizontally adjacent pixels.
//
// Capture and hold are double-buffered: at line_end the captured line is
// copied to the hold buffer and line_ready rises. The control processor then
// moves hold sub-lines into the line memory (rd_chan/rd_sub select the line
// presented on line_o) and pulses release. If a new line ends while the held
// one was never released, the held line is overwritten and overrun_cnt counts
// it. Line timing: line_end must come at least one cycle after the line's last
// pixel. The interlaced placement follows the IC3D; the double buffer and
// overrun accounting are this design's choice.
module video_in_proc
  import ic3d_pkg::*;
#(
  parameter int unsigned NUM_PE   = 320,
  parameter int unsigned CHANNELS = 3,
  parameter int unsigned MAX_PPE  = 2,
  localparam int unsigned XW      = $clog2(NUM_PE * MAX_PPE + 1)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   ppe2,        // 2 pixels per PE (VGA)
  input  logic                                   pix_valid,
  input  logic [CHANNELS-1:0][PIX_W-1:0]         pix_data,
  input  logic                                   line_end,
  input  logic [CH_W-1:0]                        rd_chan,
  input  logic                                   rd_sub,
  output logic [NUM_PE-1:0][PIX_W-1:0]           line_o,
  input  logic                                   release_i,
  output logic                                   line_ready,
  output logic [15:0]                            overrun_cnt,
  output logic [15:0]                            line_cnt
);

  typedef logic [MAX_PPE-1:0][NUM_PE-1:0][PIX_W-1:0] chan_buf_t;

  chan_buf_t      cap  [CHANNELS];
  chan_buf_t      hold [CHANNELS];
  logic [XW-1:0]  x;
  logic [XW-1:0]  pe_idx;
  logic           sub_idx;
  logic [XW-1:0]  npix;

  assign npix    = ppe2 ? XW'(NUM_PE * 2) : XW'(NUM_PE);
  assign pe_idx  = ppe2 ? (x >> 1) : x;
  assign sub_idx = ppe2 ? x[0] : 1'b0;

  always_ff @(posedge clk) begin
    if (pix_valid && x < npix)
      for (int c = 0; c < CHANNELS; c++)
        cap[c][sub_idx][pe_idx] <= pix_data[c];
    if (line_end)
      for (int c = 0; c < CHANNELS; c++)
        hold[c] <= cap[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x           <= '0;
      line_ready  <= 1'b0;
      overrun_cnt <= '0;
      line_cnt    <= '0;
    end else begin
      if (line_end) begin
        x          <= '0;
        line_ready <= 1'b1;
        line_cnt   <= line_cnt + 16'd1;
        if (line_ready && !release_i) overrun_cnt <= overrun_cnt + 16'd1;
      end else begin
        if (pix_valid && x < npix) x <= x + XW'(1);
        if (release_i) line_ready <= 1'b0;
      end
    end
  end

  always_comb begin
    line_o = '0;
    for (int c = 0; c < CHANNELS; c++)
      if (rd_chan == CH_W'(c)) line_o = hold[c][rd_sub && (MAX_PPE > 1)];
  end

  a_line_end_gap: assert property (@(posedge clk) disable iff (!rst_n)
    !(line_end && pix_valid))
    else $error("video_in_proc: line_end must follow the last pixel");

endmodule
