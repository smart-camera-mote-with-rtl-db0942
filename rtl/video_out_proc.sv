// video_out_proc: IC3D video output processor.
//
// Holds one output line per channel as up to MAX_PPE sub-lines of NUM_PE
// words. The control processor fills a sub-line with `load` (one whole memory
// line per clock) and then pulses `start`; the block re-interlaces the
// sub-lines and streams NUM_PE*k pixels per channel (k = 1 or 2 by ppe2),
// pixel x taken from sub-line x mod k of PE x/k, so a line written in by the
// input processor comes back out in its original order.
//
// Output handshake: one pixel per clock on all channels while vout_valid and
// vout_ready are both high; vout_last marks the final pixel of a line. busy is
// high from start until the last pixel has been taken; loading a channel's
// buffer while busy is a program error (checked by an assertion). Streaming
// and re-interlacing follow the IC3D; the handshake is this design's choice.
module video_out_proc
  import ic3d_pkg::*;
#(
  parameter int unsigned NUM_PE   = 320,
  parameter int unsigned CHANNELS = 3,
  parameter int unsigned MAX_PPE  = 2,
  localparam int unsigned XW      = $clog2(NUM_PE * MAX_PPE + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             ppe2,
  input  logic                             load,
  input  logic [CH_W-1:0]                  load_chan,
  input  logic                             load_sub,
  input  logic [NUM_PE-1:0][PIX_W-1:0]     load_line,
  input  logic                             start,
  output logic                             busy,
  output logic                             vout_valid,
  output logic [CHANNELS-1:0][PIX_W-1:0]   vout_data,
  output logic                             vout_last,
  input  logic                             vout_ready
);

  typedef logic [MAX_PPE-1:0][NUM_PE-1:0][PIX_W-1:0] chan_buf_t;

  chan_buf_t     obuf [CHANNELS];
  logic [XW-1:0] x;
  logic [XW-1:0] pe_idx;
  logic          sub_idx;
  logic [XW-1:0] npix;

  assign npix    = ppe2 ? XW'(NUM_PE * 2) : XW'(NUM_PE);
  assign pe_idx  = ppe2 ? (x >> 1) : x;
  assign sub_idx = ppe2 ? x[0] : 1'b0;

  always_ff @(posedge clk) begin
    if (load)
      for (int c = 0; c < CHANNELS; c++)
        if (load_chan == CH_W'(c)) obuf[c][load_sub && (MAX_PPE > 1)] <= load_line;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      x    <= '0;
    end else if (start && !busy) begin
      busy <= 1'b1;
      x    <= '0;
    end else if (busy && vout_ready) begin
      if (x == npix - XW'(1)) begin
        busy <= 1'b0;
        x    <= '0;
      end else begin
        x <= x + XW'(1);
      end
    end
  end

  assign vout_valid = busy;
  assign vout_last  = busy && (x == npix - XW'(1));
  always_comb
    for (int c = 0; c < CHANNELS; c++)
      vout_data[c] = busy ? obuf[c][sub_idx][pe_idx] : '0;

  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) !(load && busy))
    else $error("video_out_proc: buffer loaded while streaming");

endmodule
