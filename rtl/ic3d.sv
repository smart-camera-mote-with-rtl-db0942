// ic3d: line-parallel SIMD vision processor.
//
// Five blocks: the video input processor (video_in_proc) collects sensor
// lines, the line memory (line_memory, 64 lines of NUM_PE x 10 bits) holds
// them, the linear processor array (lpa, NUM_PE PEs) processes one whole
// line per instruction, the video output processor (video_out_proc) streams
// result lines out, and the global control processor (gcp) runs the program,
// synchronises to the video, performs global operations and talks to the host
// through the dual-port RAM bus (x_*) and an interrupt line.
//
// Data path per instruction: the GCP's issue stage reads one memory line; in
// the next cycle that line reaches the array (own and neighbour words per PE),
// and the array's results are written back to another (or the same) line
// through the masked write port. A VIN instruction uses the same write port to
// store a line from the video input processor; a VOUT instruction uses the
// read port to fill the video output processor. Every transfer is therefore
// scheduled by the program and the memory needs no arbitration. With ppe2
// set, each image line of 2*NUM_PE pixels (VGA on 320 PEs) occupies two
// memory lines holding its even and odd pixels.
//
// The block split and sizes follow the IC3D; the way the blocks are joined
// (program-scheduled transfers) is this design's choice.
module ic3d
  import ic3d_pkg::*;
#(
  parameter int unsigned NUM_PE     = 320,
  parameter int unsigned LINES      = 64,
  parameter int unsigned CHANNELS   = 3,
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned XAW        = 17,
  localparam int unsigned PCW       = $clog2(PROG_DEPTH)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           ppe2,
  // video in
  input  logic                           vin_valid,
  input  logic [CHANNELS-1:0][PIX_W-1:0] vin_data,
  input  logic                           vin_line_end,
  // video out
  output logic                           vout_valid,
  output logic [CHANNELS-1:0][PIX_W-1:0] vout_data,
  output logic                           vout_last,
  input  logic                           vout_ready,
  // program
  input  logic                           prog_we,
  input  logic [PCW-1:0]                 prog_addr,
  input  gcp_instr_t                     prog_wdata,
  input  logic                           start,
  output logic                           running,
  output logic                           halted,
  // external bus to the dual-port RAM
  output logic                           x_en,
  output logic                           x_we,
  output logic                           x_sem,
  output logic [XAW-1:0]                 x_addr,
  output logic [7:0]                     x_wdata,
  input  logic [7:0]                     x_rdata,
  output logic                           irq,
  input  logic                           irq_ack,
  // statistics
  output logic [15:0]                    stat_vin_lines,
  output logic [15:0]                    stat_vin_overruns,
  output logic [15:0]                    stat_wait_stalls,
  output logic [15:0]                    stat_hz_stalls,
  output logic [15:0]                    stat_bypass,
  output logic [15:0]                    acc_o
);

  logic                          rd_en;
  logic [LINE_AW-1:0]            rd_addr, ex_wr_addr;
  logic                          ex_lpa_valid, ex_vin, ex_vin_release;
  logic                          ex_vout_load, ex_vout_start, ex_sub;
  logic [CH_W-1:0]               ex_chan;
  pe_ctrl_t                      ex_pe;
  logic [NUM_PE-1:0][PIX_W-1:0]  mem_rline, lpa_wline, vin_line, wline, pe_r0;
  logic [NUM_PE-1:0]             lpa_wmask, wmask, pe_flags;
  logic                          vin_ready, vout_busy, bypass;

  gcp #(.NUM_PE(NUM_PE), .PROG_DEPTH(PROG_DEPTH), .XAW(XAW)) u_gcp (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_wdata, .start, .running, .halted, .pc_o(),
    .rd_en, .rd_addr,
    .ex_lpa_valid, .ex_pe, .ex_wr_addr, .ex_vin, .ex_vin_release,
    .ex_vout_load, .ex_vout_start, .ex_chan, .ex_sub,
    .pe_r0, .pe_flags, .vin_ready, .vout_busy,
    .x_en, .x_we, .x_sem, .x_addr, .x_wdata, .x_rdata,
    .irq, .irq_ack,
    .acc_o, .stat_wait_stalls, .stat_hz_stalls
  );

  line_memory #(.NUM_PE(NUM_PE), .LINES(LINES)) u_mem (
    .clk,
    .re    (rd_en),
    .raddr (rd_addr[$clog2(LINES)-1:0]),
    .rdata (mem_rline),
    .waddr (ex_wr_addr[$clog2(LINES)-1:0]),
    .wmask,
    .wdata (wline),
    .bypass_o (bypass)
  );

  lpa #(.NUM_PE(NUM_PE)) u_lpa (
    .clk, .rst_n,
    .valid  (ex_lpa_valid),
    .ctrl   (ex_pe),
    .line_i (mem_rline),
    .line_o (lpa_wline),
    .wmask_o(lpa_wmask),
    .r0_o   (pe_r0),
    .flags_o(pe_flags)
  );

  assign wline = ex_vin ? vin_line : lpa_wline;
  assign wmask = ex_vin ? '1 : lpa_wmask;

  video_in_proc #(.NUM_PE(NUM_PE), .CHANNELS(CHANNELS)) u_vip (
    .clk, .rst_n, .ppe2,
    .pix_valid (vin_valid),
    .pix_data  (vin_data),
    .line_end  (vin_line_end),
    .rd_chan   (ex_chan),
    .rd_sub    (ex_sub),
    .line_o    (vin_line),
    .release_i (ex_vin_release),
    .line_ready(vin_ready),
    .overrun_cnt(stat_vin_overruns),
    .line_cnt  (stat_vin_lines)
  );

  video_out_proc #(.NUM_PE(NUM_PE), .CHANNELS(CHANNELS)) u_vop (
    .clk, .rst_n, .ppe2,
    .load      (ex_vout_load),
    .load_chan (ex_chan),
    .load_sub  (ex_sub),
    .load_line (mem_rline),
    .start     (ex_vout_start),
    .busy      (vout_busy),
    .vout_valid, .vout_data, .vout_last, .vout_ready
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      stat_bypass <= '0;
    else if (bypass) stat_bypass <= stat_bypass + 16'd1;

endmodule
