// smart_camera: digital core of a wireless smart camera mote.
//
// The mote splits vision work by level. Pixel-level work (filtering,
// thresholding, motion detection) runs at sensor speed on the IC3D, a SIMD
// processor that handles a whole image line per instruction. Object-level
// work (tracking, decisions, networking) runs on an 8051 host
// microcontroller at its own pace. The two meet in a dual-port RAM: the
// IC3D writes features, coordinates or image parts into it and raises an
// interrupt; the host reads them, and can write data back. Only event
// descriptions then go over the low-rate IEEE 802.15.4 radio attached to the
// host's UART.
//
// This module joins the IC3D (ic3d) to port A of the dual-port RAM (dpram)
// and adds the I2C slave (i2c_prog_loader) through which the host downloads
// IC3D programs. Everything else on the board is a bought-in part and meets
// this core at its pins: up to three sensor pixel streams (vin_*), the video
// output (vout_*), the host's 16-bit external bus with a bank-select pin
// (host_*), the interrupt line (host_irq/host_irq_ack), the I2C lines and a
// start pin for the IC3D program.
module smart_camera
  import ic3d_pkg::*;
#(
  parameter int unsigned NUM_PE     = 320,
  parameter int unsigned LINES      = 64,
  parameter int unsigned CHANNELS   = 3,
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned DP_AW      = 17
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           ppe2,          // 1: VGA, two pixels per PE
  // sensor video
  input  logic                           vin_valid,
  input  logic [CHANNELS-1:0][PIX_W-1:0] vin_data,
  input  logic                           vin_line_end,
  // video output
  output logic                           vout_valid,
  output logic [CHANNELS-1:0][PIX_W-1:0] vout_data,
  output logic                           vout_last,
  input  logic                           vout_ready,
  // host external bus to the dual-port RAM
  input  logic                           host_en,
  input  logic                           host_we,
  input  logic                           host_sem,
  input  logic                           host_bank,
  input  logic [DP_AW-2:0]               host_addr,
  input  logic [7:0]                     host_wdata,
  output logic [7:0]                     host_rdata,
  output logic                           host_busy,
  output logic                           host_denied,
  output logic                           host_irq,
  input  logic                           host_irq_ack,
  // program download and control
  input  logic                           i2c_scl,
  input  logic                           i2c_sda,
  output logic                           i2c_sda_oe,
  input  logic                           ic3d_start,
  output logic                           ic3d_running,
  output logic                           ic3d_halted,
  // statistics
  output logic                           ic3d_denied,
  output logic [15:0]                    stat_vin_lines,
  output logic [15:0]                    stat_vin_overruns,
  output logic [15:0]                    stat_wait_stalls,
  output logic [15:0]                    stat_hz_stalls,
  output logic [15:0]                    stat_bypass,
  output logic [15:0]                    ic3d_acc
);

  localparam int unsigned PCW = $clog2(PROG_DEPTH);

  logic             x_en, x_we, x_sem;
  logic [DP_AW-1:0] x_addr;
  logic [7:0]       x_wdata, x_rdata;
  logic             prog_we;
  logic [PCW-1:0]   prog_addr;
  logic [INSTR_W-1:0] prog_wdata;

  i2c_prog_loader #(.IW(INSTR_W), .PCW(PCW)) u_i2c (
    .clk, .rst_n,
    .scl (i2c_scl),
    .sda (i2c_sda),
    .sda_oe (i2c_sda_oe),
    .prog_we, .prog_addr, .prog_wdata
  );

  ic3d #(.NUM_PE(NUM_PE), .LINES(LINES), .CHANNELS(CHANNELS),
         .PROG_DEPTH(PROG_DEPTH), .XAW(DP_AW)) u_ic3d (
    .clk, .rst_n, .ppe2,
    .vin_valid, .vin_data, .vin_line_end,
    .vout_valid, .vout_data, .vout_last, .vout_ready,
    .prog_we, .prog_addr,
    .prog_wdata (gcp_instr_t'(prog_wdata)),
    .start   (ic3d_start),
    .running (ic3d_running),
    .halted  (ic3d_halted),
    .x_en, .x_we, .x_sem, .x_addr, .x_wdata, .x_rdata,
    .irq     (host_irq),
    .irq_ack (host_irq_ack),
    .stat_vin_lines, .stat_vin_overruns, .stat_wait_stalls, .stat_hz_stalls,
    .stat_bypass,
    .acc_o   (ic3d_acc)
  );

  dpram #(.AW(DP_AW), .DW(8)) u_dpram (
    .clk, .rst_n,
    .a_en (x_en), .a_we (x_we), .a_sem (x_sem), .a_addr (x_addr),
    .a_wdata (x_wdata), .a_rdata (x_rdata), .a_denied (ic3d_denied),
    .b_en (host_en), .b_we (host_we), .b_sem (host_sem), .b_bank (host_bank),
    .b_addr (host_addr), .b_wdata (host_wdata), .b_rdata (host_rdata),
    .b_busy (host_busy), .b_denied (host_denied)
  );

endmodule
