// gcp: global control processor of the IC3D.
//
// The GCP runs the program that the whole chip executes. Each instruction
// (ic3d_pkg::gcp_instr_t) passes two stages:
//   issue   - fetched from the program memory at pc; flow control (JMP, LOOP,
//             DJNZ, BNZ, HALT) and video synchronisation (WAITV, WAITO) are
//             resolved here; array operations and VOUT start their line
//             memory read (rd_en/rd_addr).
//   execute - one cycle later, when the line read is available: the array
//             operation is broadcast to the PEs (ex_lpa_valid/ex_pe), line
//             transfers are carried out (VIN writes the video-in line at
//             ex_wr_addr, VOUT loads the video-out buffer), and the global
//             operations run: LDI, GETPE (read r0 of one PE), CNTF (count of
//             set flags), SETXA/XWR/XRD (external bus to the dual-port RAM,
//             address auto-increment) and IRQ (host interrupt).
// Issue stalls, inserting a bubble into execute, while WAITV finds no input
// line ready or WAITO finds the output processor busy (video sync), one cycle
// after every XRD (its data returns one clock later), and while a BNZ waits
// for an acc value still being produced. Counters of both kinds of stall are
// outputs.
//
// The host loads the program through prog_we/prog_addr/prog_wdata at any
// time and starts it with a start pulse; the IRQ output stays high until
// irq_ack. Video sync, program flow, global operations and the host interrupt
// are the roles the IC3D gives its GCP; the instruction set, pipeline and
// memory size are this design's own.
module gcp
  import ic3d_pkg::*;
#(
  parameter int unsigned NUM_PE     = 320,
  parameter int unsigned PROG_DEPTH = 256,
  parameter int unsigned XAW        = 17,
  localparam int unsigned PCW       = $clog2(PROG_DEPTH)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program load and run control
  input  logic                          prog_we,
  input  logic [PCW-1:0]                prog_addr,
  input  gcp_instr_t                    prog_wdata,
  input  logic                          start,
  output logic                          running,
  output logic                          halted,
  output logic [PCW-1:0]                pc_o,
  // line memory read (issue stage)
  output logic                          rd_en,
  output logic [LINE_AW-1:0]            rd_addr,
  // execute stage controls
  output logic                          ex_lpa_valid,
  output pe_ctrl_t                      ex_pe,
  output logic [LINE_AW-1:0]            ex_wr_addr,
  output logic                          ex_vin,
  output logic                          ex_vin_release,
  output logic                          ex_vout_load,
  output logic                          ex_vout_start,
  output logic [CH_W-1:0]               ex_chan,
  output logic                          ex_sub,
  // status from the array and video processors
  input  logic [NUM_PE-1:0][PIX_W-1:0]  pe_r0,
  input  logic [NUM_PE-1:0]             pe_flags,
  input  logic                          vin_ready,
  input  logic                          vout_busy,
  // external bus (dual-port RAM port A)
  output logic                          x_en,
  output logic                          x_we,
  output logic                          x_sem,
  output logic [XAW-1:0]                x_addr,
  output logic [7:0]                    x_wdata,
  input  logic [7:0]                    x_rdata,
  // host interrupt
  output logic                          irq,
  input  logic                          irq_ack,
  // statistics
  output logic [15:0]                   acc_o,
  output logic [15:0]                   stat_wait_stalls,
  output logic [15:0]                   stat_hz_stalls
);

  gcp_instr_t            prog [PROG_DEPTH];
  logic [PCW-1:0]        pc;
  gcp_instr_t            i0, s1;
  logic                  s1_valid;
  logic [IMM_W-1:0]      acc, cnt;
  logic [XAW-1:0]        xa;
  logic                  xrd_pend;
  logic                  vin_ready_eff, vout_busy_eff;
  logic                  stall_wait, stall_hz, advance;
  logic                  s1_writes_acc;
  logic [$clog2(NUM_PE+1)-1:0] nflags;

  always_ff @(posedge clk)
    if (prog_we) prog[prog_addr] <= prog_wdata;

  assign i0 = prog[pc];

  // ---------------- issue stage
  assign vin_ready_eff = vin_ready && !(s1_valid && s1.cls == I_VIN && s1.flag);
  assign vout_busy_eff = vout_busy ||  (s1_valid && s1.cls == I_VOUT && s1.flag);
  assign s1_writes_acc = s1_valid && (s1.cls inside {I_LDI, I_GETPE, I_CNTF, I_XRD});

  always_comb begin
    stall_wait = running && ((i0.cls == I_WAITV && !vin_ready_eff) ||
                             (i0.cls == I_WAITO &&  vout_busy_eff));
    stall_hz   = running && ((s1_valid && s1.cls == I_XRD) ||
                             (i0.cls == I_BNZ && (s1_writes_acc || xrd_pend)));
    advance    = running && !stall_wait && !stall_hz;
  end

  assign rd_en   = advance && (i0.cls == I_LPA || i0.cls == I_VOUT);
  assign rd_addr = i0.rd_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      running  <= 1'b0;
      halted   <= 1'b0;
      s1       <= '0;
      s1_valid <= 1'b0;
      cnt      <= '0;
      stat_wait_stalls <= '0;
      stat_hz_stalls   <= '0;
    end else if (start) begin
      pc       <= '0;
      running  <= 1'b1;
      halted   <= 1'b0;
      s1       <= '0;
      s1_valid <= 1'b0;
      cnt      <= '0;
    end else begin
      s1_valid <= advance && !(i0.cls inside {I_HALT, I_NOP, I_WAITV, I_WAITO, I_JMP,
                                              I_LOOP, I_DJNZ, I_BNZ});
      s1       <= i0;
      if (stall_wait) stat_wait_stalls <= stat_wait_stalls + 16'd1;
      if (stall_hz)   stat_hz_stalls   <= stat_hz_stalls + 16'd1;
      if (advance) begin
        pc <= pc + PCW'(1);
        unique case (i0.cls)
          I_JMP:  pc <= i0.imm[PCW-1:0];
          I_LOOP: cnt <= i0.imm;
          I_DJNZ: begin
            if (cnt > IMM_W'(1)) begin
              cnt <= cnt - IMM_W'(1);
              pc  <= i0.imm[PCW-1:0];
            end else cnt <= '0;
          end
          I_BNZ:  if (acc != '0) pc <= i0.imm[PCW-1:0];
          I_HALT: begin
            pc      <= pc;
            running <= 1'b0;
            halted  <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------- execute stage
  always_comb begin
    nflags = '0;
    for (int p = 0; p < NUM_PE; p++) nflags = nflags + $bits(nflags)'(pe_flags[p]);
  end

  assign ex_lpa_valid   = s1_valid && s1.cls == I_LPA;
  assign ex_pe          = s1.pe;
  assign ex_wr_addr     = s1.wr_addr;
  assign ex_vin         = s1_valid && s1.cls == I_VIN;
  assign ex_vin_release = ex_vin && s1.flag;
  assign ex_vout_load   = s1_valid && s1.cls == I_VOUT;
  assign ex_vout_start  = ex_vout_load && s1.flag;
  assign ex_chan        = s1.chan;
  assign ex_sub         = s1.sub;

  assign x_en    = s1_valid && (s1.cls == I_XWR || s1.cls == I_XRD);
  assign x_we    = s1.cls == I_XWR;
  assign x_sem   = s1.sub;
  assign x_addr  = xa;
  assign x_wdata = acc[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      xa       <= '0;
      xrd_pend <= 1'b0;
      irq      <= 1'b0;
    end else begin
      xrd_pend <= x_en && !x_we;
      if (xrd_pend) acc <= IMM_W'(x_rdata);
      if (irq_ack) irq <= 1'b0;
      if (s1_valid) begin
        unique case (s1.cls)
          I_LDI:   acc <= s1.imm;
          I_GETPE: acc <= (s1.imm < IMM_W'(NUM_PE)) ? IMM_W'(pe_r0[s1.imm]) : '0;
          I_CNTF:  acc <= IMM_W'(nflags);
          I_SETXA: xa  <= XAW'(s1.imm);
          I_XWR, I_XRD: xa <= xa + XAW'(1);
          I_IRQ:   irq <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  assign pc_o  = pc;
  assign acc_o = acc[15:0];

  a_no_acc_race: assert property (@(posedge clk) disable iff (!rst_n)
    !(xrd_pend && s1_valid && (s1.cls inside {I_LDI, I_GETPE, I_CNTF})))
    else $error("gcp: acc written twice in one cycle");

endmodule
