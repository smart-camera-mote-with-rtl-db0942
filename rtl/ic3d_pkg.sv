// ic3d_pkg: types and constants shared by the IC3D vision processor blocks.
//
// The IC3D is a line-parallel SIMD processor: a linear array of 320 10-bit
// processing elements (PEs) works on whole image lines held in a 64-line
// memory, under one instruction stream issued by a global control processor
// (GCP). The array size, pixel width and memory depth are the figures of the
// Xetal/IC3D architecture; the instruction encoding below is this design's own
// choice, as no encoding is published for the chip.
//
// One GCP instruction (gcp_instr_t) carries either an array operation, a line
// transfer between the video I/O processors and the line memory, or a control
// / global operation. Field use per class is documented at gcp_cls_e.
package ic3d_pkg;

  localparam int unsigned PIX_W     = 10;   // PE datapath width
  localparam int unsigned LINE_AW   = 6;    // 64 line-memory lines
  localparam int unsigned IMM_W     = 17;   // wide enough for a 128K DPRAM address
  localparam int unsigned SHIFT_W   = 4;
  localparam int unsigned CH_W      = 2;    // up to 3 video channels

  // PE operations. Arithmetic is unsigned, saturating to 0 .. 2**PIX_W-1.
  typedef enum logic [3:0] {
    OP_PASS = 4'd0,   // res = a
    OP_ADD  = 4'd1,   // res = sat(a + b)
    OP_SUB  = 4'd2,   // res = max(a - b, 0)
    OP_ABSD = 4'd3,   // res = |a - b|                 (compound)
    OP_MUL  = 4'd4,   // res = sat((a * b) >> shift)
    OP_MAC  = 4'd5,   // res = sat(dst + ((a * b) >> shift))
    OP_MIN  = 4'd6,
    OP_MAX  = 4'd7,
    OP_AND  = 4'd8,
    OP_OR   = 4'd9,
    OP_XOR  = 4'd10,
    OP_SHR  = 4'd11,  // res = a >> shift
    OP_SHL  = 4'd12,  // res = sat(a << shift)
    OP_CGT  = 4'd13,  // flag = a > b   (no result written)
    OP_CEQ  = 4'd14,  // flag = a == b  (no result written)
    OP_CLT  = 4'd15   // flag = a < b   (no result written)
  } lpa_op_e;

  typedef enum logic [2:0] {
    A_MEM   = 3'd0,   // own word of the line read this cycle
    A_LEFT  = 3'd1,   // left neighbour's word of that line
    A_RIGHT = 3'd2,   // right neighbour's word of that line
    A_R0    = 3'd3,
    A_R1    = 3'd4
  } a_sel_e;

  typedef enum logic [1:0] {
    B_R0  = 2'd0,
    B_R1  = 2'd1,
    B_IMM = 2'd2,
    B_MEM = 2'd3
  } b_sel_e;

  typedef enum logic [1:0] {
    DST_NONE = 2'd0,
    DST_R0   = 2'd1,
    DST_R1   = 2'd2
  } dst_e;

  typedef enum logic [1:0] {
    G_ALL   = 2'd0,   // every PE executes
    G_FLAG  = 2'd1,   // only PEs whose flag is 1
    G_NFLAG = 2'd2    // only PEs whose flag is 0
  } guard_e;

  // Per-PE control, broadcast identically to every element.
  typedef struct packed {
    lpa_op_e               op;
    a_sel_e                a_sel;
    b_sel_e                b_sel;
    dst_e                  dst;
    logic                  mem_we;   // store result to the write line
    guard_e                guard;
    logic                  mirror;   // array ends: 1 mirrored, 0 coupled (ring)
    logic [SHIFT_W-1:0]    shift;
    logic [PIX_W-1:0]      imm;
  } pe_ctrl_t;

  // Instruction classes.
  //   I_LPA   array op (fields of pe_ctrl_t, rd_addr, wr_addr)
  //   I_VIN   line memory[wr_addr] <= video-in hold line (chan, sub); flag=1 releases it
  //   I_VOUT  video-out buffer (chan, sub) <= line memory[rd_addr]; flag=1 starts output
  //   I_WAITV stall until the video-in processor holds a complete line
  //   I_WAITO stall until the video-out processor is idle
  //   I_JMP   pc <= imm
  //   I_LOOP  cnt <= imm
  //   I_DJNZ  if cnt > 1 { cnt--, pc <= imm } else cnt <= 0
  //   I_BNZ   if acc != 0 pc <= imm
  //   I_LDI   acc <= imm
  //   I_GETPE acc <= r0 of PE imm
  //   I_CNTF  acc <= number of PEs with flag set
  //   I_SETXA xa  <= imm (DPRAM address)
  //   I_XWR   DPRAM[xa] <= acc[7:0], xa++   (sub=1: semaphore/control space)
  //   I_XRD   acc <= DPRAM[xa], xa++        (sub=1: semaphore/control space)
  //   I_IRQ   raise the host interrupt
  //   I_HALT  stop
  typedef enum logic [4:0] {
    I_NOP   = 5'd0,
    I_LPA   = 5'd1,
    I_VIN   = 5'd2,
    I_VOUT  = 5'd3,
    I_WAITV = 5'd4,
    I_WAITO = 5'd5,
    I_JMP   = 5'd6,
    I_LOOP  = 5'd7,
    I_DJNZ  = 5'd8,
    I_BNZ   = 5'd9,
    I_LDI   = 5'd10,
    I_GETPE = 5'd11,
    I_CNTF  = 5'd12,
    I_SETXA = 5'd13,
    I_XWR   = 5'd14,
    I_XRD   = 5'd15,
    I_IRQ   = 5'd16,
    I_HALT  = 5'd17
  } gcp_cls_e;

  typedef struct packed {
    gcp_cls_e              cls;
    pe_ctrl_t              pe;
    logic [LINE_AW-1:0]    rd_addr;
    logic [LINE_AW-1:0]    wr_addr;
    logic [CH_W-1:0]       chan;
    logic                  sub;      // sub-line (interlace index) or semaphore space
    logic                  flag;     // release (VIN) / start (VOUT)
    logic [IMM_W-1:0]      imm;      // control immediate
  } gcp_instr_t;

  localparam int unsigned INSTR_W = $bits(gcp_instr_t);

endpackage
