// lpa_pe: one processing element of the linear processor array.
//
// Every PE of the array receives the same control word (pe_ctrl_t) in the same
// cycle, together with three words of the memory line being read: its own
// (mem_c) and those of its left and right neighbours. It holds two 10-bit
// word registers (r0, r1) and a one-bit flag register, as in the IC3D. Operand
// a comes from memory (own/left/right) or a register, operand b from a
// register, the immediate or its own memory word. The result goes to r0 or r1
// and/or, through mem_we_o, to the PE's column of the line being written.
// Compare operations set the flag instead. A guarded operation only takes
// effect in PEs whose flag matches the guard, which gives data-dependent
// behaviour under a single instruction stream.
//
// Single-cycle: when `valid` is high the registers update at the next clock
// edge; res_o and mem_we_o are combinational and belong to the same cycle.
// The opcode set and the unsigned saturating arithmetic are this design's
// choices; the register file, flag, MAC and guarding follow the IC3D.
module lpa_pe
  import ic3d_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,     // an array instruction executes this cycle
  input  pe_ctrl_t         ctrl,
  input  logic [PIX_W-1:0] mem_c,
  input  logic [PIX_W-1:0] mem_l,
  input  logic [PIX_W-1:0] mem_r,
  output logic [PIX_W-1:0] res_o,     // value stored to memory when mem_we_o
  output logic             mem_we_o,
  output logic [PIX_W-1:0] r0_o,
  output logic             flag_o
);

  localparam logic [PIX_W-1:0] MAXV = '1;

  logic [PIX_W-1:0] r0, r1;
  logic             flag;
  logic [PIX_W-1:0] a, b, dstv, res;
  logic [2*PIX_W-1:0] prod, prod_sh;
  logic [PIX_W:0]   sum;
  logic [PIX_W+2**SHIFT_W-2:0] shl;
  logic             is_cmp, enable, new_flag;

  always_comb begin
    unique case (ctrl.a_sel)
      A_LEFT:  a = mem_l;
      A_RIGHT: a = mem_r;
      A_R0:    a = r0;
      A_R1:    a = r1;
      default: a = mem_c;
    endcase
    unique case (ctrl.b_sel)
      B_R0:    b = r0;
      B_R1:    b = r1;
      B_IMM:   b = ctrl.imm;
      default: b = mem_c;
    endcase
    dstv    = (ctrl.dst == DST_R1) ? r1 : r0;
    prod    = a * b;
    prod_sh = prod >> ctrl.shift;
    shl     = $bits(shl)'(a) << ctrl.shift;
    sum     = '0;
    res     = a;
    new_flag = flag;
    is_cmp  = 1'b0;
    unique case (ctrl.op)
      OP_PASS: res = a;
      OP_ADD: begin
        sum = {1'b0, a} + {1'b0, b};
        res = sum[PIX_W] ? MAXV : sum[PIX_W-1:0];
      end
      OP_SUB:  res = (a > b) ? a - b : '0;
      OP_ABSD: res = (a > b) ? a - b : b - a;
      OP_MUL:  res = (prod_sh > {{PIX_W{1'b0}}, MAXV}) ? MAXV : prod_sh[PIX_W-1:0];
      OP_MAC: begin
        if (prod_sh > {{PIX_W{1'b0}}, MAXV}) res = MAXV;
        else begin
          sum = {1'b0, dstv} + {1'b0, prod_sh[PIX_W-1:0]};
          res = sum[PIX_W] ? MAXV : sum[PIX_W-1:0];
        end
      end
      OP_MIN:  res = (a < b) ? a : b;
      OP_MAX:  res = (a > b) ? a : b;
      OP_AND:  res = a & b;
      OP_OR:   res = a | b;
      OP_XOR:  res = a ^ b;
      OP_SHR:  res = a >> ctrl.shift;
      OP_SHL:  res = (shl > $bits(shl)'(MAXV)) ? MAXV : shl[PIX_W-1:0];
      OP_CGT: begin is_cmp = 1'b1; new_flag = a > b;  end
      OP_CEQ: begin is_cmp = 1'b1; new_flag = a == b; end
      OP_CLT: begin is_cmp = 1'b1; new_flag = a < b;  end
      default: res = a;
    endcase
    unique case (ctrl.guard)
      G_FLAG:  enable = valid & flag;
      G_NFLAG: enable = valid & ~flag;
      default: enable = valid;
    endcase
  end

  assign res_o    = res;
  assign mem_we_o = enable & ctrl.mem_we & ~is_cmp;
  assign r0_o     = r0;
  assign flag_o   = flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0   <= '0;
      r1   <= '0;
      flag <= 1'b0;
    end else if (enable) begin
      if (is_cmp) flag <= new_flag;
      else if (ctrl.dst == DST_R0) r0 <= res;
      else if (ctrl.dst == DST_R1) r1 <= res;
    end
  end

endmodule
