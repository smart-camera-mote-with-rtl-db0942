// lpa: linear processor array of NUM_PE processing elements.
//
// All PEs share one control word and one memory line: line_i holds the line
// read from the line memory in this cycle, PE p using word p. Each PE also
// gets the words of its neighbours p-1 and p+1. At the two ends of the array
// the missing neighbour is supplied according to ctrl.mirror: coupled (0)
// closes the array into a ring, PE 0 seeing PE NUM_PE-1 and vice versa;
// mirrored (1) reflects the line about its end, PE 0 seeing PE 1 on its left
// and PE NUM_PE-1 seeing PE NUM_PE-2 on its right. Coupled/mirrored ends and
// neighbour access follow the IC3D; reading "mirrored" as a reflection that
// skips the edge word is this design's choice.
//
// Outputs, valid in the same cycle: the line to write back (line_o) with a
// per-PE write mask (wmask_o), every PE's r0 and flag for the global
// operations of the control processor.
module lpa
  import ic3d_pkg::*;
#(
  parameter int unsigned NUM_PE = 320
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          valid,
  input  pe_ctrl_t                      ctrl,
  input  logic [NUM_PE-1:0][PIX_W-1:0]  line_i,
  output logic [NUM_PE-1:0][PIX_W-1:0]  line_o,
  output logic [NUM_PE-1:0]             wmask_o,
  output logic [NUM_PE-1:0][PIX_W-1:0]  r0_o,
  output logic [NUM_PE-1:0]             flags_o
);

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    logic [PIX_W-1:0] left, right;
    if (p == 0) begin : g_l0
      assign left = ctrl.mirror ? line_i[(NUM_PE > 1) ? 1 : 0] : line_i[NUM_PE-1];
    end else begin : g_l
      assign left = line_i[p-1];
    end
    if (p == NUM_PE-1) begin : g_rn
      assign right = ctrl.mirror ? line_i[(NUM_PE > 1) ? NUM_PE-2 : 0] : line_i[0];
    end else begin : g_r
      assign right = line_i[p+1];
    end
    lpa_pe u_pe (
      .clk, .rst_n, .valid, .ctrl,
      .mem_c (line_i[p]),
      .mem_l (left),
      .mem_r (right),
      .res_o (line_o[p]),
      .mem_we_o (wmask_o[p]),
      .r0_o  (r0_o[p]),
      .flag_o(flags_o[p])
    );
  end

endmodule
