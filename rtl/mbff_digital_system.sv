`timescale 1ps/1ps
// Digital system path built from radiation-tolerant multi-bit flip-flop
// groups, with the global timing error signal.
//
// G groups of N-bit flip-flops (mbff_group) replace the ordinary registers of
// a design; the combinational logic between them belongs to the user design
// and connects through D and Q. All groups share one clock and one reset:
//   * the primary clock CP1 of every group is CP, or, with CLK_FILTER = 1,
//     CP passed through a guard-gate glitch filter that removes short
//     transients on the clock net;
//   * each group derives its SSE clock CP2 from its CP1 through one skew
//     buffer of SKEW_PS (single-buffer clock skew);
//   * the reset CD feeds two separate reset trees, one for CD1 (primary and
//     parity flip-flops) and one for CD2 (SSEs); with SEPARATE_RESET = 0 the
//     groups treat them as a common reset.
// The ERR outputs of all groups are ORed and fed to a sample-and-count
// circuit clocked by CP. It reports, once per WINDOW cycles, whether the
// errors of the last window were systematic (timing_err, err_class =
// ERR_TIMING: the operating point can be relaxed no further) or sporadic
// (ERR_RADIATION). An external supply or clock controller closes the loop.
//
// Timing: Q follows D one CP edge later, as for plain flip-flops (plus the
// filter delay when CLK_FILTER = 1). err_any is combinational from the
// flip-flops; the window verdict comes WINDOW cycles after its first error.
// Defaults: two 2-bit even-parity groups with common reset and no clock
// filter, the arrangement of the example system and of the fabricated test
// chip; delays, SEL width and window length are this design's choices.
module mbff_digital_system
  import mbff_pkg::*;
#(
  parameter int unsigned G              = 2,
  parameter int unsigned N              = 2,
  parameter parity_e     PARITY         = PARITY_EVEN,
  parameter bit          SEPARATE_RESET = 1'b0,
  parameter bit          CLK_FILTER     = 1'b0,
  parameter int unsigned SEL_W          = 2,
  parameter int unsigned SKEW_PS        = 55,
  parameter int unsigned PD_CELL_PS     = 50,
  parameter int unsigned XOR_PS         = 40,
  parameter int unsigned FILTER_PS      = 60,
  parameter int unsigned WINDOW         = 256,
  parameter int unsigned THRESH         = 2,
  localparam int unsigned CW            = $clog2(WINDOW + 1)
) (
  input  logic                   CP,
  input  logic                   CD,
  input  logic [SEL_W-1:0]       SEL,
  input  logic [G-1:0][N-1:0]    D,
  output logic [G-1:0][N-1:0]    Q,
  output logic [G-1:0]           ERR,
  output logic                   err_any,
  output logic                   timing_err,
  output err_class_e             err_class,
  output logic [CW-1:0]          err_count
);

  logic cp1;
  logic cd1_tree;
  logic cd2_tree;

  if (CLK_FILTER) begin : g_filter
    guard_gate_filter #(.DELAY_PS(FILTER_PS)) u_filter (.cp(CP), .cp_f(cp1));
  end else begin : g_nofilter
    assign cp1 = CP;
  end

  // Two reset buffer trees driven by the same reset at the top.
  assign cd1_tree = CD;
  assign cd2_tree = CD;

  for (genvar g = 0; g < G; g++) begin : g_grp
    logic cp2;
    delay_cell #(.DELAY_PS(SKEW_PS)) u_skew (.a(cp1), .y(cp2));
    mbff_group #(
      .N(N), .PARITY(PARITY), .SEPARATE_RESET(SEPARATE_RESET),
      .SEL_W(SEL_W), .PD_CELL_PS(PD_CELL_PS), .XOR_PS(XOR_PS)
    ) u_grp (
      .D(D[g]), .CP1(cp1), .CP2(cp2), .CD1(cd1_tree), .CD2(cd2_tree),
      .SEL(SEL), .Q(Q[g]), .ERR(ERR[g])
    );
  end

  error_or #(.G(G)) u_or (.err(ERR), .err_any(err_any));

  sample_count #(.WINDOW(WINDOW), .THRESH(THRESH)) u_sc (
    .clk(CP), .rst_n(CD), .err_in(err_any),
    .timing_err(timing_err), .err_class(err_class), .err_count(err_count)
  );

endmodule
