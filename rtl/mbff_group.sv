`timescale 1ps/1ps
// Radiation-tolerant n-bit multi-bit flip-flop group with timing pre-error
// sensing.
//
// N ordinary D flip-flops (primary) capture D on CP1. A replica secondary
// storage element (SSE) per bit captures the same D on CP2, a copy of the
// clock skewed later, so that a short transient on D is seen by at most one
// of the two copies. The parity of D, passed through a programmable delay
// (PD), is stored in a parity flip-flop on CP1 (PiR). The error computation
// unit compares PiR with the parity of the primary outputs (Po):
//   ERR = 0 -> Q = primary outputs,
//   ERR = 1 -> Q = SSE outputs.
// A single upset or captured transient in a primary flip-flop raises ERR and
// the SSE copy takes over; an upset in an SSE changes nothing at Q; an upset
// in the parity flip-flop raises ERR while both copies still agree. Because
// the parity path is slower than the data path, a D transition just before
// the CP1 edge is captured by the primary flip-flops but not by PiR: ERR then
// flags a timing pre-error while Q stays correct. Two bits changing in the
// same late window keep the parity and are not flagged.
//
// The group keeps the stored state as is: an upset is masked, not repaired,
// until the next clock edge rewrites the flip-flops.
//
// Resets are asynchronous and active low: CD1 clears the primary
// flip-flops and resets the parity flip-flop, CD2 clears the SSEs. With a
// common reset (SEPARATE_RESET = 0, both lines from one net) the parity
// flip-flop resets to the parity of an all-zero word, so no error follows
// reset. With separate reset trees (SEPARATE_RESET = 1) it resets to the
// opposite value, so a transient on CD1 alone always raises ERR and Q is
// taken from the SSEs; ERR is then also high during a real reset.
//
// Detection window: a D change is flagged when it comes less than
// ceil(log2 N)*XOR_PS + SEL*PD_CELL_PS before the CP1 edge. The first term
// is the gate delay of the input parity tree, so wider groups have wider
// windows; the second is the programmable delay. The output parity tree is
// modelled without delay.
//
// Timing: no added cycles of latency. Q and ERR settle right after CP1;
// when ERR rises on an edge, Q takes the SSE word, which is new only after
// CP2, so the new value reaches Q up to one skew late (the flip-flops here
// have no clock-to-output delay). In silicon the skew must stay below the
// flip-flop clock-to-output delay plus the ERR path delay, and the hold
// check of the SSEs gains the skew.
//
// The structure, the even (XOR) and odd (XNOR) parity variants and the reset
// polarity rules follow the published circuit, as does the window growing
// with the parity tree; the SEL width and the delay values are this
// design's own choices.
module mbff_group
  import mbff_pkg::*;
#(
  parameter int unsigned N              = 2,
  parameter parity_e     PARITY         = PARITY_EVEN,
  parameter bit          SEPARATE_RESET = 1'b0,
  parameter int unsigned SEL_W          = 2,
  parameter int unsigned PD_CELL_PS     = 50,
  parameter int unsigned XOR_PS         = 40
) (
  input  logic [N-1:0]     D,
  input  logic             CP1,
  input  logic             CP2,
  input  logic             CD1,
  input  logic             CD2,
  input  logic [SEL_W-1:0] SEL,
  output logic [N-1:0]     Q,
  output logic             ERR
);

  localparam logic PIR_RESET = zero_parity(PARITY) ^ SEPARATE_RESET;
  // Gate delay of the input parity tree: one XOR_PS per tree level, built
  // from 10 ps stages so that short transients on D still travel through.
  localparam int unsigned LEVELS  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned TREE_ST = (LEVELS * XOR_PS + 9) / 10;

  logic [N-1:0] qp;     // primary flip-flops
  logic [N-1:0] qs;     // secondary storage elements
  logic         pi;     // parity of D (zero-delay function)
  logic [TREE_ST:0] pi_tree;  // same, after the modelled tree delay
  logic         pi_d;   // parity of D after the programmable delay
  logic         pir;    // stored input parity
  logic         po;     // parity of the primary outputs

  if (N < 2) begin : g_bad_n
    $error("mbff_group: a group needs at least two bits");
  end

  for (genvar i = 0; i < N; i++) begin : g_bit
    mbff_dff #(.RESET_VAL(1'b0)) u_prim (.CP(CP1), .CDN(CD1), .D(D[i]), .Q(qp[i]));
    mbff_dff #(.RESET_VAL(1'b0)) u_sse  (.CP(CP2), .CDN(CD2), .D(D[i]), .Q(qs[i]));
  end

  parity_gen #(.N(N), .PARITY(PARITY)) u_pgen_in  (.d(D),  .p(pi));
  assign pi_tree[0] = pi;
  for (genvar i = 0; i < TREE_ST; i++) begin : g_tree_delay
    delay_cell #(.DELAY_PS(10)) u_cell (.a(pi_tree[i]), .y(pi_tree[i+1]));
  end
  prog_delay #(.SEL_W(SEL_W), .CELL_PS(PD_CELL_PS)) u_pd (.a(pi_tree[TREE_ST]), .sel(SEL), .y(pi_d));
  mbff_dff   #(.RESET_VAL(PIR_RESET)) u_parity_ff (.CP(CP1), .CDN(CD1), .D(pi_d), .Q(pir));

  parity_gen #(.N(N), .PARITY(PARITY)) u_pgen_out (.d(qp), .p(po));
  ecu        u_ecu (.pir(pir), .po(po), .err(ERR));
  output_mux #(.N(N)) u_mux (.qp(qp), .qs(qs), .err(ERR), .q(Q));

endmodule
