// pred_early_eval: predicate early evaluation in the second rename stage (REN2).
//
// Combinational. It receives an instruction and the state of its qualifying
// predicate as the rename stage sees it: already resolved (a computed or
// committed value), predicted (the value comes from the predicate predictor and
// the defining compare has not written back), or pending (the predicate belongs
// to a broadside write that has not executed and has no prediction).
//   - qp = p0 is always true.
//   - An instruction whose predicate is false, resolved or predicted, is
//     "qualified false": it behaves like a NOP, does not change the register map
//     and does not enter the issue queue. Otherwise it is qualified true.
//   - A compare (unconditional form) always executes, since it writes both of its
//     predicates. Its predicted outputs are derived from the single prediction:
//     if its qualifying predicate is true, pd1 = prediction and pd2 = !prediction;
//     if it is false, both are false.
//   - A pending predicate stalls the instruction (the broadside write is a
//     synchronisation point).
// used_prediction tells the caller that the evaluation rests on a predicted
// predicate, which is where the register map has to be checkpointed.
// Treating broadside writes as always executing is this design's choice.
module pred_early_eval
  import pp_pkg::*;
(
  input  op_e              op,
  input  logic [PR_W-1:0]  qp,
  input  logic             qp_value,      // resolved or predicted value
  input  logic             qp_resolved,   // value is real, not a prediction
  input  logic             qp_pending,    // no value yet and no prediction
  input  logic             cmp_prediction,
  output logic             stall,
  output logic             qual_true,
  output logic             used_prediction,
  output logic             to_issue_queue,
  output logic             cmp_pv1,
  output logic             cmp_pv2
);
  logic qp_true;
  logic is_p0;

  always_comb begin
    is_p0           = (qp == '0);
    qp_true         = is_p0 ? 1'b1 : qp_value;
    stall           = !is_p0 && qp_pending && (op != OP_BSW);
    qual_true       = (op == OP_BSW) ? 1'b1 : qp_true;
    used_prediction = !is_p0 && !qp_pending && !qp_resolved && (op != OP_BSW);
    to_issue_queue  = (op == OP_ALU) ? qp_true : 1'b1;
    cmp_pv1         = qp_true && cmp_prediction;
    cmp_pv2         = qp_true && !cmp_prediction;
  end

endmodule
