// tb_pred_early_eval: exhaustive check of predicate early evaluation over every
// operation kind and every combination of predicate state and prediction, with
// the qualifying predicate p0 and with another predicate.
module tb_pred_early_eval;
  import pp_pkg::*;
  op_e op;
  logic [PR_W-1:0] qp;
  logic qp_value, qp_resolved, qp_pending, cmp_prediction;
  logic stall, qual_true, used_prediction, to_issue_queue, cmp_pv1, cmp_pv2;
  pred_early_eval dut (.*);

  int checks = 0, failures = 0;
  initial begin
    for (int o = 0; o < 3; o++)
      for (int q = 0; q < 2; q++)
        for (int v = 0; v < 16; v++) begin
          bit t, e_stall, e_qual, e_used, e_iq, e_p1, e_p2;
          op = op_e'(o);
          qp = q ? 6'd17 : 6'd0;
          {qp_value, qp_resolved, qp_pending, cmp_prediction} = 4'(v);
          #1;
          t       = (q == 0) || qp_value;
          e_stall = (q != 0) && qp_pending && (o != 2);
          e_qual  = (o == 2) || t;
          e_used  = (q != 0) && !qp_pending && !qp_resolved && (o != 2);
          e_iq    = (o != 0) || t;
          e_p1    = t && cmp_prediction;
          e_p2    = t && !cmp_prediction;
          checks++;
          if ({stall, qual_true, used_prediction, to_issue_queue, cmp_pv1, cmp_pv2} !==
              {e_stall, e_qual, e_used, e_iq, e_p1, e_p2}) begin
            failures++;
            $display("FAIL op %0d qp %0d in %b: got %b exp %b", o, qp, 4'(v),
                     {stall, qual_true, used_prediction, to_issue_queue, cmp_pv1, cmp_pv2},
                     {e_stall, e_qual, e_used, e_iq, e_p1, e_p2});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
