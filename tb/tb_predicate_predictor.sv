// tb_predicate_predictor: checks the meta-chooser predicate predictor against an
// independent model of its tables, at reduced table sizes.
// Every lookup result (prediction, history, both component predictions) is
// compared with the model; training happens one cycle after each lookup. The
// reset sweep must take exactly the size of the largest table, and a predicate
// that alternates must end up predicted by the local (history) component.
module tb_predicate_predictor;
  import pp_pkg::*;
  localparam int E = 256, L = 16, H = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ready, lookup_en, pred_value, pred_bim, pred_loc;
  logic [PC_W-1:0] lookup_pc, upd_pc;
  logic [H-1:0] pred_hist, upd_hist;
  logic upd_en, upd_bim, upd_loc, upd_pred, upd_outcome;

  predicate_predictor #(.BIM_ENTRIES(E), .PHT_ENTRIES(E), .CHO_ENTRIES(E),
                        .LHT_ENTRIES(L), .HIST_W(H)) dut (.*);

  int checks = 0, failures = 0;
  int m_bim [E], m_pht [E], m_cho [E], m_lht [L];

  function automatic int wa(input logic [PC_W-1:0] pc); return int'(pc[31:2]); endfunction
  function automatic int sat(input int c, input bit up);
    return up ? ((c == 3) ? 3 : c + 1) : ((c == 0) ? 0 : c - 1);
  endfunction
  function automatic int phti(input logic [PC_W-1:0] pc, input int h);
    return ((wa(pc) % (E / (1 << H))) << H) | h;
  endfunction

  logic [PC_W-1:0] pcs [4];
  int cnt [4];
  int correct_alt = 0, n_alt = 0;

  initial begin
    int init_cycles;
    for (int i = 0; i < E; i++) begin m_bim[i] = 1; m_pht[i] = 1; m_cho[i] = 1; end
    for (int i = 0; i < L; i++) m_lht[i] = 0;
    pcs[0] = 64'h1000; pcs[1] = 64'h1004; pcs[2] = 64'h2008; pcs[3] = 64'h300c;
    for (int i = 0; i < 4; i++) cnt[i] = 0;
    lookup_en = 0; lookup_pc = '0; upd_en = 0; upd_pc = '0; upd_hist = '0;
    upd_bim = 0; upd_loc = 0; upd_pred = 0; upd_outcome = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    init_cycles = 0;
    while (!ready) begin @(negedge clk); init_cycles++; end
    checks++;
    if (init_cycles != E) begin failures++; $display("FAIL init took %0d", init_cycles); end
    for (int it = 0; it < 3000; it++) begin
      int k, w, h, eb, el, ec, ep;
      bit outcome;
      k = $urandom_range(0, 3);
      // outcome behaviour: pc0 alternates, pc1 always true, pc2 random, pc3 period 3
      case (k)
        0: outcome = cnt[0][0];
        1: outcome = 1;
        2: outcome = 1'($urandom_range(0, 1));
        default: outcome = (cnt[3] % 3 == 0);
      endcase
      cnt[k]++;
      // model lookup
      w  = wa(pcs[k]);
      h  = m_lht[w % L];
      eb = m_bim[w % E] >> 1;
      el = m_pht[phti(pcs[k], h)] >> 1;
      ec = m_cho[w % E] >> 1;
      ep = ec ? el : eb;
      lookup_en = 1; lookup_pc = pcs[k];
      @(negedge clk);
      lookup_en = 0;
      m_lht[w % L] = ((h << 1) | ep) & ((1 << H) - 1);
      checks++;
      if (pred_value !== 1'(ep) || pred_hist !== H'(h) || pred_bim !== 1'(eb) || pred_loc !== 1'(el)) begin
        failures++;
        $display("FAIL it %0d pc %h: got %0d/%0d/%0d/%0d exp %0d/%0d/%0d/%0d", it, pcs[k],
                 pred_value, pred_hist, pred_bim, pred_loc, ep, h, eb, el);
      end
      if (k == 0 && it > 2000) begin n_alt++; if (pred_value == outcome) correct_alt++; end
      // train
      upd_en = 1; upd_pc = pcs[k]; upd_hist = pred_hist; upd_bim = pred_bim;
      upd_loc = pred_loc; upd_pred = pred_value; upd_outcome = outcome;
      m_bim[w % E] = sat(m_bim[w % E], outcome);
      m_pht[phti(pcs[k], h)] = sat(m_pht[phti(pcs[k], h)], outcome);
      if (eb != el) m_cho[w % E] = sat(m_cho[w % E], el == int'(outcome));
      if (ep != int'(outcome)) m_lht[w % L] = ((h << 1) | outcome) & ((1 << H) - 1);
      @(negedge clk);
      upd_en = 0;
    end
    checks++;
    if (n_alt == 0 || correct_alt * 10 < n_alt * 9) begin
      failures++;
      $display("FAIL alternating predicate predicted %0d of %0d", correct_alt, n_alt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
