// tb_output_mux: random exits, at most one per channel, in random stages and
// planes; checks channel data, busy feedback and the clash flag, for a full
// tag (K = n) and for a fibre-only tag (K < n, plane-U exits re-mapped).
module tb_output_mux;
  import dsn_pkg::*;
  localparam int unsigned NB = 4, L = 8, W = 8, NP = 16;

  logic [NP-1:0][W-1:0] ds [L], du [L];
  logic [NP-1:0]        cs [L], cu [L];
  logic [NP-1:0][W-1:0] d3, d1;
  logic [NP-1:0]        b3, b1;
  logic                 c3, c1;
  int                   checks = 0, failures = 0;

  output_mux #(.N_BITS(NB), .K_BITS(4), .L_STAGES(L), .DATA_W(W)) dut3 (
    .dexit_s(ds), .dexit_u(du), .exit_cfg_s(cs), .exit_cfg_u(cu), .dout_o(d3), .busy_o(b3), .clash_o(c3));
  output_mux #(.N_BITS(NB), .K_BITS(2), .L_STAGES(L), .DATA_W(W)) dut1 (
    .dexit_s(ds), .dexit_u(du), .exit_cfg_s(cs), .exit_cfg_u(cu), .dout_o(d1), .busy_o(b1), .clash_o(c1));

  // plane-U link of a fibre-only (K=2) tag -> channel: routed bits {l[3], l[0]},
  // the rest {l[2], l[1]} above them
  function automatic int unsigned umap2(input int unsigned l);
    return (((l >> 1) & 3) << 2) | (((l >> 3) & 1) << 1) | (l & 1);
  endfunction

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic [W-1:0] e3 [NP], e1 [NP];
      bit           used3 [NP], used1 [NP];
      for (int k = 0; k < L; k++) begin ds[k] = '0; du[k] = '0; cs[k] = '0; cu[k] = '0; end
      for (int p = 0; p < NP; p++) begin e3[p] = '0; e1[p] = '0; used3[p] = 0; used1[p] = 0; end
      // place exits on distinct links; only stages >= K-1 may carry exits
      for (int x = 0; x < 6; x++) begin
        int unsigned k, l;
        bit          u;
        logic [W-1:0] v;
        k = $urandom_range(L - 1, 3);
        l = $urandom_range(NP - 1);
        u = 1'($urandom_range(1));
        v = W'($urandom_range(1, 255));
        if (!used3[l] && !used1[u ? umap2(l) : l]) begin
          used3[l] = 1;
          used1[u ? umap2(l) : l] = 1;
          if (u) begin du[k][l] = v; cu[k][l] = 1'b1; end
          else   begin ds[k][l] = v; cs[k][l] = 1'b1; end
          e3[l] = v;
          e1[u ? umap2(l) : l] = v;
        end
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        chk(d3[p] == e3[p] && b3[p] == used3[p], $sformatf("K=n channel %0d", p));
        chk(d1[p] == e1[p] && b1[p] == used1[p], $sformatf("K<n channel %0d", p));
      end
      chk(!c3 && !c1, "no clash");
    end
    // two exits on one channel must raise the clash flag
    for (int k = 0; k < L; k++) begin ds[k] = '0; du[k] = '0; cs[k] = '0; cu[k] = '0; end
    cs[4][5] = 1'b1;
    cu[6][5] = 1'b1;
    #1;
    chk(c3 && b3[5], "clash on channel 5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
