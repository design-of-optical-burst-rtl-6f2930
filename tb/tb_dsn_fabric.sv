// tb_dsn_fabric: a 16-port, 8-stage network driven directly with control
// packets carrying full-address routing tags (either plane).
//   1. A lone setup leaves exactly at stage n = 4, four clocks after it is
//      presented (the edge that samples it counts as the first), on the link equal to its destination, and its data appears
//      on that output.
//   2. Rounds of random traffic: every input sends a burst to a distinct
//      output (a random permutation), one setup per clock. Every setup must
//      leave once, on the link of its destination, after n + 2*j stages, or be
//      reported lost at the last stage; every routed burst's data must be on
//      its output and nothing else may be lit. Then all paths are released and
//      every output must go dark. Deflections, corrected routes and losses
//      must all have occurred.
module tb_dsn_fabric;
  import dsn_pkg::*;
  localparam int unsigned NB = 4, NP = 16, L = 8, W = 8;

  logic clk = 0, rst_n = 0;
  ctrl_msg_t msg;
  logic [NP-1:0][W-1:0] din, dout;
  logic [NP-1:0] busy;
  exit_evt_t ex [L];
  logic [L-1:0] dfl, err;
  logic drop, clash;
  logic [LBL_W-1:0] dsrc;
  int checks = 0, failures = 0;
  longint cyc = 0;

  dsn_fabric #(.N_BITS(NB), .K_BITS(NB), .L_STAGES(L), .SCHEME(3), .DATA_W(W)) dut (
    .clk, .rst_n, .msg_i(msg), .din_i(din), .dout_o(dout), .chan_busy_o(busy), .exit_o(ex),
    .deflect_o(dfl), .error_o(err), .drop_o(drop), .drop_src_o(dsrc), .clash_o(clash));

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0d %s", cyc, s); end
  endtask

  int unsigned dest [NP];
  int          state [NP];     // 0 idle, 1 pending, 2 routed, 3 lost
  longint      t0 [NP];
  int n_defl = 0, n_corr = 0, n_lost = 0, n_routed = 0;

  always @(posedge clk) if (rst_n) begin
    #2;
    cyc++;
    for (int k = 0; k < L; k++) if (ex[k].valid && ex[k].kind == MSG_SETUP) begin
      chk(state[ex[k].src] == 1, "exit of a pending setup");
      chk(ex[k].link == dest[ex[k].src], $sformatf("exit link %0d dest %0d", ex[k].link, dest[ex[k].src]));
      chk(k + 1 >= NB && (k + 1 - NB) % 2 == 0 && cyc - t0[ex[k].src] == k + 1,
          $sformatf("exit stage %0d latency %0d", k + 1, cyc - t0[ex[k].src]));
      if (k + 1 > NB) n_corr++;
      n_routed++;
      state[ex[k].src] = 2;
    end
    if (drop) begin
      chk(state[dsrc] == 1 && cyc - t0[dsrc] == L, "loss at the last stage");
      state[dsrc] = 3;
      n_lost++;
    end
    n_defl += $countones(dfl);
    chk(err == 0 && !clash, "no error");
    for (int p = 0; p < NP; p++) begin
      logic [W-1:0] e;
      bit           skip;
      e = '0;
      skip = 0;
      for (int s = 0; s < NP; s++) if (state[s] == 2 && dest[s] == p) e = din[s];
      for (int s = 0; s < NP; s++) if (state[s] == 4 && dest[s] == p) skip = 1;
      if (!skip) chk(dout[p] == e, $sformatf("output %0d data %h expected %h", p, dout[p], e));
    end
  end

  task automatic send(input msg_kind_e k, input int unsigned s, input int unsigned d);
    msg = '0;
    msg.valid = 1'b1;
    msg.kind = k;
    msg.src = LBL_W'(s);
    msg.link = LBL_W'(s);
    if (k == MSG_SETUP) begin
      msg.cnt = CNT_W'(NB);
      msg.tag = make_tag(LBL_W'(d), NB, plane_e'($urandom_range(1)));
      dest[s] = d;
      state[s] = 1;
    end
    @(posedge clk);
    #1;
    t0[s] = cyc;     // before the monitor counts the edge that sampled it
    msg = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg = '0;
    for (int s = 0; s < NP; s++) begin din[s] = W'(8'h40 + s); state[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // 1. lone burst 3 -> 12
    send(MSG_SETUP, 3, 12);
    repeat (NB) @(posedge clk);
    #3;
    chk(state[3] == 2 && dout[12] == 8'h43, "lone burst routed in n stages");
    state[3] = 4;
    send(MSG_RELEASE, 3, 0);
    repeat (L + 2) @(posedge clk);
    #3;
    chk(dout == '0, "dark after release");
    state[3] = 0;
    // 2. random permutations
    for (int r = 0; r < 60; r++) begin
      int unsigned perm [NP];
      for (int i = 0; i < NP; i++) perm[i] = i;
      for (int i = NP - 1; i > 0; i--) begin
        int unsigned j, x;
        j = $urandom_range(i);
        x = perm[i]; perm[i] = perm[j]; perm[j] = x;
      end
      for (int s = 0; s < NP; s++) send(MSG_SETUP, s, perm[s]);
      repeat (L + 2) @(posedge clk);
      #3;
      for (int s = 0; s < NP; s++) chk(state[s] == 2 || state[s] == 3, "settled");
      for (int s = 0; s < NP; s++) begin
        state[s] = 4;   // releasing: the path goes dark from the input side
        send(MSG_RELEASE, s, 0);
      end
      repeat (L + 2) @(posedge clk);
      #3;
      for (int s = 0; s < NP; s++) state[s] = 0;
      chk(dout == '0 && busy == '0, "all dark after the releases");
    end
    $display("deflections=%0d routed=%0d routed_after_deflection=%0d lost=%0d", n_defl, n_routed, n_corr, n_lost);
    chk(n_defl > 0 && n_corr > 0 && n_lost > 0, "deflection, correction and loss all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
