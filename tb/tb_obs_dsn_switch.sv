// tb_obs_dsn_switch: end-to-end random burst traffic through two switches of
// 4 fibres x 8 wavelengths and 9 stages, one with output scheme 3 and one with
// output scheme 1, driven by the same control channel.
//
// A reference model in the testbench tracks every input channel's burst and,
// for scheme 3, every output channel. It checks: which wavelength each setup
// is given and when a setup must be blocked; that every accepted setup leaves
// the fabric exactly once, either through an exit or as a loss at the last
// stage; the exit latency (stage + 1 clocks, stage >= n, and an even number
// of extra stages, two per deflection); that the exit leads to the burst's
// output fibre (scheme 1) or to its very channel (scheme 3); and, after every
// clock, that every output channel carries exactly the data of the burst
// routed to it and nothing else. The mechanisms the design has are counted:
// deflections, bursts that reached their output after deflections, losses
// for lack of stages, blocking for lack of wavelengths, releases, and
// (scheme 1) exits refused because the multiplexer was busy.
module tb_obs_dsn_switch;
  import dsn_pkg::*;
  localparam int unsigned D = 4, H = 8, L = 9, W = 8;
  localparam int unsigned NP = D * H, NB = 5, FB = 2;

  logic clk = 0, rst_n = 0;
  logic req_valid;
  msg_kind_e req_kind;
  logic [1:0] sf, df;
  logic [2:0] sw;
  logic [W-1:0] din [D][H];
  logic [W-1:0] dout3 [D][H], dout1 [D][H];
  logic acc3, blk3, acc1, blk1, drop3, drop1, err3, err1;
  logic [4:0] asg3, asg1;
  exit_evt_t ex3 [L], ex1 [L];
  logic [L-1:0] dfl3, dfl1;
  logic [LBL_W-1:0] dsrc3, dsrc1;

  obs_dsn_switch #(.D_FIBERS(D), .H_WAVES(H), .L_STAGES(L), .SCHEME(3), .DATA_W(W)) dut3 (
    .clk, .rst_n, .req_valid, .req_kind, .req_src_fiber(sf), .req_src_wave(sw), .req_dst_fiber(df),
    .data_in(din), .data_out(dout3), .accepted_o(acc3), .blocked_o(blk3), .assigned_o(asg3),
    .exit_o(ex3), .deflect_o(dfl3), .drop_o(drop3), .drop_src_o(dsrc3), .error_o(err3));
  obs_dsn_switch #(.D_FIBERS(D), .H_WAVES(H), .L_STAGES(L), .SCHEME(1), .DATA_W(W)) dut1 (
    .clk, .rst_n, .req_valid, .req_kind, .req_src_fiber(sf), .req_src_wave(sw), .req_dst_fiber(df),
    .data_in(din), .data_out(dout1), .accepted_o(acc1), .blocked_o(blk1), .assigned_o(asg1),
    .exit_o(ex1), .deflect_o(dfl1), .drop_o(drop1), .drop_src_o(dsrc1), .error_o(err1));

  always #5 clk = ~clk;

  // reference state per input channel (port = wave*D + fibre), per switch
  typedef enum int {IDLE, PENDING, ROUTED, LOST, RELEASING} st_e;
  st_e          st   [2][NP];
  int unsigned  dst  [NP];         // output fibre
  int unsigned  port3[NP];         // scheme 3: output channel given
  int unsigned  outp [2][NP];      // output channel reached
  longint       t_req[NP];
  bit           chan3_busy [NP];
  longint       chan3_free [NP];   // cycle after which a released channel is free
  longint       cyc = 0;

  int checks = 0, failures = 0;
  int n_defl3 = 0, n_defl1 = 0, n_corr3 = 0, n_corr1 = 0, n_drop3 = 0, n_drop1 = 0;
  int n_relx = 0;
  int n_block = 0, n_rel = 0, n_muxbusy = 0, n_setup = 0, n_routed3 = 0;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, s);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results of the fabric, both switches
  always @(posedge clk) if (rst_n) begin
    #2;
    cyc++;
    for (int k = 0; k < L; k++) begin
      if (ex3[k].valid && ex3[k].kind == MSG_SETUP) begin
        int unsigned s;
        s = ex3[k].src;
        chk(st[0][s] == PENDING, $sformatf("s3 exit of src %0d not pending", s));
        chk(k + 1 >= NB && ((k + 1 - NB) % 2) == 0, $sformatf("s3 exit stage %0d", k + 1));
        chk(cyc - t_req[s] == k + 2, $sformatf("s3 latency %0d stage %0d", cyc - t_req[s], k + 1));
        chk(ex3[k].link == port3[s], $sformatf("s3 exit link %0d expected %0d", ex3[k].link, port3[s]));
        if (k + 1 > NB) n_corr3++;
        n_routed3++;
        st[0][s] = ROUTED;
        outp[0][s] = ex3[k].link;
      end
      if (ex3[k].valid && ex3[k].kind == MSG_RELEASE) begin
        chk(st[0][ex3[k].src] == RELEASING && ex3[k].link == port3[ex3[k].src], "s3 release exit");
        st[0][ex3[k].src] = IDLE;
        n_relx++;
      end
      if (ex1[k].valid && ex1[k].kind == MSG_RELEASE) begin
        chk(st[1][ex1[k].src] == RELEASING, "s1 release exit");
        st[1][ex1[k].src] = IDLE;
        n_relx++;
      end
      if (ex1[k].valid && ex1[k].kind == MSG_SETUP) begin
        int unsigned s, p;
        s = ex1[k].src;
        p = exit_port(ex1[k].plane, ex1[k].link, NB, FB);
        chk(st[1][s] == PENDING, $sformatf("s1 exit of src %0d not pending", s));
        chk(k + 1 >= FB && cyc - t_req[s] == k + 2, $sformatf("s1 latency stage %0d", k + 1));
        chk(p % D == dst[s], $sformatf("s1 exit fibre %0d expected %0d", p % D, dst[s]));
        if (k + 1 > FB) n_corr1++;
        st[1][s] = ROUTED;
        outp[1][s] = p;
      end
    end
    if (drop3) begin
      chk(st[0][dsrc3] == PENDING && cyc - t_req[dsrc3] == L + 1, "s3 loss");
      st[0][dsrc3] = LOST;
      n_drop3++;
    end
    if (drop1) begin
      chk(st[1][dsrc1] == PENDING && cyc - t_req[dsrc1] == L + 1, "s1 loss");
      st[1][dsrc1] = LOST;
      n_drop1++;
    end
    n_defl3 += $countones(dfl3);
    n_defl1 += $countones(dfl1);
    for (int k = 0; k < L; k++)
      if (dut1.u_fabric.cand[k] && !dut1.u_fabric.exit_ok[k]) n_muxbusy++;
    chk(!err3 && !err1, "no error flags");
    // data: every routed burst on its channel, all other channels dark
    for (int x = 0; x < 2; x++) begin
      logic [W-1:0] exp_o [NP];
      bit           skip [NP];
      for (int p = 0; p < NP; p++) begin exp_o[p] = '0; skip[p] = 0; end
      for (int s = 0; s < NP; s++) begin
        if (st[x][s] == ROUTED) exp_o[outp[x][s]] = din[s % D][s / D];
        // the release tears the path down from the input side: dark or not
        if (st[x][s] == RELEASING) skip[outp[x][s]] = 1;
      end
      for (int p = 0; p < NP; p++) if (!skip[p]) begin
        logic [W-1:0] got;
        got = (x == 0) ? dout3[p % D][p / D] : dout1[p % D][p / D];
        checks++;
        if (got !== exp_o[p]) begin
          failures++;
          if (failures < 20) $display("FAIL @%0d: sw%0d channel %0d got %h exp %h", cyc, x, p, got, exp_o[p]);
        end
      end
    end
  end

  // one control request, applied for one clock
  task automatic request(input msg_kind_e k, input int unsigned s, input int unsigned d);
    req_valid = 1'b1; req_kind = k; sf = 2'(s % D); sw = 3'(s / D); df = 2'(d);
    @(posedge clk);
    #1;
    req_valid = 1'b0;
    t_req[s] = cyc;
  endtask

  initial begin
    req_valid = 0; req_kind = MSG_SETUP; sf = 0; sw = 0; df = 0;
    for (int f = 0; f < D; f++) for (int w = 0; w < H; w++) din[f][w] = W'(1 + w * D + f);
    for (int s = 0; s < NP; s++) begin
      st[0][s] = IDLE; st[1][s] = IDLE; chan3_busy[s] = 0; chan3_free[s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < 6000; t++) begin
      int unsigned s, d, w;
      bit found;
      s = $urandom_range(NP - 1);
      if (st[0][s] == IDLE && st[1][s] == IDLE) begin
        // setup: a quarter of all bursts go to fibre 0 to force output contention
        d = ($urandom_range(3) == 0) ? 0 : $urandom_range(D - 1);
        found = 0;
        for (w = 0; w < H; w++) if (!chan3_busy[w * D + d] && cyc > chan3_free[w * D + d]) begin found = 1; break; end
        dst[s] = d;
        request(MSG_SETUP, s, d);
        n_setup++;
        chk(acc1 && !blk1, "scheme 1 accepts every setup");
        st[1][s] = PENDING;
        if (found) begin
          chk(acc3 && !blk3 && asg3 == w * D + d, $sformatf("s3 assigned %0d exp %0d", asg3, w * D + d));
          chan3_busy[w * D + d] = 1;
          port3[s] = w * D + d;
          st[0][s] = PENDING;
        end else begin
          chk(blk3 && !acc3, "s3 blocked when the fibre is full");
          n_block++;
        end
      end else if ((st[0][s] == IDLE || st[0][s] == ROUTED || st[0][s] == LOST) &&
                   (st[1][s] == ROUTED || st[1][s] == LOST)) begin
        // release, once both switches have settled the burst; a routed burst
        // stays on its channel until the release reaches the exit
        if (st[0][s] != IDLE) begin
          chan3_busy[port3[s]] = 0;
          chan3_free[port3[s]] = cyc + L;
        end
        request(MSG_RELEASE, s, 0);
        n_rel++;
        st[0][s] = (st[0][s] == ROUTED) ? RELEASING : IDLE;
        st[1][s] = (st[1][s] == ROUTED) ? RELEASING : IDLE;
      end else begin
        @(posedge clk); #1;
      end
    end
    repeat (L + 3) @(posedge clk);
    #3;
    for (int s = 0; s < NP; s++)
      chk(st[0][s] != PENDING && st[1][s] != PENDING && st[0][s] != RELEASING && st[1][s] != RELEASING,
          "no burst left pending");
    $display("setups=%0d blocked=%0d releases=%0d", n_setup, n_block, n_rel);
    $display("scheme3: deflections=%0d routed=%0d routed_after_deflection=%0d lost=%0d",
             n_defl3, n_routed3, n_corr3, n_drop3);
    $display("scheme1: deflections=%0d routed_after_deflection=%0d lost=%0d mux_busy_refusals=%0d",
             n_defl1, n_corr1, n_drop1, n_muxbusy);
    chk(n_defl3 > 0, "scheme 3 deflection happened");
    chk(n_corr3 > 0, "scheme 3 corrected route happened");
    chk(n_drop3 > 0, "scheme 3 loss for lack of stages happened");
    chk(n_block > 0, "output contention blocking happened");
    chk(n_rel > 0 && n_relx > 0, "release happened");
    chk(n_defl1 > 0 && n_corr1 > 0, "scheme 1 deflection and corrected route happened");
    chk(n_drop1 > 0, "scheme 1 loss happened");
    chk(n_muxbusy > 0, "scheme 1 busy-multiplexer refusal happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
