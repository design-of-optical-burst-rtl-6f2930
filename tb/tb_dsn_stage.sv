// tb_dsn_stage: one stage of an 8-port network (4 modules). Checks that a
// packet is handled in one clock, that the outgoing link label goes through
// the shuffle (rotate left) or unshuffle (rotate right) connection, that the
// stored configuration steers the data, deflection with its correction entry,
// exits (data, exit switch, candidate port), releases, and the loss report
// of the last stage.
module tb_dsn_stage;
  import dsn_pkg::*;
  localparam int unsigned NB = 3, NP = 8, W = 8;

  logic clk = 0, rst_n = 0;
  ctrl_msg_t mi, mo, mo_l;
  exit_evt_t ev, ev_l;
  logic drop, drop_l, defl, defl_l, err, err_l, cand, cand_l;
  logic [LBL_W-1:0] dsrc, dsrc_l, cport, cport_l;
  logic [NP-1:0][W-1:0] dis, diu, dns, dnu, des, deu, x0, x1, x2, x3;
  logic [NP-1:0] cfs, cfu, y0, y1;
  int checks = 0, failures = 0;

  dsn_stage #(.N_BITS(NB), .K_BITS(NB), .DATA_W(W), .LAST(1'b0)) dut (
    .clk, .rst_n, .msg_i(mi), .msg_o(mo), .exit_o(ev), .drop_o(drop), .drop_src_o(dsrc),
    .deflect_o(defl), .error_o(err), .exit_cand_o(cand), .exit_port_o(cport), .exit_ok_i(1'b1),
    .din_s(dis), .din_u(diu), .dnext_s(dns), .dnext_u(dnu), .dexit_s(des), .dexit_u(deu),
    .exit_cfg_s(cfs), .exit_cfg_u(cfu));
  dsn_stage #(.N_BITS(NB), .K_BITS(NB), .DATA_W(W), .LAST(1'b1)) dut_last (
    .clk, .rst_n, .msg_i(mi), .msg_o(mo_l), .exit_o(ev_l), .drop_o(drop_l), .drop_src_o(dsrc_l),
    .deflect_o(defl_l), .error_o(err_l), .exit_cand_o(cand_l), .exit_port_o(cport_l), .exit_ok_i(1'b1),
    .din_s(dis), .din_u(diu), .dnext_s(x0), .dnext_u(x1), .dexit_s(x2), .dexit_u(x3),
    .exit_cfg_s(y0), .exit_cfg_u(y1));

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic tag_ent_t te(input logic p, input logic b);
    tag_ent_t t;
    t.plane = plane_e'(p);
    t.b = b;
    return t;
  endfunction

  // present a packet for one clock, then look at the registered results
  task automatic send(input msg_kind_e k, input int unsigned src, input int unsigned link,
                      input bit plane, input int unsigned cnt, input tag_ent_t t1, input tag_ent_t t0);
    mi = '0;
    mi.valid = 1'b1; mi.kind = k; mi.src = LBL_W'(src); mi.link = LBL_W'(link);
    mi.in_plane = plane_e'(plane); mi.cnt = CNT_W'(cnt);
    mi.tag[1] = t1; mi.tag[0] = t0;
    if (cnt == 1) mi.tag[0] = t1;
    #1;
  endtask

  task automatic step;
    @(posedge clk);
    #1;
    mi = '0;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mi = '0;
    dis = '0; diu = '0;
    for (int l = 0; l < NP; l++) begin dis[l] = W'(8'h10 + l); diu[l] = W'(8'h20 + l); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    step();
    chk(dns == '0 && dnu == '0 && des == '0 && deu == '0, "no connections after reset");

    // A: module 2, S input 0 (link 4), wants S output 1 -> out link 5 -> next link rotl(5)=3
    send(MSG_SETUP, 1, 4, 0, 2, te(0, 1), te(0, 0));
    chk(!cand, "A: not an exit candidate");
    step();
    chk(mo.valid && mo.kind == MSG_SETUP && mo.link == 3 && mo.in_plane == PLANE_S && mo.cnt == 1,
        "A: forwarded through the shuffle");
    chk(!defl && !ev.valid && dns[5] == 8'h14, "A: data of link 4 on output 5");

    // B: module 2, S input 1 (link 5), also wants S output 1 -> deflected to S output 0
    send(MSG_SETUP, 2, 5, 0, 2, te(0, 1), te(0, 0));
    step();
    chk(defl && mo.valid && mo.link == 1 && mo.cnt == 3 && mo.tag[2] == te(1, 1),
        "B: deflected, correction (U, MSB of module 2)");
    chk(dns[4] == 8'h15 && dns[5] == 8'h14, "B: both paths set");

    // C: module 0, U input 1 (link 1), last entry U output 0 -> exit on U link 0
    send(MSG_SETUP, 3, 1, 1, 1, te(1, 0), te(0, 0));
    chk(cand && cport == 0, "C: exit candidate for channel 0");
    step();
    chk(!mo.valid && ev.valid && ev.kind == MSG_SETUP && ev.src == 3 && ev.plane == PLANE_U && ev.link == 0,
        "C: exit event");
    chk(deu[0] == 8'h21 && dnu[0] == '0 && cfu[0], "C: data switched to the exit");

    // D: module 3, U input 0, wants U output 0 -> label 6 -> next link rotr(6)=3, via the unshuffle
    send(MSG_SETUP, 4, 6, 1, 2, te(1, 0), te(0, 0));
    step();
    chk(mo.valid && mo.link == 3 && mo.in_plane == PLANE_U, "D: forwarded through the unshuffle");
    chk(dnu[6] == 8'h26, "D: data on U output 6");
    // the last-stage copy saw the same packets: D still had a bit left -> lost
    chk(drop_l && dsrc_l == 4 && !mo_l.valid, "D: last stage reports the loss");

    // release A: follows module 2 input 0 -> output 1
    send(MSG_RELEASE, 1, 4, 0, 0, te(0, 0), te(0, 0));
    step();
    chk(mo.valid && mo.kind == MSG_RELEASE && mo.link == 3 && dns[5] == '0 && dns[4] == 8'h15,
        "release A forwarded, path cleared");
    // release C at its exit
    send(MSG_RELEASE, 3, 1, 1, 0, te(0, 0), te(0, 0));
    step();
    chk(!mo.valid && ev.valid && ev.kind == MSG_RELEASE && ev.link == 0 && deu[0] == '0 && !cfu[0],
        "release C at the exit");
    // release on an idle input is an error
    send(MSG_RELEASE, 5, 2, 0, 0, te(0, 0), te(0, 0));
    step();
    chk(err && !mo.valid, "release on idle input flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
