// tb_dsn_node_ctrl: directed checks of the 4x4 module routing decision.
// Covers: undeflected hop, deflection onto each plane with the correction
// entry it must push, exit on the last tag entry, barred exit (scheme 1
// feedback), release along a path and at an exit, and protocol errors.
module tb_dsn_node_ctrl;
  import dsn_pkg::*;

  localparam int unsigned NB = 4;   // 16 ports, 8 modules per stage

  ctrl_msg_t        msg, mo;
  node_cfg_t        cfg, co;
  logic [LBL_W-1:0] idx;
  logic             ok, defl, err;
  exit_evt_t        ev;
  int               checks = 0, failures = 0;

  dsn_node_ctrl #(.N_BITS(NB)) dut (
    .msg_i(msg), .cfg_i(cfg), .node_idx_i(idx), .exit_ok_i(ok),
    .cfg_o(co), .msg_o(mo), .exit_o(ev), .deflect_o(defl), .error_o(err)
  );

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // setup packet arriving on input {p, lsb} of module idx, tag given top-first
  task automatic setup(input int unsigned node, input logic p, input logic lsb,
                       input tag_ent_t e_top, input tag_ent_t e_next, input int unsigned n);
    msg = '0;
    msg.valid = 1'b1;
    msg.kind = MSG_SETUP;
    msg.src = 16'd9;
    msg.link = LBL_W'((node << 1) | lsb);
    msg.in_plane = plane_e'(p);
    msg.cnt = CNT_W'(n);
    if (n == 1) msg.tag[0] = e_top;
    else begin
      msg.tag[1] = e_top;
      msg.tag[0] = e_next;
    end
    idx = LBL_W'(node);
  endtask

  function automatic tag_ent_t te(input logic p, input logic b);
    tag_ent_t t;
    t.plane = plane_e'(p);
    t.b = b;
    return t;
  endfunction

  initial begin
    // watchdog not needed for a purely combinational block, but kept as a guard
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ok = 1'b1;
    // 1: idle module, want S output 1 -> take it, pop
    cfg = '0;
    setup(5, 0, 0, te(0, 1), te(0, 0), 2);
    #1;
    chk(mo.valid && !defl && !err && !ev.valid, "1 take: flags");
    chk(mo.cnt == 1 && mo.link == 16'd11 && mo.in_plane == PLANE_S, "1 take: out link");
    chk(co.in_v == 4'b0001 && co.in_out[0] == 2'd1 && co.exit_o == 0, "1 take: cfg");

    // 2: S output 1 busy -> deflect to output 0 (S), push (U, MSB of index 5 = 1)
    cfg = '0;
    cfg.in_v[2] = 1'b1;
    cfg.in_out[2] = 2'd1;
    setup(5, 0, 1, te(0, 1), te(0, 0), 2);
    #1;
    chk(defl && mo.valid && mo.cnt == 3, "2 deflect S: count");
    chk(mo.tag[2].plane == PLANE_U && mo.tag[2].b == 1'b1, "2 deflect S: correction entry");
    chk(mo.tag[1] == te(0, 1), "2 deflect S: original entry kept");
    chk(mo.link == 16'd10 && mo.in_plane == PLANE_S, "2 deflect S: link");
    chk(co.in_v[1] && co.in_out[1] == 2'd0, "2 deflect S: cfg");

    // 3: want U output 2, outputs 0,1,2 busy -> deflect to 3 (U), push (S, LSB of 6 = 0)
    cfg = '0;
    cfg.in_v[0] = 1'b1; cfg.in_out[0] = 2'd2;
    cfg.in_v[1] = 1'b1; cfg.in_out[1] = 2'd0;
    cfg.in_v[3] = 1'b1; cfg.in_out[3] = 2'd1;
    setup(6, 1, 0, te(1, 0), te(0, 0), 2);
    #1;
    chk(defl && mo.cnt == 3 && mo.tag[2] == te(0, 0), "3 deflect U: correction (S,0)");
    chk(mo.link == 16'd13 && mo.in_plane == PLANE_U, "3 deflect U: link");
    chk(co.in_v[2] && co.in_out[2] == 2'd3, "3 deflect U: cfg");

    // 4: last entry, free -> exit
    cfg = '0;
    setup(3, 0, 1, te(1, 1), te(0, 0), 1);
    #1;
    chk(!mo.valid && ev.valid && ev.kind == MSG_SETUP && ev.link == 16'd7 && ev.plane == PLANE_U,
        "4 exit event");
    chk(ev.src == 16'd9 && co.exit_o == 4'b1000 && co.in_out[1] == 2'd3, "4 exit cfg");

    // 5: last entry, exit barred, other outputs free -> deflect to lowest free (0)
    ok = 1'b0;
    cfg = '0;
    setup(3, 0, 1, te(1, 1), te(0, 0), 1);
    #1;
    chk(defl && !ev.valid && mo.valid && mo.cnt == 2 && mo.link == 16'd6, "5 barred exit deflects");
    chk(mo.tag[1] == te(1, 0), "5 barred exit: correction (U, MSB of 3 = 0)");

    // 6: exit barred and wanted output the only idle one -> go on through it
    cfg = '0;
    cfg.in_v[0] = 1'b1; cfg.in_out[0] = 2'd0;
    cfg.in_v[2] = 1'b1; cfg.in_out[2] = 2'd1;
    cfg.in_v[3] = 1'b1; cfg.in_out[3] = 2'd2;
    setup(3, 0, 1, te(1, 1), te(0, 0), 1);
    #1;
    chk(defl && !ev.valid && mo.valid && mo.link == 16'd7 && mo.in_plane == PLANE_U, "6 pass-through");
    chk(mo.tag[1] == te(0, 1) && co.exit_o == 0, "6 pass-through: (S, LSB of 3)");
    ok = 1'b1;

    // 7: release along a path (input 1 -> output 2), then release at an exit
    cfg = '0;
    cfg.in_v[1] = 1'b1; cfg.in_out[1] = 2'd2;
    cfg.in_v[3] = 1'b1; cfg.in_out[3] = 2'd0; cfg.exit_o[0] = 1'b1;
    msg = '0; msg.valid = 1'b1; msg.kind = MSG_RELEASE; msg.link = 16'd9; msg.in_plane = PLANE_S;
    msg.src = 16'd4; idx = 16'd4;
    #1;
    chk(mo.valid && mo.kind == MSG_RELEASE && mo.link == 16'd8 && mo.in_plane == PLANE_U, "7 release forward");
    chk(co.in_v == 4'b1000 && co.exit_o == 4'b0001 && !ev.valid, "7 release clears connection");
    msg.link = 16'd9; msg.in_plane = PLANE_U;
    #1;
    chk(!mo.valid && ev.valid && ev.kind == MSG_RELEASE && ev.link == 16'd8 && ev.plane == PLANE_S,
        "8 release at exit");
    chk(co.in_v == 4'b0010 && co.exit_o == 4'b0000, "8 release clears exit switch");

    // 9: errors
    msg.link = 16'd8; msg.in_plane = PLANE_S;   // input 0 idle
    #1;
    chk(err && !mo.valid && co == cfg, "9 release on idle input");
    setup(4, 0, 1, te(0, 1), te(0, 0), 2);      // input 1 busy
    #1;
    chk(err && !mo.valid && co == cfg, "10 setup on busy input");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
