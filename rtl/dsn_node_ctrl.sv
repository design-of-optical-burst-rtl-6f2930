// dsn_node_ctrl: control decision of one 4x4 switching module for one control
// packet (purely combinational).
//
// Setup packet: the top routing-tag entry names the wanted output {plane, bit}.
// If that output is idle (and, when this is the last tag entry, the exit is
// allowed) the packet takes it and the entry is popped; when the stack becomes
// empty the output's 1x2 switch is turned to the output multiplexer and the
// packet leaves the fabric. Otherwise the packet is deflected to the lowest
// numbered idle output and a one-step correction entry is pushed, so that the
// next stage sends it back to a module with this module's index:
//   deflected onto a shuffle link   -> push (U, most significant index bit)
//   deflected onto an unshuffle link -> push (S, least significant index bit)
// A packet whose only free way forward is the wanted output with a barred exit
// (scheme 1, busy multiplexer) keeps going on that link as a deflection.
// Since a packet arrives on an idle input, at most three outputs are busy and
// an idle output always exists.
//
// Release packet: follows the connection recorded for its input, clears it and
// the exit switch, and leaves the fabric where the setup did.
//
// The decision rules follow the error-correcting deflection routing of the
// dual shuffle-exchange network; taking the lowest idle output on deflection
// is this design's choice.
module dsn_node_ctrl
  import dsn_pkg::*;
#(
  parameter int unsigned N_BITS = 10   // n = log2(number of network ports)
) (
  input  ctrl_msg_t          msg_i,     // packet at this module (valid = present)
  input  node_cfg_t          cfg_i,     // module configuration before the packet
  input  logic [LBL_W-1:0]   node_idx_i,// module index (n-1 bits used)
  input  logic               exit_ok_i, // exit of the wanted output may be used
  output node_cfg_t          cfg_o,     // configuration after the packet
  output ctrl_msg_t          msg_o,     // packet leaving on a link; link = output label
  output exit_evt_t          exit_o,    // packet leaves the fabric here
  output logic               deflect_o, // setup packet was deflected
  output logic               error_o    // protocol violation (busy input / unknown release)
);

  logic [1:0] inp;
  logic [3:0] busy;
  logic [1:0] o_want, o_sel, o_free;
  logic       any_other_free;
  logic       last_ent, take;
  tag_ent_t   top, corr;

  always_comb begin
    inp = {msg_i.in_plane, msg_i.link[0]};
    for (int o = 0; o < 4; o++) begin
      busy[o] = 1'b0;
      for (int i = 0; i < 4; i++)
        if (cfg_i.in_v[i] && cfg_i.in_out[i] == 2'(o)) busy[o] = 1'b1;
    end

    top      = (msg_i.cnt != 0) ? msg_i.tag[msg_i.cnt - 1'b1] : '0;
    o_want   = {top.plane, top.b};
    last_ent = (msg_i.cnt == CNT_W'(1));
    take     = !busy[o_want] && (!last_ent || exit_ok_i);

    // lowest idle output other than the wanted one
    any_other_free = 1'b0;
    o_free         = o_want;
    for (int o = 3; o >= 0; o--)
      if (!busy[o] && 2'(o) != o_want) begin
        any_other_free = 1'b1;
        o_free         = 2'(o);
      end

    cfg_o     = cfg_i;
    msg_o     = msg_i;
    msg_o.valid = 1'b0;
    exit_o    = '0;
    deflect_o = 1'b0;
    error_o   = 1'b0;
    o_sel     = o_want;
    corr      = '0;

    if (msg_i.valid && msg_i.kind == MSG_SETUP) begin
      if (cfg_i.in_v[inp] || msg_i.cnt == 0) begin
        error_o = 1'b1;
      end else begin
        if (take) begin
          o_sel     = o_want;
          msg_o.cnt = msg_i.cnt - 1'b1;
        end else begin
          o_sel     = any_other_free ? o_free : o_want;
          deflect_o = 1'b1;
          if (o_sel[1] == PLANE_S) begin
            corr.plane = PLANE_U;
            corr.b     = node_idx_i[N_BITS-2];
          end else begin
            corr.plane = PLANE_S;
            corr.b     = node_idx_i[0];
          end
          msg_o.tag[msg_i.cnt] = corr;
          msg_o.cnt            = msg_i.cnt + 1'b1;
        end
        cfg_o.in_v[inp]   = 1'b1;
        cfg_o.in_out[inp] = o_sel;
        if (take && last_ent) begin
          cfg_o.exit_o[o_sel] = 1'b1;
          exit_o.valid = 1'b1;
          exit_o.kind  = MSG_SETUP;
          exit_o.src   = msg_i.src;
          exit_o.plane = plane_e'(o_sel[1]);
          exit_o.link  = (node_idx_i << 1) | LBL_W'(o_sel[0]);
        end else begin
          msg_o.valid    = 1'b1;
          msg_o.in_plane = plane_e'(o_sel[1]);
          msg_o.link     = (node_idx_i << 1) | LBL_W'(o_sel[0]);
        end
      end
    end else if (msg_i.valid && msg_i.kind == MSG_RELEASE) begin
      if (!cfg_i.in_v[inp]) begin
        error_o = 1'b1;
      end else begin
        o_sel             = cfg_i.in_out[inp];
        cfg_o.in_v[inp]   = 1'b0;
        cfg_o.in_out[inp] = 2'b00;
        if (cfg_i.exit_o[o_sel]) begin
          cfg_o.exit_o[o_sel] = 1'b0;
          exit_o.valid = 1'b1;
          exit_o.kind  = MSG_RELEASE;
          exit_o.src   = msg_i.src;
          exit_o.plane = plane_e'(o_sel[1]);
          exit_o.link  = (node_idx_i << 1) | LBL_W'(o_sel[0]);
        end else begin
          msg_o.valid    = 1'b1;
          msg_o.in_plane = plane_e'(o_sel[1]);
          msg_o.link     = (node_idx_i << 1) | LBL_W'(o_sel[0]);
        end
      end
    end
  end

endmodule
