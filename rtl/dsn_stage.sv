// dsn_stage: one stage of the dual shuffle-exchange network.
//
// Holds the configuration of the stage's N/2 4x4 switching modules. One
// control packet per clock can arrive (msg_i, link label already mapped onto
// this stage's inputs); the module it addresses decides in dsn_node_ctrl and
// its new configuration is stored at the clock edge. A packet that goes on is
// registered in msg_o with its link label moved through the shuffle (rotate
// left) or unshuffle (rotate right) connection, so a packet spends one clock
// per stage. Exits are registered in exit_o. In the last stage (LAST = 1) a
// setup packet that still has routing bits left is reported in drop_o: there
// are too few stages for it and the burst is lost.
//
// The data path is combinational: din_s/din_u are the stage's shuffle and
// unshuffle input links, dnext_s/dnext_u its output links by output label
// (before the interstage connection), dexit_s/dexit_u the exits. exit_cfg_s/u
// tell which output links are switched to the multiplexers.
//
// exit_cand_o/exit_port_o announce, before the clock, that the packet now in
// the stage wants to leave through an idle output and which output port
// (wavelength channel) that exit feeds; exit_ok_i grants it. The grant is only
// used by output scheme 1. Reset (synchronous, active low) clears every connection.
module dsn_stage
  import dsn_pkg::*;
#(
  parameter int unsigned N_BITS = 10,  // n, network has 2^n ports
  parameter int unsigned K_BITS = 10,  // routing bits in a fresh tag
  parameter int unsigned DATA_W = 8,
  parameter bit          LAST   = 1'b0
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  ctrl_msg_t                         msg_i,
  output ctrl_msg_t                         msg_o,
  output exit_evt_t                         exit_o,
  output logic                              drop_o,
  output logic [LBL_W-1:0]                  drop_src_o,
  output logic                              deflect_o,
  output logic                              error_o,
  output logic                              exit_cand_o,
  output logic [LBL_W-1:0]                  exit_port_o,
  input  logic                              exit_ok_i,
  input  logic [(1<<N_BITS)-1:0][DATA_W-1:0] din_s,
  input  logic [(1<<N_BITS)-1:0][DATA_W-1:0] din_u,
  output logic [(1<<N_BITS)-1:0][DATA_W-1:0] dnext_s,
  output logic [(1<<N_BITS)-1:0][DATA_W-1:0] dnext_u,
  output logic [(1<<N_BITS)-1:0][DATA_W-1:0] dexit_s,
  output logic [(1<<N_BITS)-1:0][DATA_W-1:0] dexit_u,
  output logic [(1<<N_BITS)-1:0]            exit_cfg_s,
  output logic [(1<<N_BITS)-1:0]            exit_cfg_u
);

  localparam int unsigned NP = 1 << N_BITS;
  localparam int unsigned NM = NP / 2;          // modules per stage

  node_cfg_t        cfg [NM];
  node_cfg_t        cfg_cur, cfg_new;
  logic [LBL_W-1:0] node_idx;
  ctrl_msg_t        msg_n;
  exit_evt_t        evt_n;
  logic             defl_n, err_n;

  assign node_idx = msg_i.link >> 1;
  assign cfg_cur  = cfg[node_idx[N_BITS-2:0]];

  dsn_node_ctrl #(.N_BITS(N_BITS)) u_ctrl (
    .msg_i      (msg_i),
    .cfg_i      (cfg_cur),
    .node_idx_i (node_idx),
    .exit_ok_i  (exit_ok_i),
    .cfg_o      (cfg_new),
    .msg_o      (msg_n),
    .exit_o     (evt_n),
    .deflect_o  (defl_n),
    .error_o    (err_n)
  );

  // exit candidate: setup on its last tag entry whose wanted output is idle
  tag_ent_t         top;
  logic [1:0]       o_want;
  logic             want_busy;
  always_comb begin
    top       = (msg_i.cnt != 0) ? msg_i.tag[msg_i.cnt - 1'b1] : '0;
    o_want    = {top.plane, top.b};
    want_busy = 1'b0;
    for (int i = 0; i < 4; i++)
      if (cfg_cur.in_v[i] && cfg_cur.in_out[i] == o_want) want_busy = 1'b1;
    exit_cand_o = msg_i.valid && msg_i.kind == MSG_SETUP && msg_i.cnt == CNT_W'(1)
                  && !want_busy && !cfg_cur.in_v[{msg_i.in_plane, msg_i.link[0]}];
    exit_port_o = exit_port(top.plane, (node_idx << 1) | LBL_W'(top.b), N_BITS, K_BITS);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < NM; j++) cfg[j] <= '0;
      msg_o      <= '0;
      exit_o     <= '0;
      drop_o     <= 1'b0;
      drop_src_o <= '0;
      deflect_o  <= 1'b0;
      error_o    <= 1'b0;
    end else begin
      if (msg_i.valid) cfg[node_idx[N_BITS-2:0]] <= cfg_new;
      exit_o    <= evt_n;
      deflect_o <= defl_n;
      error_o   <= err_n;
      drop_o    <= LAST && msg_n.valid && msg_n.kind == MSG_SETUP;
      drop_src_o <= msg_n.src;
      msg_o     <= msg_n;
      msg_o.valid <= msg_n.valid && !LAST;
      msg_o.link  <= (msg_n.in_plane == PLANE_S) ? rotl(msg_n.link, N_BITS)
                                                 : rotr(msg_n.link, N_BITS);
    end
  end

  // data path: one crossbar per module
  for (genvar j = 0; j < NM; j++) begin : g_node
    logic [3:0][DATA_W-1:0] di, dn, de;
    assign di = {din_u[2*j+1], din_u[2*j], din_s[2*j+1], din_s[2*j]};
    dsn_node_xbar #(.DATA_W(DATA_W)) u_xbar (
      .cfg_i   (cfg[j]),
      .din_i   (di),
      .dnext_o (dn),
      .dexit_o (de)
    );
    assign dnext_s[2*j]   = dn[0];
    assign dnext_s[2*j+1] = dn[1];
    assign dnext_u[2*j]   = dn[2];
    assign dnext_u[2*j+1] = dn[3];
    assign dexit_s[2*j]   = de[0];
    assign dexit_s[2*j+1] = de[1];
    assign dexit_u[2*j]   = de[2];
    assign dexit_u[2*j+1] = de[3];
    assign exit_cfg_s[2*j]   = cfg[j].exit_o[0];
    assign exit_cfg_s[2*j+1] = cfg[j].exit_o[1];
    assign exit_cfg_u[2*j]   = cfg[j].exit_o[2];
    assign exit_cfg_u[2*j+1] = cfg[j].exit_o[3];
  end

  initial begin
    assert (N_BITS >= 2 && N_BITS <= LBL_W) else $fatal(1, "N_BITS out of range");
  end
  // a routing tag must never overflow its stack
  assert property (@(posedge clk) disable iff (!rst_n)
                   msg_i.valid |-> msg_i.cnt < CNT_W'(TAG_DEPTH));

endmodule
