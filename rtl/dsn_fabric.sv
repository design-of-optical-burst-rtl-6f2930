// dsn_fabric: L-stage dual shuffle-exchange network with its output
// multiplexers.
//
// N = 2^N_BITS ports. Every stage has N/2 4x4 switching modules; module x owns
// links {x,0},{x,1} of the shuffle plane and of the unshuffle plane. Between
// stages a shuffle output link l goes to shuffle input link rotl(l) and an
// unshuffle output link l to unshuffle input link rotr(l); network input port
// s enters the first stage on shuffle link rotl(s) (one shuffle ahead of the
// first stage). So a deflection onto either plane can be undone by one hop on
// the other plane, which is what the correction entries of dsn_node_ctrl do.
//
// Control: msg_i enters stage 1 (link = network input port, plane ignored);
// a packet moves one stage per clock, so a setup that is never deflected
// leaves at stage K_BITS and its exit event appears K_BITS clocks after it was
// presented. exit_o[k] / deflect_o[k] / error_o[k] come from stage k+1;
// drop_o flags a setup that still had routing bits after the last stage.
//
// Output scheme (SCHEME): 3 = tags are full port addresses given by the
// input controller, exits are always allowed. 1 = tags carry only the fibre
// bits, and a packet may leave only if the multiplexer of the channel its exit
// feeds is idle and no lower stage takes the same channel in the same clock;
// otherwise the module deflects it. The data path (din to dout) is
// combinational through the stored configurations.
module dsn_fabric
  import dsn_pkg::*;
#(
  parameter int unsigned N_BITS   = 10,
  parameter int unsigned K_BITS   = 10,
  parameter int unsigned L_STAGES = 24,
  parameter int unsigned SCHEME   = 3,
  parameter int unsigned DATA_W   = 8
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  ctrl_msg_t                          msg_i,
  input  logic [(1<<N_BITS)-1:0][DATA_W-1:0] din_i,
  output logic [(1<<N_BITS)-1:0][DATA_W-1:0] dout_o,
  output logic [(1<<N_BITS)-1:0]             chan_busy_o,
  output exit_evt_t                          exit_o    [L_STAGES],
  output logic [L_STAGES-1:0]                deflect_o,
  output logic [L_STAGES-1:0]                error_o,
  output logic                               drop_o,
  output logic [LBL_W-1:0]                   drop_src_o,
  output logic                               clash_o
);

  localparam int unsigned NP = 1 << N_BITS;

  logic [NP-1:0][DATA_W-1:0]   ds_ex [L_STAGES];
  logic [NP-1:0][DATA_W-1:0]   du_ex [L_STAGES];
  logic [NP-1:0]               cs_ex [L_STAGES];
  logic [NP-1:0]               cu_ex [L_STAGES];
  logic [L_STAGES-1:0]         cand;
  logic [LBL_W-1:0]            cport [L_STAGES];
  logic [L_STAGES-1:0]         exit_ok;
  logic [L_STAGES-1:0]         drop_v;
  logic [LBL_W-1:0]            drop_s [L_STAGES];

  // exit grants (scheme 1): channel idle and not taken by a lower stage now
  always_comb begin
    for (int k = 0; k < L_STAGES; k++) begin
      if (SCHEME == 1) begin
        exit_ok[k] = !chan_busy_o[cport[k][N_BITS-1:0]];
        for (int j = 0; j < k; j++)
          if (cand[j] && cport[j] == cport[k]) exit_ok[k] = 1'b0;
      end else begin
        exit_ok[k] = 1'b1;
      end
    end
  end

  for (genvar k = 0; k < L_STAGES; k++) begin : g_stage
    ctrl_msg_t                 m_in, m_out;
    logic [NP-1:0][DATA_W-1:0] ds_in, du_in, ds_nx, du_nx;

    if (k == 0) begin : g_first
      // one shuffle from the network input ports to the first stage
      always_comb begin
        m_in          = msg_i;
        m_in.link     = rotl(msg_i.link, N_BITS);
        m_in.in_plane = PLANE_S;
      end
      for (genvar l = 0; l < NP; l++) begin : g_l
        assign ds_in[((l << 1) | (l >> (N_BITS - 1))) % NP] = din_i[l];
      end
      assign du_in = '0;
    end else begin : g_next
      // shuffle links rotate the label left, unshuffle links rotate it right
      assign m_in = g_stage[k-1].m_out;
      for (genvar l = 0; l < NP; l++) begin : g_l
        assign ds_in[((l << 1) | (l >> (N_BITS - 1))) % NP]         = g_stage[k-1].ds_nx[l];
        assign du_in[(l >> 1) | ((l % 2) << (N_BITS - 1))]          = g_stage[k-1].du_nx[l];
      end
    end

    dsn_stage #(
      .N_BITS (N_BITS),
      .K_BITS (K_BITS),
      .DATA_W (DATA_W),
      .LAST   (k == L_STAGES - 1)
    ) u_stage (
      .clk         (clk),
      .rst_n       (rst_n),
      .msg_i       (m_in),
      .msg_o       (m_out),
      .exit_o      (exit_o[k]),
      .drop_o      (drop_v[k]),
      .drop_src_o  (drop_s[k]),
      .deflect_o   (deflect_o[k]),
      .error_o     (error_o[k]),
      .exit_cand_o (cand[k]),
      .exit_port_o (cport[k]),
      .exit_ok_i   (exit_ok[k]),
      .din_s       (ds_in),
      .din_u       (du_in),
      .dnext_s     (ds_nx),
      .dnext_u     (du_nx),
      .dexit_s     (ds_ex[k]),
      .dexit_u     (du_ex[k]),
      .exit_cfg_s  (cs_ex[k]),
      .exit_cfg_u  (cu_ex[k])
    );
  end

  assign drop_o     = drop_v[L_STAGES-1];
  assign drop_src_o = drop_s[L_STAGES-1];

  output_mux #(
    .N_BITS   (N_BITS),
    .K_BITS   (K_BITS),
    .L_STAGES (L_STAGES),
    .DATA_W   (DATA_W)
  ) u_omux (
    .dexit_s    (ds_ex),
    .dexit_u    (du_ex),
    .exit_cfg_s (cs_ex),
    .exit_cfg_u (cu_ex),
    .dout_o     (dout_o),
    .busy_o     (chan_busy_o),
    .clash_o    (clash_o)
  );

  initial begin
    assert (K_BITS >= 1 && K_BITS <= N_BITS) else $fatal(1, "K_BITS out of range");
    assert (N_BITS + L_STAGES < TAG_DEPTH) else $fatal(1, "routing tag stack too small");
    assert (SCHEME == 1 || SCHEME == 3) else $fatal(1, "SCHEME must be 1 or 3");
  end

endmodule
