// obs_dsn_switch: optical burst switch node built on a dual shuffle-exchange
// network (DSN) with deflection routing.
//
// D_FIBERS input and output fibres carry H_WAVES data wavelengths each (plus a
// control wavelength, whose packets arrive here as req_*). Each input
// wavelength is one input port of a (D*H) x (D*H) DSN of L_STAGES stages of
// 4x4 switching modules. Bursts are never buffered: a module that cannot give
// a burst the output it wants deflects it to an idle one and adds a one-step
// correction to its routing tag; a burst may leave the network at any stage
// once its tag is used up, and is lost if the last stage is reached first.
// The exits of all stages that belong to one output wavelength channel meet in
// an output multiplexer.
//
// Reservation is just-in-time: a setup request configures the path stage by
// stage, one stage per clock, and the path stays until the burst's release
// request passes along it. SCHEME = 3 (default): the input controller picks a
// free wavelength of the output fibre and routes the burst to that very
// channel, or blocks it when the fibre is full. SCHEME = 1: the burst is routed
// to its fibre only and is deflected while the multiplexer it reaches is busy.
//
// Timing: a setup presented in clock t enters stage 1 at t+1; an undeflected
// burst's exit event (exit_o[n-1], n = log2(D*H) for scheme 3, log2(D) for
// scheme 1) is visible after the clock edge at the end of cycle t+n, and each
// deflection adds one stage. The data path data_in -> data_out is
// combinational through the stored switch settings. Port numbering inside:
// port = wavelength * D_FIBERS + fibre.
module obs_dsn_switch
  import dsn_pkg::*;
#(
  parameter int unsigned D_FIBERS = 8,
  parameter int unsigned H_WAVES  = 128,
  parameter int unsigned L_STAGES = 24,
  parameter int unsigned SCHEME   = 3,
  parameter int unsigned DATA_W   = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // control channel
  input  logic                          req_valid,
  input  msg_kind_e                     req_kind,
  input  logic [$clog2(D_FIBERS)-1:0]   req_src_fiber,
  input  logic [$clog2(H_WAVES)-1:0]    req_src_wave,
  input  logic [$clog2(D_FIBERS)-1:0]   req_dst_fiber,
  // burst channels
  input  logic [DATA_W-1:0]             data_in  [D_FIBERS][H_WAVES],
  output logic [DATA_W-1:0]             data_out [D_FIBERS][H_WAVES],
  // status
  output logic                          accepted_o,
  output logic                          blocked_o,
  output logic [$clog2(D_FIBERS*H_WAVES)-1:0] assigned_o,
  output exit_evt_t                     exit_o   [L_STAGES],
  output logic [L_STAGES-1:0]           deflect_o,
  output logic                          drop_o,
  output logic [LBL_W-1:0]              drop_src_o,
  output logic                          error_o
);

  localparam int unsigned F_BITS = $clog2(D_FIBERS);
  localparam int unsigned N_BITS = $clog2(D_FIBERS * H_WAVES);
  localparam int unsigned NP     = 1 << N_BITS;
  localparam int unsigned K_BITS = (SCHEME == 3) ? N_BITS : F_BITS;

  ctrl_msg_t                 msg;
  logic                      proto_err, clash;
  logic [L_STAGES-1:0]       stage_err;
  logic [NP-1:0][DATA_W-1:0] din, dout;
  logic [NP-1:0]             chan_busy;

  input_ctrl #(
    .D_FIBERS (D_FIBERS),
    .H_WAVES  (H_WAVES),
    .SCHEME   (SCHEME),
    .L_STAGES (L_STAGES)
  ) u_ictrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .req_valid     (req_valid),
    .req_kind      (req_kind),
    .req_src_fiber (req_src_fiber),
    .req_src_wave  (req_src_wave),
    .req_dst_fiber (req_dst_fiber),
    .msg_o         (msg),
    .blocked_o     (blocked_o),
    .accepted_o    (accepted_o),
    .assigned_o    (assigned_o),
    .proto_err_o   (proto_err)
  );

  // fibres/wavelengths <-> ports
  for (genvar f = 0; f < D_FIBERS; f++) begin : g_f
    for (genvar w = 0; w < H_WAVES; w++) begin : g_w
      assign din[w * D_FIBERS + f]  = data_in[f][w];
      assign data_out[f][w]         = dout[w * D_FIBERS + f];
    end
  end

  dsn_fabric #(
    .N_BITS   (N_BITS),
    .K_BITS   (K_BITS),
    .L_STAGES (L_STAGES),
    .SCHEME   (SCHEME),
    .DATA_W   (DATA_W)
  ) u_fabric (
    .clk         (clk),
    .rst_n       (rst_n),
    .msg_i       (msg),
    .din_i       (din),
    .dout_o      (dout),
    .chan_busy_o (chan_busy),
    .exit_o      (exit_o),
    .deflect_o   (deflect_o),
    .error_o     (stage_err),
    .drop_o      (drop_o),
    .drop_src_o  (drop_src_o),
    .clash_o     (clash)
  );

  assign error_o = proto_err | (|stage_err) | clash;

endmodule
