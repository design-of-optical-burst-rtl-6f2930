// input_ctrl: electronic input controlling unit of the burst switch.
//
// Burst control packets arrive one per clock at most (req_*). A setup names
// the input channel (fibre, wavelength) the burst arrives on and the output
// fibre it is for; a release names the input channel whose burst has ended
// (just-in-time reservation: resources are held from setup until release).
// The unit turns them into fabric control packets, registered, one clock later.
//
//  * Scheme 3: the unit records which output wavelength channels are occupied
//    and gives the burst the lowest-numbered free wavelength of its output
//    fibre; the routing tag is then the full port address {wavelength, fibre}.
//    With no free wavelength the burst is blocked (output contention,
//    blocked_o) and nothing enters the fabric.
//  * Scheme 1: the tag holds only the fibre bits; the fabric finds a free
//    multiplexer itself, so nothing is blocked here.
//
// Successive bursts of one input channel alternate between the shuffle and the
// unshuffle plane (first burst: shuffle plane), which spreads the load over
// both planes. A release is forwarded only for a channel with an accepted
// setup (the release of a blocked burst is dropped silently). The released burst's output channel (scheme 3) is freed L_STAGES
// clocks after the release, when the release packet has certainly passed the
// exit switch of the old path, so that a new path to the channel never meets
// the old one in the multiplexer. A setup on a channel that is
// already active is ignored and flagged in proto_err_o.
// Port numbering: port = wavelength * D_FIBERS + fibre.
module input_ctrl
  import dsn_pkg::*;
#(
  parameter int unsigned D_FIBERS = 8,
  parameter int unsigned H_WAVES  = 128,
  parameter int unsigned SCHEME   = 3,
  parameter int unsigned L_STAGES = 24,
  localparam int unsigned F_BITS  = $clog2(D_FIBERS),
  localparam int unsigned W_BITS  = $clog2(H_WAVES),
  localparam int unsigned N_BITS  = F_BITS + W_BITS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  input  msg_kind_e          req_kind,
  input  logic [F_BITS-1:0]  req_src_fiber,
  input  logic [W_BITS-1:0]  req_src_wave,
  input  logic [F_BITS-1:0]  req_dst_fiber,
  output ctrl_msg_t          msg_o,        // to the first fabric stage
  output logic               blocked_o,    // setup refused: output fibre full
  output logic               accepted_o,   // setup sent into the fabric
  output logic [N_BITS-1:0]  assigned_o,   // scheme 3: output channel given
  output logic               proto_err_o
);

  localparam int unsigned NP = 1 << N_BITS;

  logic [NP-1:0]             chan_busy;
  logic [NP-1:0]             src_active;
  logic [NP-1:0]             src_plane;
  logic [N_BITS-1:0]         src_port [NP];

  logic [L_STAGES-1:0]       free_v;              // delayed channel release
  logic [N_BITS-1:0]         free_p [L_STAGES];
  logic [N_BITS-1:0]         src;
  logic                      found;
  logic [W_BITS-1:0]         free_w;
  logic [N_BITS-1:0]         port;

  assign src  = {req_src_wave, req_src_fiber};
  assign port = {free_w, req_dst_fiber};

  // lowest free wavelength of the requested output fibre
  always_comb begin
    found  = 1'b0;
    free_w = '0;
    for (int w = H_WAVES - 1; w >= 0; w--)
      if (!chan_busy[{W_BITS'(w), req_dst_fiber}]) begin
        found  = 1'b1;
        free_w = W_BITS'(w);
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chan_busy   <= '0;
      src_active  <= '0;
      src_plane   <= '0;
      for (int i = 0; i < NP; i++) src_port[i] <= '0;
      free_v      <= '0;
      for (int i = 0; i < L_STAGES; i++) free_p[i] <= '0;
      msg_o       <= '0;
      blocked_o   <= 1'b0;
      accepted_o  <= 1'b0;
      assigned_o  <= '0;
      proto_err_o <= 1'b0;
    end else begin
      msg_o       <= '0;
      blocked_o   <= 1'b0;
      accepted_o  <= 1'b0;
      proto_err_o <= 1'b0;
      free_v      <= {free_v[L_STAGES-2:0], 1'b0};
      for (int i = 1; i < L_STAGES; i++) free_p[i] <= free_p[i-1];
      if (free_v[L_STAGES-1]) chan_busy[free_p[L_STAGES-1]] <= 1'b0;
      if (req_valid && req_kind == MSG_SETUP) begin
        if (src_active[src]) begin
          proto_err_o <= 1'b1;
        end else if (SCHEME == 3 && !found) begin
          blocked_o <= 1'b1;
        end else begin
          src_active[src] <= 1'b1;
          src_plane[src]  <= ~src_plane[src];
          accepted_o      <= 1'b1;
          msg_o.valid     <= 1'b1;
          msg_o.kind      <= MSG_SETUP;
          msg_o.src       <= LBL_W'(src);
          msg_o.link      <= LBL_W'(src);
          msg_o.in_plane  <= PLANE_S;
          if (SCHEME == 3) begin
            chan_busy[port] <= 1'b1;
            src_port[src]   <= port;
            assigned_o      <= port;
            msg_o.cnt       <= CNT_W'(N_BITS);
            msg_o.tag       <= make_tag(LBL_W'(port), N_BITS, plane_e'(src_plane[src]));
          end else begin
            msg_o.cnt       <= CNT_W'(F_BITS);
            msg_o.tag       <= make_tag(LBL_W'(req_dst_fiber), F_BITS, plane_e'(src_plane[src]));
          end
        end
      end else if (req_valid && req_kind == MSG_RELEASE) begin
        // a release for a blocked burst is expected and simply dropped
        if (src_active[src]) begin
          src_active[src] <= 1'b0;
          free_v[0]       <= (SCHEME == 3);
          free_p[0]       <= src_port[src];
          msg_o.valid    <= 1'b1;
          msg_o.kind     <= MSG_RELEASE;
          msg_o.src      <= LBL_W'(src);
          msg_o.link     <= LBL_W'(src);
          msg_o.in_plane <= PLANE_S;
        end
      end
    end
  end

  initial begin
    assert (D_FIBERS == (1 << F_BITS) && H_WAVES == (1 << W_BITS))
      else $fatal(1, "D_FIBERS and H_WAVES must be powers of two");
    assert (SCHEME == 1 || SCHEME == 3) else $fatal(1, "SCHEME must be 1 or 3");
    assert (L_STAGES >= 2) else $fatal(1, "L_STAGES must be at least 2");
  end

endmodule
