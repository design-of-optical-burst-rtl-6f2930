// output_mux: the output multiplexers of the burst switch.
//
// A packet may finish its routing in any stage from stage K_BITS on, in either
// plane, so every output wavelength channel P = {wavelength, fibre} is fed by
// the exits of the 2*(L_STAGES-K_BITS+1) internal output links that lead to
// it (the passive fixed wavelength converter after the multiplexer is implied
// by the channel index). The plane-S exit of link l feeds channel l; the
// plane-U exit of link l feeds channel exit_port(U, l) (see dsn_pkg). With a
// full-length tag (K_BITS = n) both are channel l.
//
// busy_o tells, for every channel, that one of its exits is switched on; the
// switching modules use it as the multiplexer feedback of output scheme 1.
// clash_o flags two exits switched onto one channel, which the control never
// does (an assertion in the testbenches watches it). Combinational.
module output_mux
  import dsn_pkg::*;
#(
  parameter int unsigned N_BITS   = 10,
  parameter int unsigned K_BITS   = 10,
  parameter int unsigned L_STAGES = 24,
  parameter int unsigned DATA_W   = 8
) (
  input  logic [(1<<N_BITS)-1:0][DATA_W-1:0] dexit_s   [L_STAGES],
  input  logic [(1<<N_BITS)-1:0][DATA_W-1:0] dexit_u   [L_STAGES],
  input  logic [(1<<N_BITS)-1:0]             exit_cfg_s[L_STAGES],
  input  logic [(1<<N_BITS)-1:0]             exit_cfg_u[L_STAGES],
  output logic [(1<<N_BITS)-1:0][DATA_W-1:0] dout_o,
  output logic [(1<<N_BITS)-1:0]             busy_o,
  output logic                               clash_o
);

  localparam int unsigned NP    = 1 << N_BITS;
  localparam int unsigned K0    = K_BITS - 1;          // first stage with exits
  localparam int unsigned NSRC  = 2 * (L_STAGES - K0); // exits per channel

  // exits regrouped by the channel they feed
  logic [NSRC-1:0][DATA_W-1:0] src_d [NP];
  logic [NSRC-1:0]             src_c [NP];

  for (genvar k = K0; k < L_STAGES; k++) begin : g_k
    for (genvar l = 0; l < NP; l++) begin : g_l
      localparam int unsigned UP = int'(exit_port(PLANE_U, LBL_W'(l), N_BITS, K_BITS));
      assign src_d[l][2*(k-K0)]    = dexit_s[k][l];
      assign src_c[l][2*(k-K0)]    = exit_cfg_s[k][l];
      assign src_d[UP][2*(k-K0)+1] = dexit_u[k][l];
      assign src_c[UP][2*(k-K0)+1] = exit_cfg_u[k][l];
    end
  end

  logic [NP-1:0] multi;
  always_comb begin
    for (int p = 0; p < NP; p++) begin
      dout_o[p] = '0;
      for (int s = 0; s < NSRC; s++) dout_o[p] = dout_o[p] | src_d[p][s];
      busy_o[p] = |src_c[p];
      multi[p]  = !$onehot0(src_c[p]);
    end
    clash_o = |multi;
  end

endmodule
