// dsn_node_xbar: data path of one 4x4 switching module.
//
// A non-blocking 4x4 crossbar: output o carries input i when the module
// configuration connects i to o. Each output is followed by a 1x2 switch that
// sends it either on to the next stage or to the output multiplexer (exit).
// Purely combinational; a burst channel is modelled as a DATA_W-bit word, zero
// meaning no light. Ports are numbered {plane, bit}: 0,1 shuffle, 2,3 unshuffle.
module dsn_node_xbar
  import dsn_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  node_cfg_t                  cfg_i,
  input  logic [3:0][DATA_W-1:0]     din_i,    // module inputs
  output logic [3:0][DATA_W-1:0]     dnext_o,  // outputs towards the next stage
  output logic [3:0][DATA_W-1:0]     dexit_o   // outputs towards the multiplexers
);

  logic [3:0][DATA_W-1:0] x;

  always_comb begin
    for (int o = 0; o < 4; o++) begin
      x[o] = '0;
      for (int i = 0; i < 4; i++)
        if (cfg_i.in_v[i] && cfg_i.in_out[i] == 2'(o)) x[o] = x[o] | din_i[i];
      dnext_o[o] = cfg_i.exit_o[o] ? '0   : x[o];
      dexit_o[o] = cfg_i.exit_o[o] ? x[o] : '0;
    end
  end

endmodule
