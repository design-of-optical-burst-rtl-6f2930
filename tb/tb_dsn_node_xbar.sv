// tb_dsn_node_xbar: random module configurations and data; every output is
// compared with a reference built from the list of connections.
module tb_dsn_node_xbar;
  import dsn_pkg::*;
  localparam int unsigned W = 8;

  node_cfg_t              cfg;
  logic [3:0][W-1:0]      din, dn, de;
  int                     checks = 0, failures = 0;

  dsn_node_xbar #(.DATA_W(W)) dut (.cfg_i(cfg), .din_i(din), .dnext_o(dn), .dexit_o(de));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int unsigned perm [4];
      logic [W-1:0] exp_x [4];
      // a random partial permutation: input i -> output perm[i]
      for (int i = 0; i < 4; i++) perm[i] = i;
      for (int i = 3; i > 0; i--) begin
        int unsigned j, tmp;
        j = $urandom_range(i);
        tmp = perm[i];
        perm[i] = perm[j];
        perm[j] = tmp;
      end
      cfg = '0;
      for (int i = 0; i < 4; i++) begin
        cfg.in_v[i]   = ($urandom_range(3) != 0);
        cfg.in_out[i] = 2'(perm[i]);
        din[i]        = W'($urandom_range(1, 255));
      end
      cfg.exit_o = 4'($urandom_range(15));
      for (int o = 0; o < 4; o++) exp_x[o] = '0;
      for (int i = 0; i < 4; i++) if (cfg.in_v[i]) exp_x[perm[i]] = din[i];
      #1;
      for (int o = 0; o < 4; o++) begin
        checks++;
        if (dn[o] !== (cfg.exit_o[o] ? '0 : exp_x[o]) || de[o] !== (cfg.exit_o[o] ? exp_x[o] : '0)) begin
          failures++;
          $display("FAIL t=%0d o=%0d dn=%h de=%h exp=%h", t, o, dn[o], de[o], exp_x[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
