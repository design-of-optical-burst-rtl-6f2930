// tb_input_ctrl: wavelength assignment (lowest free wavelength of the output
// fibre), blocking when the fibre is full, freeing at release, alternation
// of the plane per input channel, the routing tags for both planes, the
// fibre-only tag of scheme 1, the one-clock latency and protocol errors.
module tb_input_ctrl;
  import dsn_pkg::*;
  localparam int unsigned D = 4, H = 4;

  logic clk = 0, rst_n = 0;
  logic req_valid;
  msg_kind_e req_kind;
  logic [1:0] sf, sw, df;
  ctrl_msg_t m3, m1;
  logic blk3, acc3, perr3, blk1, acc1, perr1;
  logic [3:0] asg3, asg1;
  int checks = 0, failures = 0;

  input_ctrl #(.D_FIBERS(D), .H_WAVES(H), .SCHEME(3), .L_STAGES(3)) dut3 (
    .clk, .rst_n, .req_valid, .req_kind, .req_src_fiber(sf), .req_src_wave(sw), .req_dst_fiber(df),
    .msg_o(m3), .blocked_o(blk3), .accepted_o(acc3), .assigned_o(asg3), .proto_err_o(perr3));
  input_ctrl #(.D_FIBERS(D), .H_WAVES(H), .SCHEME(1), .L_STAGES(3)) dut1 (
    .clk, .rst_n, .req_valid, .req_kind, .req_src_fiber(sf), .req_src_wave(sw), .req_dst_fiber(df),
    .msg_o(m1), .blocked_o(blk1), .accepted_o(acc1), .assigned_o(asg1), .proto_err_o(perr1));

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  // expected tag entry j (0 = used last) for value v of k bits in plane p
  function automatic tag_ent_t exp_ent(input int unsigned v, input int unsigned k,
                                       input bit p, input int unsigned j);
    tag_ent_t e;
    int unsigned order [$];
    // order in which the bits are used
    if (!p) for (int i = k - 1; i >= 0; i--) order.push_back(i);
    else begin
      for (int i = 1; i < k; i++) order.push_back(i);
      order.push_back(0);
    end
    e.plane = plane_e'(p);
    e.b = 1'((v >> order[k - 1 - j]) & 1);
    return e;
  endfunction

  // one request; sample the outputs one clock later
  task automatic req(input msg_kind_e k, input int unsigned f, input int unsigned w,
                     input int unsigned d);
    req_valid = 1'b1; req_kind = k; sf = 2'(f); sw = 2'(w); df = 2'(d);
    @(posedge clk);
    #1;
    req_valid = 1'b0;
  endtask

  task automatic chk_setup3(input int unsigned src, input int unsigned port, input bit p);
    chk(acc3 && !blk3 && m3.valid && m3.kind == MSG_SETUP && m3.src == src && m3.link == src,
        $sformatf("setup msg src %0d", src));
    chk(asg3 == port && m3.cnt == 4, $sformatf("assigned %0d got %0d", port, asg3));
    for (int j = 0; j < 4; j++)
      chk(m3.tag[j] == exp_ent(port, 4, p, j), $sformatf("tag entry %0d port %0d plane %0d", j, port, p));
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_kind = MSG_SETUP; sf = 0; sw = 0; df = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(!m3.valid && !m1.valid, "idle after reset");
    // fill output fibre 2: wavelengths 0..3 -> ports 2, 6, 10, 14
    req(MSG_SETUP, 0, 0, 2); chk_setup3(0, 2, 0);
    chk(m1.valid && m1.cnt == 2 && m1.tag[1] == exp_ent(2, 2, 0, 1) && m1.tag[0] == exp_ent(2, 2, 0, 0),
        "scheme 1 fibre-only tag");
    req(MSG_SETUP, 1, 0, 2); chk_setup3(1, 6, 0);
    req(MSG_SETUP, 2, 3, 2); chk_setup3(14, 10, 0);
    req(MSG_SETUP, 3, 1, 2); chk_setup3(7, 14, 0);
    req(MSG_SETUP, 0, 2, 2);
    chk(blk3 && !acc3 && !m3.valid, "fifth burst to fibre 2 blocked");
    chk(acc1 && m1.valid && !blk1, "scheme 1 never blocks here");
    // release input (1,0) -> port 6 free again L_STAGES = 3 clocks later
    req(MSG_RELEASE, 1, 0, 0);
    chk(m3.valid && m3.kind == MSG_RELEASE && m3.link == 1, "release forwarded");
    req(MSG_SETUP, 0, 2, 2);
    chk(blk3, "channel still held while the release travels");
    repeat (2) @(posedge clk);
    #1;
    req(MSG_SETUP, 0, 2, 2); chk_setup3(8, 6, 0);
    // input (0,0): release then a second burst, which goes to the U plane
    req(MSG_RELEASE, 0, 0, 0);
    req(MSG_SETUP, 0, 0, 1); chk_setup3(0, 1, 1);
    chk(m1.tag[1] == exp_ent(1, 2, 1, 1) && m1.tag[0] == exp_ent(1, 2, 1, 0), "scheme 1 U tag");
    // protocol errors
    req(MSG_SETUP, 0, 0, 3);
    chk(perr3 && !m3.valid, "setup on active input");
    req(MSG_RELEASE, 3, 3, 0);
    chk(!perr3 && !m3.valid, "release on idle input (blocked burst) dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
