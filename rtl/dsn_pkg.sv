// dsn_pkg: types and helper functions shared by the dual shuffle-exchange
// network (DSN) burst switch.
//
// A control packet travels one stage per clock. Its routing tag is a stack of
// (plane, bit) entries: the top entry names the output a 4x4 switching module
// must use (plane S = shuffle outputs 0/1, plane U = unshuffle outputs 2/3, the
// bit picks the link inside the plane). A successful hop pops the entry; a
// deflection pushes a one-step correction entry.
//
// Link labels are n bits wide (n = log2 N). Module x of a stage owns links
// {x,0} and {x,1} in each plane. Shuffle links rotate the label left by one,
// unshuffle links rotate it right by one. Label and stack sizes are fixed
// maxima here so that every module can share one packet type.
package dsn_pkg;

  localparam int unsigned LBL_W     = 16;  // widest link label supported (N <= 65536)
  localparam int unsigned TAG_DEPTH = 64;  // routing-tag stack entries (n + L must fit)
  localparam int unsigned CNT_W     = 7;   // stack pointer width

  typedef enum logic {PLANE_S = 1'b0, PLANE_U = 1'b1} plane_e;
  typedef enum logic {MSG_SETUP = 1'b0, MSG_RELEASE = 1'b1} msg_kind_e;

  typedef struct packed {
    plane_e plane;
    logic   b;
  } tag_ent_t;

  typedef tag_ent_t [TAG_DEPTH-1:0] tag_stack_t;

  // Control packet between stages. 'link' and 'in_plane' give the module input it
  // arrives on; 'src' is the network input port (used to report results).
  typedef struct packed {
    logic              valid;
    msg_kind_e         kind;
    logic [LBL_W-1:0]  src;
    logic [LBL_W-1:0]  link;
    plane_e            in_plane;
    logic [CNT_W-1:0]  cnt;
    tag_stack_t        tag;
  } ctrl_msg_t;

  // Event raised where a control packet leaves the fabric.
  typedef struct packed {
    logic             valid;
    msg_kind_e        kind;
    logic [LBL_W-1:0] src;
    plane_e           plane;
    logic [LBL_W-1:0] link;   // label of the module output link used as the exit
  } exit_evt_t;

  // Configuration of one 4x4 switching module. Inputs and outputs are numbered
  // {plane, bit}: 0,1 shuffle links, 2,3 unshuffle links.
  typedef struct packed {
    logic [3:0]       in_v;    // input i is connected
    logic [3:0][1:0]  in_out;  // output that input i is connected to
    logic [3:0]       exit_o;  // output o is switched to the output multiplexer
  } node_cfg_t;

  // Cyclic left / right shift of the low n bits of a label.
  function automatic logic [LBL_W-1:0] rotl(input logic [LBL_W-1:0] x, input int unsigned n);
    logic [LBL_W-1:0] r;
    r = '0;
    for (int unsigned i = 0; i < LBL_W; i++)
      if (i < n) r[i] = (i == 0) ? x[n-1] : x[i-1];
    return r;
  endfunction

  function automatic logic [LBL_W-1:0] rotr(input logic [LBL_W-1:0] x, input int unsigned n);
    logic [LBL_W-1:0] r;
    r = '0;
    for (int unsigned i = 0; i < LBL_W; i++)
      if (i < n) r[i] = (i == n-1) ? x[0] : x[i+1];
    return r;
  endfunction

  // Routing tag that steers a packet, within k stages of one plane, to an exit
  // link whose routed bits equal v (k bits).
  //   plane S: after k stages the label's low k bits are the k tag bits, first
  //            bit used = most significant, so the routed value is label[k-1:0].
  //   plane U: the bit set last ends in label[0], the ones before it are rotated
  //            up to label[n-1:n-k+1]; the routed value is
  //            {label[n-1:n-k+1], label[0]} and the bits are used in the order
  //            v[1], v[2], ..., v[k-1], v[0].
  // With k = n both planes end on the link whose label is v itself.
  function automatic tag_stack_t make_tag(input logic [LBL_W-1:0] v, input int unsigned k,
                                          input plane_e p);
    tag_stack_t t;
    t = '0;
    for (int unsigned j = 0; j < TAG_DEPTH; j++) begin
      // entry j is used (k-j)-th; entry k-1 is the top of the stack
      if (j < k) begin
        t[j].plane = p;
        if (p == PLANE_S) t[j].b = v[j];
        else if (j == 0)  t[j].b = v[0];
        else              t[j].b = v[k-j];
      end
    end
    return t;
  endfunction

  // Output port (= {wavelength, fibre} index) fed by the exit of 'plane' at
  // module output link 'lbl', when the tag routes k bits. Plane S: the routed
  // bits are label[k-1:0] and the rest is label[n-1:k]. Plane U: the routed bits
  // are {label[n-1:n-k+1], label[0]} and the rest is label[n-k:1].
  function automatic logic [LBL_W-1:0] exit_port(input plane_e p, input logic [LBL_W-1:0] lbl,
                                                 input int unsigned n, input int unsigned k);
    logic [LBL_W-1:0] r;
    if (p == PLANE_S || k == n) return lbl;
    r = '0;
    // routed value, MSB first: label[n-1] .. label[n-k+1], then label[0]
    for (int unsigned i = 0; i < LBL_W; i++) begin
      if (i == 0)                  r[i] = lbl[0];
      else if (i < k)              r[i] = lbl[n-k+i];
      else if (i < n)              r[i] = lbl[i-k+1];
    end
    return r;
  endfunction

endpackage
