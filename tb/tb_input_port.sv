// tb_input_port: an ingress port at node (2,2) with 4 VCs of 4 flits.
// Packets of random length and destination are written into random VCs
// (never overfilling one); a tb-side allocator grants VC requests after a
// random delay and pops flits at random. Checks: each head flit requests
// the XY output for its destination; body flits never request allocation;
// flits leave each VC in arrival order with the cached output port and VC;
// every pop returns a credit with that flit's flow one cycle later.
module tb_input_port;
  import noc_pkg::*;
  localparam int NUM_VC = 4, VC_DEPTH = 4;
  logic clk = 0, rst_n = 0;
  coord_t here;
  link_t link;
  credit_t credit;
  logic [NUM_VC-1:0] va_req, va_gnt, sa_req, sa_gnt;
  port_e [NUM_VC-1:0] va_port, sa_port;
  flit_t [NUM_VC-1:0] front;
  vc_id_t [NUM_VC-1:0] va_vc, sa_vc;
  int checks = 0, failures = 0;

  input_port #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH)) dut (
    .clk, .rst_n, .here_i(here), .link_i(link), .credit_o(credit),
    .va_req_o(va_req), .va_port_o(va_port), .front_o(front), .va_gnt_i(va_gnt), .va_vc_i(va_vc),
    .sa_req_o(sa_req), .sa_port_o(sa_port), .sa_vc_o(sa_vc), .sa_gnt_i(sa_gnt));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic port_e xy(input coord_t d);
    if (d.x > 2) return P_EAST;
    if (d.x < 2) return P_WEST;
    if (d.y > 2) return P_SOUTH;
    if (d.y < 2) return P_NORTH;
    return P_LOCAL;
  endfunction

  flit_t  q[NUM_VC][$];       // model of each VC buffer
  int     occ[NUM_VC];        // written minus popped
  int     left[NUM_VC];       // flits of the current packet still to write
  bit     act[NUM_VC];
  port_e  m_port[NUM_VC];
  vc_id_t m_vc[NUM_VC];
  logic   cr_exp_valid;
  flow_t  cr_exp_flow;
  int     seq = 0, popped = 0;

  initial begin
    here.x = 3'd2; here.y = 3'd2;
    link = '0; va_gnt = '0; va_vc = '0; sa_gnt = '0;
    cr_exp_valid = 0; cr_exp_flow = '0;
    foreach (occ[v]) begin occ[v] = 0; left[v] = 0; act[v] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int wv, pv;
      flow_t f;
      @(negedge clk);
      link = '0; va_gnt = '0; sa_gnt = '0;
      // credit from last cycle's pop
      chk(credit.valid == cr_exp_valid, "credit valid");
      if (cr_exp_valid) chk(credit.flow == cr_exp_flow, "credit flow");
      cr_exp_valid = 0;
      // observe requests against the model
      for (int v = 0; v < NUM_VC; v++) begin
        bit exp_va;
        exp_va = !act[v] && q[v].size() > 0 && q[v][0].head;
        chk(va_req[v] == exp_va, "va_req");
        if (q[v].size() > 0) chk(front[v] == q[v][0], "front flit");
        if (exp_va) chk(va_port[v] == xy(q[v][0].flow.dst), "route");
        chk(sa_req[v] == (act[v] && q[v].size() > 0), "sa_req");
        if (act[v]) chk(sa_port[v] == m_port[v] && sa_vc[v] == m_vc[v], "cached route and VC");
      end
      // grant some VC requests
      for (int v = 0; v < NUM_VC; v++)
        if (va_req[v] && $urandom_range(0, 2) == 0) begin
          va_gnt[v] = 1; va_vc[v] = 3'($urandom_range(0, 7));
        end
      // pop at most one active VC
      pv = $urandom_range(0, NUM_VC - 1);
      if (sa_req[pv] && !va_gnt[pv] && $urandom_range(0, 1)) sa_gnt[pv] = 1;
      // write one flit into a VC with room
      wv = $urandom_range(0, NUM_VC - 1);
      if (occ[wv] - (sa_gnt[wv] ? 1 : 0) < VC_DEPTH && $urandom_range(0, 1)) begin
        if (left[wv] == 0) left[wv] = $urandom_range(1, 4);
        f.src.x = 3'($urandom); f.src.y = 3'($urandom);
        f.dst.x = 3'($urandom); f.dst.y = 3'($urandom);
        link.valid = 1; link.vc = 3'(wv);
        link.flit.flow = f;
        link.flit.head = 0; link.flit.tail = (left[wv] == 1);
        link.flit.data = 32'(seq++);
        if (q[wv].size() == 0 || q[wv][$].tail) begin
          if (occ[wv] == 0 || q[wv].size() == 0 || q[wv][$].tail) link.flit.head = 1;
        end
        // body flits continue the packet's flow
        if (!link.flit.head && q[wv].size() > 0) link.flit.flow = q[wv][$].flow;
        left[wv]--;
      end
      @(posedge clk);
      // model update
      for (int v = 0; v < NUM_VC; v++) begin
        if (va_gnt[v]) begin act[v] = 1; m_port[v] = xy(q[v][0].flow.dst); m_vc[v] = va_vc[v]; end
        if (sa_gnt[v]) begin
          flit_t fp;
          fp = q[v].pop_front();
          occ[v]--; popped++;
          cr_exp_valid = 1; cr_exp_flow = fp.flow;
          if (fp.tail) act[v] = 0;
        end
      end
      if (link.valid) begin q[link.vc].push_back(link.flit); occ[link.vc]++; end
    end
    chk(popped > 1000, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
