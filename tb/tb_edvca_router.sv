// tb_edvca_router: one router at node (1,1) between behavioural neighbours.
// Upstream models feed all five inputs with 1..4-flit packets of flows to
// random destinations in a 3 x 3 neighbourhood, each flow on a fixed VC of
// its input, obeying the router's flow-ID credits. Downstream models hold
// NUM_VC queues of VC_DEPTH flits per output, drain them slowly at random
// and return a flow-ID credit for every flit they remove. Checks:
//   * each flit leaves on the XY output for its destination;
//   * a downstream VC never receives more flits than it has room for;
//   * packets arrive whole and contiguous on one downstream VC;
//   * each flow's packets leave in order;
//   * exclusivity: a flow never has flits in two VCs of one downstream port;
//   * all packets leave; dynamic and table grants, stalls on a flow's busy
//     VC and stalls with no VC free all occur.
module tb_edvca_router;
  import noc_pkg::*;
  localparam int NUM_VC = 2, VC_DEPTH = 4, ENTRIES = 4, PKTS = 300;
  logic clk = 0, rst_n = 0;
  link_t   [NPORTS-1:0] link_in, link_out;
  credit_t [NPORTS-1:0] cr_out, cr_in;
  va_evt_t [NPORTS-1:0] evt;
  int checks = 0, failures = 0, cyc = 0;

  edvca_router #(.X(1), .Y(1), .NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .ENTRIES(ENTRIES)) dut (
    .clk, .rst_n, .link_i(link_in), .credit_o(cr_out), .link_o(link_out), .credit_i(cr_in), .evt_o(evt));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  function automatic port_e xy(input flow_t f);
    if (f.dst.x > 1) return P_EAST;
    if (f.dst.x < 1) return P_WEST;
    if (f.dst.y > 1) return P_SOUTH;
    if (f.dst.y < 1) return P_NORTH;
    return P_LOCAL;
  endfunction

  typedef struct { flow_t flow; int len; int seq; } pkt_t;
  pkt_t q_in[NPORTS][$];
  int   up_idx[NPORTS], up_cred[NPORTS][NUM_VC];
  int   tx_seq[int], rx_seq[int];
  int   total = 0, done = 0;
  // downstream
  flit_t dq[NPORTS][NUM_VC][$];
  bit    d_open[NPORTS][NUM_VC];
  flow_t d_flow[NPORTS][NUM_VC];
  int    d_cnt[int], d_vc[int];
  int    ev_hit = 0, ev_miss = 0, ev_shit = 0, ev_novc = 0;

  function automatic int vc_of(input flow_t f);   // upstream's static VC
    return int'(f.src.y) % NUM_VC;
  endfunction

  initial begin
    for (int k = 0; k < PKTS; k++) begin
      pkt_t p;
      int ip;
      ip = $urandom_range(0, NPORTS - 1);
      p.flow.src.x = 3'(ip); p.flow.src.y = 3'($urandom_range(0, 3));
      p.flow.dst.x = 3'($urandom_range(0, 2)); p.flow.dst.y = 3'($urandom_range(0, 2));
      p.len = $urandom_range(1, 4);
      if (!tx_seq.exists(int'(p.flow))) tx_seq[int'(p.flow)] = 0;
      p.seq = tx_seq[int'(p.flow)]++;
      q_in[ip].push_back(p);
      total++;
    end
  end

  initial begin
    link_in = '0; cr_in = '0;
    foreach (up_idx[p]) up_idx[p] = 0;
    foreach (up_cred[p, v]) up_cred[p][v] = VC_DEPTH;
    foreach (d_open[o, v]) d_open[o][v] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (done < total && cyc < 40000) begin
      @(negedge clk);
      cyc++;
      // credits returned by the router to the upstream models
      for (int p = 0; p < NPORTS; p++)
        if (cr_out[p].valid) up_cred[p][vc_of(cr_out[p].flow)]++;
      // flits leaving the router
      for (int o = 0; o < NPORTS; o++) if (link_out[o].valid) begin
        flit_t f;
        int v, k, seq;
        f = link_out[o].flit; v = int'(link_out[o].vc); k = (o << 12) | int'(f.flow);
        seq = int'(f.data[31:16]);
        chk(xy(f.flow) == port_e'(o), "XY output port");
        chk(v < NUM_VC && dq[o][v].size() < VC_DEPTH, "downstream VC has room");
        if (f.head) begin
          chk(!d_open[o][v], "head on a free downstream VC");
          if (!rx_seq.exists(int'(f.flow))) rx_seq[int'(f.flow)] = 0;
          chk(seq == rx_seq[int'(f.flow)], "flow's packets in order");
          rx_seq[int'(f.flow)] = seq + 1;
          d_open[o][v] = 1; d_flow[o][v] = f.flow;
        end else chk(d_open[o][v] && d_flow[o][v] == f.flow, "packet contiguous on its VC");
        if (f.tail) begin d_open[o][v] = 0; done++; end
        if (!d_cnt.exists(k)) d_cnt[k] = 0;
        if (d_cnt[k] > 0) chk(d_vc[k] == v, "flow in one downstream VC at a time");
        d_cnt[k]++; d_vc[k] = v;
        dq[o][v].push_back(f);
      end
      // events
      for (int o = 0; o < NPORTS; o++) begin
        ev_hit += int'(evt[o].grant_hit); ev_miss += int'(evt[o].grant_miss);
        ev_shit += int'(evt[o].stall_hit); ev_novc += int'(evt[o].stall_novc);
      end
      // downstream drains slowly and returns flow-ID credits
      cr_in = '0;
      for (int o = 0; o < NPORTS; o++) if ($urandom_range(0, 3) == 0) begin
        int v;
        v = $urandom_range(0, NUM_VC - 1);
        if (dq[o][v].size() > 0) begin
          flit_t f;
          f = dq[o][v].pop_front();
          d_cnt[(o << 12) | int'(f.flow)]--;
          cr_in[o].valid = 1; cr_in[o].flow = f.flow;
        end
      end
      // upstream sends one flit per input when its VC has credit
      link_in = '0;
      for (int p = 0; p < NPORTS; p++) if (q_in[p].size() > 0) begin
        pkt_t pk;
        int v;
        pk = q_in[p][0]; v = vc_of(pk.flow);
        if (up_cred[p][v] > 0 && $urandom_range(0, 1)) begin
          up_cred[p][v]--;
          link_in[p].valid = 1; link_in[p].vc = 3'(v);
          link_in[p].flit.flow = pk.flow;
          link_in[p].flit.head = (up_idx[p] == 0);
          link_in[p].flit.tail = (up_idx[p] == pk.len - 1);
          link_in[p].flit.data = {16'(pk.seq), 16'(up_idx[p])};
          if (up_idx[p] == pk.len - 1) begin up_idx[p] = 0; void'(q_in[p].pop_front()); end
          else up_idx[p]++;
        end
      end
    end
    chk(done == total, "all packets forwarded");
    $display("packets %0d/%0d in %0d cycles; table grants %0d, dynamic grants %0d, stalls on own VC %0d, stalls no VC %0d",
             done, total, cyc, ev_hit, ev_miss, ev_shit, ev_novc);
    chk(ev_hit > 0 && ev_miss > 0 && ev_shit > 0 && ev_novc > 0, "every allocation outcome occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
