// tb_edvca_ni: the network interface with 2 local-input VCs of 4 flits
// and a 2-entry flow table, against a behavioural model of the router's
// local input port that drains its VCs slowly and returns flow-ID credits.
// Injection checks: packets of 4 flows enter whole, contiguous on one VC;
// a VC never overflows; a flow never has flits in two VCs at once; each
// flow's packets enter in order; every packet gets in; the allocation
// outcomes (dynamic grant, table grant, stall on the flow's VC, stall with
// no VC, stall on a full table) all occur. Ejection checks: each flit from
// the router appears on ej_o one cycle later, with a credit for its flow.
module tb_edvca_ni;
  import noc_pkg::*;
  localparam int NUM_VC = 2, VC_DEPTH = 4, ENTRIES = 2, PKTS = 400;
  logic clk = 0, rst_n = 0;
  logic inj_valid, inj_ready;
  flit_t inj_flit;
  link_t link_o, link_i, ej, link_i_d;
  credit_t cr_i, cr_o;
  va_evt_t evt;
  int checks = 0, failures = 0, cyc = 0;

  edvca_ni #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .ENTRIES(ENTRIES)) dut (
    .clk, .rst_n, .inj_valid_i(inj_valid), .inj_flit_i(inj_flit), .inj_ready_o(inj_ready),
    .link_o(link_o), .credit_i(cr_i), .link_i(link_i), .credit_o(cr_o), .ej_o(ej), .evt_o(evt));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  typedef struct { flow_t flow; int len; int seq; } pkt_t;
  pkt_t  src[$];
  int    tx_seq[int], rx_seq[int];
  flit_t vq[NUM_VC][$];
  bit    v_open[NUM_VC];
  flow_t v_flow[NUM_VC];
  int    f_cnt[int], f_vc[int];
  int    idx = 0, done = 0;
  int    e_hit = 0, e_miss = 0, e_shit = 0, e_novc = 0, e_full = 0, ej_n = 0;

  initial begin
    for (int k = 0; k < PKTS; k++) begin
      pkt_t p;
      p.flow = '0; p.flow.dst.x = 3'($urandom_range(0, 3));
      p.len = $urandom_range(1, 5);
      if (!tx_seq.exists(int'(p.flow))) tx_seq[int'(p.flow)] = 0;
      p.seq = tx_seq[int'(p.flow)]++;
      src.push_back(p);
    end
  end

  initial begin
    inj_valid = 0; inj_flit = '0; cr_i = '0; link_i = '0; link_i_d = '0;
    foreach (v_open[v]) v_open[v] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (done < PKTS && cyc < 50000) begin
      @(negedge clk);
      cyc++;
      // ---- ejection path: last cycle's router flit must be on ej_o now
      chk(ej == link_i_d, "ejected flit one cycle later");
      chk(cr_o.valid == link_i_d.valid && (!cr_o.valid || cr_o.flow == link_i_d.flit.flow), "ejection credit");
      if (ej.valid) ej_n++;
      link_i = '0;
      if ($urandom_range(0, 1)) begin
        link_i.valid = 1; link_i.vc = 3'($urandom_range(0, 7));
        link_i.flit = flit_t'({$urandom, $urandom});
      end
      link_i_d = link_i;
      // ---- injection: flit registered on link_o
      if (link_o.valid) begin
        flit_t f;
        int v, k;
        f = link_o.flit; v = int'(link_o.vc); k = int'(f.flow);
        chk(v < NUM_VC && vq[v].size() < VC_DEPTH, "local-input VC has room");
        if (f.head) begin
          chk(!v_open[v], "head on a VC with no open packet");
          if (!rx_seq.exists(k)) rx_seq[k] = 0;
          chk(int'(f.data[31:16]) == rx_seq[k], "flow's packets in order");
          rx_seq[k]++;
          v_open[v] = 1; v_flow[v] = f.flow;
        end else chk(v_open[v] && v_flow[v] == f.flow, "packet contiguous on its VC");
        if (f.tail) begin v_open[v] = 0; done++; end
        if (!f_cnt.exists(k)) f_cnt[k] = 0;
        if (f_cnt[k] > 0) chk(f_vc[k] == v, "flow in one VC at a time");
        f_cnt[k]++; f_vc[k] = v;
        vq[v].push_back(f);
      end
      e_hit += int'(evt.grant_hit); e_miss += int'(evt.grant_miss); e_shit += int'(evt.stall_hit);
      e_novc += int'(evt.stall_novc); e_full += int'(evt.stall_full);
      // router side drains slowly
      cr_i = '0;
      if ($urandom_range(0, 2) == 0) begin
        int v;
        v = $urandom_range(0, NUM_VC - 1);
        if (vq[v].size() > 0) begin
          flit_t f;
          f = vq[v].pop_front();
          f_cnt[int'(f.flow)]--;
          cr_i.valid = 1; cr_i.flow = f.flow;
        end
      end
      // core offers the next flit
      inj_valid = 0;
      if (src.size() > 0) begin
        inj_valid = 1;
        inj_flit.flow = src[0].flow;
        inj_flit.head = (idx == 0);
        inj_flit.tail = (idx == src[0].len - 1);
        inj_flit.data = {16'(src[0].seq), 16'(idx)};
      end
      #1;
      if (inj_valid && inj_ready) begin
        if (idx == src[0].len - 1) begin idx = 0; void'(src.pop_front()); end
        else idx++;
      end
    end
    chk(done == PKTS, "all packets injected");
    chk(ej_n > 100, "ejection traffic seen");
    $display("packets %0d in %0d cycles; table %0d dynamic %0d stall-own %0d stall-novc %0d stall-full %0d",
             done, cyc, e_hit, e_miss, e_shit, e_novc, e_full);
    chk(e_hit > 0 && e_miss > 0 && e_shit > 0 && e_novc > 0 && e_full > 0, "every allocation outcome occurred");
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
