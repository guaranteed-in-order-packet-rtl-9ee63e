// tb_edvca_mesh: end-to-end test of the EDVCA mesh at reduced size (4 x 4 nodes, 2 VCs of
// 4 flits, a 2-entry flow table so that it fills).
//
// Every node injects packets through its network interface with
// Markov-modulated on/off bursts. Destinations follow the synthetic
// patterns transpose, bit-complement, shuffle and uniform random; packet
// lengths are 2 or 8 flits. Each flit carries its flow's packet sequence
// number, its index and the packet length. The test checks:
//   * every packet arrives, whole, at its destination, flits in order on
//     one ejection VC;
//   * packets of each flow arrive in the order they were injected;
//   * exclusivity, watched on the wires: at no ingress port (local input
//     included) does a flow have flits in two VCs at once. The monitor
//     counts each flow's flits per ingress from the link flits and the
//     flow-ID credits, independently of the routers' tables.
// It also counts how often each allocation outcome happened (dynamic
// grant, grant by the table, stall on the flow's busy VC, stall with no
// VC free, stall on a full flow table, table entry released) and how often a flow moved to
// a different VC at an ingress over time, and fails if one never occurs.
module tb_edvca_mesh;
  import noc_pkg::*;
  localparam int MX = 4, MY = 4;
  localparam int N = MX * MY;
  localparam int BITS = $clog2(N);
  localparam int PKTS_PER_NODE = 40;
  localparam int MAX_CYCLES = 200000;

  logic clk = 0, rst_n = 0;
  logic    [N-1:0]             inj_valid, inj_ready;
  flit_t   [N-1:0]             inj_flit;
  link_t   [N-1:0]             ej;
  va_evt_t [N-1:0][NPORTS-1:0] evt;
  va_evt_t [N-1:0]             ni_evt;

  edvca_mesh #(.MESH_X(4), .MESH_Y(4), .NUM_VC(2), .VC_DEPTH(4), .ENTRIES(2)) dut (
    .clk, .rst_n, .inj_valid_i(inj_valid), .inj_flit_i(inj_flit), .inj_ready_o(inj_ready),
    .ej_o(ej), .evt_o(evt), .ni_evt_o(ni_evt));
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------- traffic
  typedef struct { flow_t flow; int len; int seq; } pkt_t;
  pkt_t src_q[N][$];
  int   flow_tx_seq[int];      // next sequence number per flow (sender)
  int   flow_rx_seq[int];      // next expected sequence number per flow
  int   total_pkts = 0, delivered = 0, multi_flit = 0;

  function automatic int dest(input int s, input int pat);
    int d;
    case (pat)
      0: d = ((s % MX) * MX) + (s / MX);                    // transpose
      1: d = (~s) & (N - 1);                                // bit-complement
      2: d = ((s << 1) | (s >> (BITS - 1))) & (N - 1);      // shuffle
      default: d = $urandom_range(0, N - 1);                // uniform
    endcase
    return d;
  endfunction

  function automatic int fkey(input flow_t f);
    return int'(f);
  endfunction

  initial begin
    for (int s = 0; s < N; s++)
      for (int k = 0; k < PKTS_PER_NODE; k++) begin
        pkt_t p;
        int d;
        d = dest(s, $urandom_range(0, 3));
        p.flow.src.x = 3'(s % MX); p.flow.src.y = 3'(s / MX);
        p.flow.dst.x = 3'(d % MX); p.flow.dst.y = 3'(d / MX);
        p.len = ($urandom_range(0, 1) != 0) ? 2 : 8;
        if (!flow_tx_seq.exists(fkey(p.flow))) flow_tx_seq[fkey(p.flow)] = 0;
        p.seq = flow_tx_seq[fkey(p.flow)]++;
        src_q[s].push_back(p);
        total_pkts++;
      end
  end

  // ---------------- sources: Markov-modulated on/off, one flit per cycle
  int  flit_idx[N];
  bit  burst_on[N];
  initial begin
    inj_valid = '0; inj_flit = '0;
    foreach (flit_idx[s]) begin flit_idx[s] = 0; burst_on[s] = 1; end
    repeat (4) @(posedge clk);
    rst_n = 1;
    forever begin
      @(negedge clk);
      for (int s = 0; s < N; s++) begin
        // a burst switches off with p=1/16 and on with p=1/8 between packets
        if (flit_idx[s] == 0) begin
          if (burst_on[s] && $urandom_range(0, 15) == 0) burst_on[s] = 0;
          else if (!burst_on[s] && $urandom_range(0, 7) == 0) burst_on[s] = 1;
        end
        inj_valid[s] = 0;
        if (src_q[s].size() > 0 && (burst_on[s] || flit_idx[s] != 0)) begin
          pkt_t p;
          p = src_q[s][0];
          inj_valid[s] = 1;
          inj_flit[s].flow = p.flow;
          inj_flit[s].head = (flit_idx[s] == 0);
          inj_flit[s].tail = (flit_idx[s] == p.len - 1);
          inj_flit[s].data = {16'(p.seq), 8'(flit_idx[s]), 8'(p.len)};
        end
      end
      #1;
      for (int s = 0; s < N; s++)
        if (inj_valid[s] && inj_ready[s]) begin
          if (flit_idx[s] == src_q[s][0].len - 1) begin
            void'(src_q[s].pop_front());
            flit_idx[s] = 0;
          end else flit_idx[s]++;
        end
    end
  end

  // ---------------- ejection: reassembly and order
  bit    open_pkt[N][8];
  flow_t open_flow[N][8];
  int    open_idx[N][8], open_seq[N][8], open_len[N][8];

  // ---------------- exclusivity monitor and event counters
  int occ_cnt[int], occ_vc[int], last_vc[int];
  int n_grant_hit = 0, n_grant_miss = 0, n_stall_hit = 0, n_stall_novc = 0,
      n_stall_full = 0, n_freed = 0, n_vc_moves = 0;

  initial begin
    foreach (open_pkt[n, v]) open_pkt[n][v] = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      cyc++;
      for (int n = 0; n < N; n++) begin
        // delivered flits
        if (ej[n].valid) begin
          int v, seq, idx, len, fk;
          flit_t f;
          f = ej[n].flit; v = int'(ej[n].vc);
          seq = int'(f.data[31:16]); idx = int'(f.data[15:8]); len = int'(f.data[7:0]);
          fk = fkey(f.flow);
          chk(int'(f.flow.dst.x) == n % MX && int'(f.flow.dst.y) == n / MX, "delivered at its destination");
          if (f.head) begin
            chk(!open_pkt[n][v], "head flit on a VC with no open packet");
            if (!flow_rx_seq.exists(fk)) flow_rx_seq[fk] = 0;
            chk(seq == flow_rx_seq[fk], $sformatf("in-order delivery of flow %h: got %0d want %0d", fk, seq, flow_rx_seq[fk]));
            flow_rx_seq[fk] = seq + 1;
            open_pkt[n][v] = 1; open_flow[n][v] = f.flow; open_idx[n][v] = 0;
            open_seq[n][v] = seq; open_len[n][v] = len;
          end else begin
            chk(open_pkt[n][v] && open_flow[n][v] == f.flow && open_seq[n][v] == seq,
                "body flit continues the packet open on its VC");
          end
          chk(idx == open_idx[n][v], "flits of a packet in order");
          open_idx[n][v]++;
          chk(f.tail == (idx == len - 1), "tail flit is the last one");
          if (f.tail) begin
            open_pkt[n][v] = 0;
            delivered++;
            if (len > 1) multi_flit++;
          end
        end
        // exclusivity at every ingress port: arrivals, then credits
        for (int p = 0; p < NPORTS; p++) begin
          link_t   l;
          credit_t c;
          l = dut.r_link_in[n][p];
          c = dut.r_cr_out[n][p];
          if (l.valid) begin
            int k;
            k = ((n * 8 + p) << 12) | fkey(l.flit.flow);
            if (!occ_cnt.exists(k)) occ_cnt[k] = 0;
            if (occ_cnt[k] > 0)
              chk(occ_vc[k] == int'(l.vc), "flow never in two VCs of one ingress");
            else if (last_vc.exists(k) && last_vc[k] != int'(l.vc))
              n_vc_moves++;
            occ_cnt[k]++; occ_vc[k] = int'(l.vc); last_vc[k] = int'(l.vc);
          end
          if (c.valid) begin
            int k;
            k = ((n * 8 + p) << 12) | fkey(c.flow);
            chk(occ_cnt.exists(k) && occ_cnt[k] > 0, "credit for a flit that is buffered");
            if (occ_cnt.exists(k)) occ_cnt[k]--;
          end
        end
        // allocation events
        for (int p = 0; p <= NPORTS; p++) begin
          va_evt_t e;
          e = (p == NPORTS) ? ni_evt[n] : evt[n][p];
          n_grant_hit  += int'(e.grant_hit);
          n_grant_miss += int'(e.grant_miss);
          n_stall_hit  += int'(e.stall_hit);
          n_stall_novc += int'(e.stall_novc);
          n_stall_full += int'(e.stall_full);
          n_freed      += int'(e.entry_freed);
        end
      end
      if (delivered == total_pkts) break;
    end
    repeat (20) @(negedge clk);
    foreach (open_pkt[n, v]) chk(!open_pkt[n][v], "no packet left half delivered");
    chk(delivered == total_pkts, "all packets delivered");
    $display("cycles %0d, packets %0d (multi-flit %0d)", cyc, delivered, multi_flit);
    $display("grant by table %0d, dynamic grant %0d, stall on flow's VC %0d, stall no VC %0d, stall table full %0d, entries released %0d, VC changes %0d",
             n_grant_hit, n_grant_miss, n_stall_hit, n_stall_novc, n_stall_full, n_freed, n_vc_moves);
    chk(n_grant_hit > 0,  "grant by table happened");
    chk(n_grant_miss > 0, "dynamic grant happened");
    chk(n_stall_hit > 0,  "stall on the flow's own VC happened");
    chk(n_stall_novc > 0, "stall with no VC available happened");
    chk(n_stall_full > 0, "stall on a full flow table happened");
    chk(n_freed > 0,      "table entries were released");
    chk(n_vc_moves > 0,   "flows changed VC over time");
    chk(multi_flit > 0,   "multi-flit packets delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d packets delivered", delivered, total_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
