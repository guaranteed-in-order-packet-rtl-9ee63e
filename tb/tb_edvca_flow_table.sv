// tb_edvca_flow_table: first replays the table updates of a worked example
// (flows A, B, C sent to next-hop VCs 0, 1, 0, then forwarded on), then runs
// random allocate / send / credit traffic against a behavioural model of
// the table, with a 4-entry table so that it fills up and stalls.
module tb_edvca_flow_table;
  import noc_pkg::*;
  localparam int ENTRIES = 4;
  logic clk = 0, rst_n = 0;
  flow_t lk_flow, snd_flow, cr_flow;
  logic lk_hit, full, alloc, snd, snd_tail, cr, cr_hit, freed;
  vc_id_t lk_vc, alloc_vc, cr_vc;
  int checks = 0, failures = 0;
  int full_seen = 0, freed_seen = 0;

  edvca_flow_table #(.ENTRIES(ENTRIES), .VC_DEPTH(8)) dut (
    .clk, .rst_n, .lk_flow_i(lk_flow), .lk_hit_o(lk_hit), .lk_vc_o(lk_vc), .full_o(full),
    .alloc_i(alloc), .alloc_vc_i(alloc_vc), .snd_i(snd), .snd_flow_i(snd_flow), .snd_tail_i(snd_tail),
    .cr_i(cr), .cr_flow_i(cr_flow), .cr_hit_o(cr_hit), .cr_vc_o(cr_vc), .freed_o(freed));
  always #5 clk = ~clk;

  // model
  int m_vc[int], m_cnt[int], m_res[int];

  function automatic flow_t fl(input int k);
    flow_t f;
    f.src.x = 3'(k); f.src.y = 3'(k >> 3); f.dst.x = 3'(7 - k); f.dst.y = 3'(k + 1);
    return f;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle();
    alloc = 0; snd = 0; cr = 0; snd_tail = 0;
  endtask

  // check lookup of flow k against the model (combinational, after settle)
  task automatic check_lookup(input int k);
    lk_flow = fl(k); #1;
    chk(lk_hit == m_vc.exists(k), $sformatf("hit flow %0d", k));
    if (m_vc.exists(k)) chk(int'(lk_vc) == m_vc[k], $sformatf("vc flow %0d", k));
  endtask

  task automatic model_step(input int a_k, input bit a, input int a_vc,
                            input int s_k, input bit s, input bit s_tail,
                            input int c_k, input bit c);
    int nfreed = 0;
    if (a) begin
      if (m_vc.exists(a_k)) m_res[a_k] = 1;
      else begin m_vc[a_k] = a_vc; m_cnt[a_k] = 0; m_res[a_k] = 1; end
    end
    if (s) begin m_cnt[s_k]++; if (s_tail) m_res[s_k] = 0; end
    if (c) m_cnt[c_k]--;
    foreach (m_vc[k]) if (m_cnt[k] == 0 && m_res[k] == 0) nfreed++;
    begin
      int dead[$];
      foreach (m_vc[k]) if (m_cnt[k] == 0 && m_res[k] == 0) dead.push_back(k);
      foreach (dead[i]) begin m_vc.delete(dead[i]); m_cnt.delete(dead[i]); m_res.delete(dead[i]); end
    end
  endtask

  initial begin
    idle(); lk_flow = '0; snd_flow = '0; cr_flow = '0; alloc_vc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- worked example: A=1 -> VC0 (2 flits), B=2 -> VC1 (1), C=3 -> VC0 (2)
    begin
      int ks[3] = '{1, 2, 3};
      int vcs[3] = '{0, 1, 0};
      int ns[3] = '{2, 1, 2};
      for (int i = 0; i < 3; i++) begin
        @(negedge clk); idle(); lk_flow = fl(ks[i]); #1;
        chk(!lk_hit, "example: new flow misses");
        alloc = 1; alloc_vc = 3'(vcs[i]);
        @(posedge clk); model_step(ks[i], 1, vcs[i], 0, 0, 0, 0, 0);
        for (int n = 0; n < ns[i]; n++) begin
          @(negedge clk); idle(); snd = 1; snd_flow = fl(ks[i]); snd_tail = (n == ns[i] - 1);
          @(posedge clk); model_step(0, 0, 0, ks[i], 1, n == ns[i] - 1, 0, 0);
        end
      end
      @(negedge clk); idle();
      check_lookup(1); check_lookup(2); check_lookup(3);
      // two A flits forwarded from the next hop: A disappears
      for (int n = 0; n < 2; n++) begin
        @(negedge clk); idle(); cr = 1; cr_flow = fl(1); #1;
        chk(cr_hit && cr_vc == 3'd0, "example: credit for A maps to VC 0");
        chk(freed == (n == 1), "example: A entry released with its last flit");
        @(posedge clk);
        model_step(0, 0, 0, 0, 0, 0, 1, 1);
      end
      @(negedge clk); idle();
      check_lookup(1);
      chk(!lk_hit, "example: A gone");
      // one C flit forwarded: C stays with one flit in VC 0
      @(negedge clk); idle(); cr = 1; cr_flow = fl(3); #1;
      chk(cr_hit && cr_vc == 3'd0, "example: credit for C maps to VC 0");
      @(posedge clk); model_step(0, 0, 0, 0, 0, 0, 3, 1);
      @(negedge clk); idle(); check_lookup(3);
      chk(lk_hit && lk_vc == 3'd0, "example: C still in VC 0");
    end
    // ---- random traffic against the model
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int a_k, s_k, c_k, a_vc;
      bit a, s, sh, c;
      int keys[$];
      @(negedge clk); idle();
      a_k = $urandom_range(1, 7);
      check_lookup(a_k);
      chk(full == (m_vc.size() == ENTRIES), "full flag");
      if (full) full_seen++;
      a = ($urandom_range(0, 2) == 0) && (m_vc.exists(a_k) || m_vc.size() < ENTRIES);
      a_vc = m_vc.exists(a_k) ? m_vc[a_k] : $urandom_range(0, 7);
      keys.delete();
      foreach (m_vc[k]) keys.push_back(k);
      s = 0; c = 0; s_k = 0; c_k = 0; sh = 0;
      if (keys.size() > 0 && $urandom_range(0, 1)) begin
        s_k = keys[$urandom_range(0, keys.size() - 1)];
        if (m_cnt[s_k] < 7) begin s = 1; sh = (m_res[s_k] != 0) && ($urandom_range(0, 2) == 0); end
      end
      keys.delete();
      foreach (m_vc[k]) if (m_cnt[k] > 0) keys.push_back(k);
      if (keys.size() > 0 && $urandom_range(0, 1)) begin
        c_k = keys[$urandom_range(0, keys.size() - 1)];
        c = 1;
      end
      alloc = a; alloc_vc = 3'(a_vc);
      snd = s; snd_flow = fl(s_k); snd_tail = sh;
      cr = c; cr_flow = fl(c_k);
      #1;
      if (c) chk(cr_hit && int'(cr_vc) == m_vc[c_k], "credit VC");
      if (freed) freed_seen++;
      @(posedge clk);
      model_step(a_k, a, a_vc, s_k, s, sh, c_k, c);
    end
    chk(full_seen > 0, "table became full at least once");
    chk(freed_seen > 0, "entries were released");
    $display("full cycles %0d, releases %0d", full_seen, freed_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
