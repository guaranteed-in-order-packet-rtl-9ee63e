// tb_edvca_out_port: directed checks of the exclusive allocation rules and
// the flow-ID credit path for one output with 2 next-hop VCs of 4 flits and
// a 2-entry flow table:
//   * an unknown flow gets the next available VC (dynamic behaviour);
//   * a known flow gets its own VC back, even when another VC is free;
//   * a known flow whose VC is owned or full stalls (static behaviour);
//   * an unknown flow stalls when no VC is available or the table is full;
//   * credits named by flow ID restore the right VC's free slots, and the
//     flow is forgotten when its last flit has been forwarded.
module tb_edvca_out_port;
  import noc_pkg::*;
  localparam int NUM_VC = 2, VC_DEPTH = 4, ENTRIES = 2;
  logic clk = 0, rst_n = 0;
  logic va_req, va_gnt, snd;
  flow_t va_flow;
  vc_id_t va_vc, snd_vc;
  flit_t snd_flit;
  credit_t cr;
  logic [NUM_VC-1:0] cr_ok;
  va_evt_t evt;
  int checks = 0, failures = 0;

  edvca_out_port #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .ENTRIES(ENTRIES)) dut (
    .clk, .rst_n, .va_req_i(va_req), .va_flow_i(va_flow), .va_gnt_o(va_gnt), .va_vc_o(va_vc),
    .snd_i(snd), .snd_vc_i(snd_vc), .snd_flit_i(snd_flit), .cr_i(cr), .cr_ok_o(cr_ok), .evt_o(evt));
  always #5 clk = ~clk;

  function automatic flow_t fl(input int k);
    flow_t f;
    f = '0; f.src.x = 3'(k); f.dst.y = 3'(k);
    return f;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle();
    va_req = 0; snd = 0; cr = '0; snd_flit = '0; snd_vc = '0;
  endtask

  // request a VC for flow k; check grant / VC / event; the grant takes effect
  task automatic request(input int k, input bit exp_gnt, input int exp_vc, input string exp_evt);
    @(negedge clk); idle(); va_req = 1; va_flow = fl(k); #1;
    chk(va_gnt == exp_gnt, $sformatf("grant for flow %0d (%s)", k, exp_evt));
    if (exp_gnt) chk(int'(va_vc) == exp_vc, $sformatf("VC for flow %0d", k));
    case (exp_evt)
      "hit":   chk(evt.grant_hit,  "event grant_hit");
      "miss":  chk(evt.grant_miss, "event grant_miss");
      "shit":  chk(evt.stall_hit,  "event stall_hit");
      "novc":  chk(evt.stall_novc, "event stall_novc");
      "full":  chk(evt.stall_full, "event stall_full");
      default: ;
    endcase
    @(posedge clk); #1 idle();
  endtask

  task automatic send(input int k, input int vc, input bit head, input bit tail);
    @(negedge clk); idle(); snd = 1; snd_vc = 3'(vc);
    snd_flit.flow = fl(k); snd_flit.head = head; snd_flit.tail = tail;
    @(posedge clk); #1 idle();
  endtask

  task automatic credit(input int k);
    @(negedge clk); idle(); cr.valid = 1; cr.flow = fl(k);
    @(posedge clk); #1 idle();
  endtask

  initial begin
    idle(); va_flow = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); chk(cr_ok == 2'b11, "all VCs have credits after reset");
    // flow A: unknown -> VC 0, two-flit packet
    request(1, 1, 0, "miss");
    send(1, 0, 1, 0); send(1, 0, 0, 1);
    // flow A again: VC 1 is free too, but A must go back to VC 0
    request(1, 1, 0, "hit");
    send(1, 0, 1, 0);
    // VC 0 owned by A's second packet: a third A packet stalls
    request(1, 0, 0, "shit");
    // flow B: unknown -> VC 1 (next available)
    request(2, 1, 1, "miss");
    // both VCs owned: unknown flow C stalls for lack of a VC
    request(3, 0, 0, "novc");
    send(1, 0, 0, 1);              // A's packet done: VC 0 not owned, no slot left
    send(2, 1, 1, 1);              // B single-flit packet done: VC 1 free
    // table holds A and B: unknown flow C stalls on a full table
    request(3, 0, 0, "full");
    // A has sent four flits into VC 0: it is full, so A waits although
    // VC 1 is free
    @(negedge clk); chk(cr_ok == 2'b10, "VC 0 out of credits, VC 1 has credits");
    request(1, 0, 0, "shit");
    // credits by flow ID: B's one flit leaves VC 1 -> B forgotten
    credit(2);
    @(negedge clk); idle(); va_req = 1; va_flow = fl(3); #1;
    chk(va_gnt && va_vc == 3'd1, "C gets VC 1 once B's entry is released");
    @(posedge clk);
    send(3, 1, 1, 1);
    // A's four flits forwarded: VC 0 credits return one by one
    for (int i = 0; i < 4; i++) begin
      credit(1);
      @(negedge clk); chk(cr_ok[0], "VC 0 credit returned");
    end
    // A now unknown; VC 0 is available and is the next one after VC 1
    request(1, 1, 0, "miss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
