// edvca_out_port: exclusive dynamic VC allocation and credit tracking for
// the VCs behind one output link.
//
// Owns, for each next-hop VC, a credit counter (free slots, VC_DEPTH at
// reset) and an "owned" bit (a packet has been granted the VC and its tail
// flit has not been sent yet), plus the per-flow table (edvca_flow_table).
// A VC is available when it is not owned and has at least one credit.
//
// VC allocation, one request per cycle (va_req_i with the packet's flow):
//   * the table knows the flow: grant its VC if available, else stall
//     (behaves like a static allocation of the flow to that VC);
//   * the flow is unknown: grant the next available VC, searching from a
//     rotating pointer (behaves like dynamic allocation); stall if no VC is
//     available or the table has no free entry.
// The grant is combinational (va_gnt_o, va_vc_o); the VC becomes owned at
// the clock edge. A small multiplexer picks between the table's VC and the
// dynamic choice, as in the published EDVCA scheme.
//
// snd_i reports a flit leaving on the link to VC snd_vc_i: its credit count
// drops and the flow's table count rises; a tail releases ownership.
// Credit updates arrive as flow IDs (cr_i); the VC is read from the table
// and its credit count rises. cr_ok_o tells the switch allocator which VCs
// have a free slot. evt_o flags this cycle's allocation outcome.
//
// The rotating search pointer and the availability rule (not owned and at
// least one free slot) are this design's choices.
module edvca_out_port
  import noc_pkg::*;
#(
  parameter int NUM_VC   = 8,
  parameter int VC_DEPTH = 8,
  parameter int ENTRIES  = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // VC allocation
  input  logic              va_req_i,
  input  flow_t             va_flow_i,
  output logic              va_gnt_o,
  output vc_id_t            va_vc_o,
  // flit sent on the link
  input  logic              snd_i,
  input  vc_id_t            snd_vc_i,
  input  flit_t             snd_flit_i,
  // credit update from downstream
  input  credit_t           cr_i,
  output logic [NUM_VC-1:0] cr_ok_o,
  output va_evt_t           evt_o
);
  localparam int CW = $clog2(VC_DEPTH + 1);

  logic [CW-1:0]     credits [NUM_VC];
  logic [NUM_VC-1:0] owned;
  logic [NUM_VC-1:0] avail;
  vc_id_t            ptr;

  logic   lk_hit, full, cr_hit, freed;
  vc_id_t lk_vc, cr_vc;

  edvca_flow_table #(.ENTRIES(ENTRIES), .VC_DEPTH(VC_DEPTH)) u_table (
    .clk, .rst_n,
    .lk_flow_i (va_flow_i),
    .lk_hit_o  (lk_hit),
    .lk_vc_o   (lk_vc),
    .full_o    (full),
    .alloc_i   (va_gnt_o),
    .alloc_vc_i(va_vc_o),
    .snd_i     (snd_i),
    .snd_flow_i(snd_flit_i.flow),
    .snd_tail_i(snd_flit_i.tail),
    .cr_i      (cr_i.valid),
    .cr_flow_i (cr_i.flow),
    .cr_hit_o  (cr_hit),
    .cr_vc_o   (cr_vc),
    .freed_o   (freed)
  );

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      avail[v]   = !owned[v] && (credits[v] != '0);
      cr_ok_o[v] = (credits[v] != '0);
    end
  end

  // dynamic choice: first available VC at or after the pointer
  logic   dyn_found;
  vc_id_t dyn_vc;
  always_comb begin
    dyn_found = 1'b0;
    dyn_vc    = '0;
    for (int k = 0; k < NUM_VC; k++) begin
      if (!dyn_found && avail[(int'(ptr) + k) % NUM_VC]) begin
        dyn_found = 1'b1;
        dyn_vc    = VC_W'((int'(ptr) + k) % NUM_VC);
      end
    end
  end

  always_comb begin
    evt_o       = '0;
    evt_o.entry_freed = freed;
    va_gnt_o    = 1'b0;
    va_vc_o     = lk_hit ? lk_vc : dyn_vc;
    if (va_req_i) begin
      if (lk_hit) begin
        va_gnt_o        = avail[lk_vc];
        evt_o.grant_hit = avail[lk_vc];
        evt_o.stall_hit = !avail[lk_vc];
      end else if (!dyn_found) begin
        evt_o.stall_novc = 1'b1;
      end else if (full) begin
        evt_o.stall_full = 1'b1;
      end else begin
        va_gnt_o         = 1'b1;
        evt_o.grant_miss = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) credits[v] <= CW'(VC_DEPTH);
      owned <= '0;
      ptr   <= '0;
    end else begin
      for (int v = 0; v < NUM_VC; v++) begin
        credits[v] <= credits[v]
                      - CW'(snd_i && snd_vc_i == VC_W'(v))
                      + CW'(cr_i.valid && cr_hit && cr_vc == VC_W'(v));
        if (va_gnt_o && va_vc_o == VC_W'(v))                     owned[v] <= 1'b1;
        else if (snd_i && snd_flit_i.tail && snd_vc_i == VC_W'(v)) owned[v] <= 1'b0;
      end
      if (va_gnt_o && !lk_hit) ptr <= (int'(va_vc_o) == NUM_VC-1) ? '0 : va_vc_o + 1'b1;
    end
  end

  a_send_credit: assert property (@(posedge clk) disable iff (!rst_n) snd_i |-> cr_ok_o[snd_vc_i]);
  a_send_owned:  assert property (@(posedge clk) disable iff (!rst_n) snd_i |-> owned[snd_vc_i]);
endmodule
