// edvca_flow_table: per-flow table of the flits held in next-hop VCs.
//
// This is the structure that makes VC allocation exclusive. For one output
// port it records, per flow that currently has flits in a next-hop VC (or a
// packet granted a next-hop VC whose tail flit has not left yet), which VC
// that is and how many of the flow's flits are in it. It is a small
// content-addressable memory searched by flow ID on three ports at once:
//
//   lookup  (VC allocation)  lk_flow_i -> lk_hit_o / lk_vc_o, full_o
//   send    (switch traversal) a flit of snd_flow_i leaves: count + 1
//   credit  (credit update)  cr_flow_i -> cr_vc_o, count - 1
//
// alloc_i records a VC grant for lk_flow_i: on a miss it writes a new entry
// (VC alloc_vc_i, count 0) into the lowest free slot; on a hit it only marks
// the entry reserved. The reserved bit is cleared when the granted packet's
// tail flit is sent; it keeps the entry alive while the packet is still
// being sent even if the next hop has already forwarded all earlier flits
// and the count drops to zero. An entry is released in the cycle its count
// reaches zero with no reservation, and freed_o pulses. All updates to one
// entry in one cycle are combined. Lookups are combinational; state changes
// at the clock edge. Reset clears every entry.
//
// The table contents and the send/credit updates follow the EDVCA scheme's
// description of tracking remote VC contents; the reserved bit, the slot
// choice and the size default (NUM_VC x VC_DEPTH entries, enough that the
// table never fills) are this design's choices. A credit or a send for a flow
// that has no entry is a protocol error and is flagged by an assertion.
module edvca_flow_table
  import noc_pkg::*;
#(
  parameter int ENTRIES  = 64,
  parameter int VC_DEPTH = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  // lookup / allocate
  input  flow_t  lk_flow_i,
  output logic   lk_hit_o,
  output vc_id_t lk_vc_o,
  output logic   full_o,
  input  logic   alloc_i,
  input  vc_id_t alloc_vc_i,
  // flit sent to the next hop
  input  logic   snd_i,
  input  flow_t  snd_flow_i,
  input  logic   snd_tail_i,
  // credit update from the next hop
  input  logic   cr_i,
  input  flow_t  cr_flow_i,
  output logic   cr_hit_o,
  output vc_id_t cr_vc_o,
  // an entry was released this cycle
  output logic   freed_o
);
  localparam int CW = $clog2(VC_DEPTH + 1);
  localparam int IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef struct packed {
    logic          valid;
    logic          reserved;
    flow_t         flow;
    vc_id_t        vc;
    logic [CW-1:0] count;
  } entry_t;

  entry_t tbl [ENTRIES];

  logic [ENTRIES-1:0] lk_match, snd_match, cr_match;
  logic [IW-1:0]      lk_idx, free_idx;
  logic               have_free;

  always_comb begin
    lk_hit_o  = 1'b0;
    lk_vc_o   = '0;
    lk_idx    = '0;
    cr_hit_o  = 1'b0;
    cr_vc_o   = '0;
    have_free = 1'b0;
    free_idx  = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      lk_match[i]  = tbl[i].valid && (tbl[i].flow == lk_flow_i);
      snd_match[i] = tbl[i].valid && (tbl[i].flow == snd_flow_i) && snd_i;
      cr_match[i]  = tbl[i].valid && (tbl[i].flow == cr_flow_i) && cr_i;
      if (lk_match[i]) begin
        lk_hit_o = 1'b1;
        lk_vc_o  = tbl[i].vc;
        lk_idx   = IW'(i);
      end
      if (cr_match[i]) begin
        cr_hit_o = 1'b1;
        cr_vc_o  = tbl[i].vc;
      end
    end
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!tbl[i].valid) begin
        have_free = 1'b1;
        free_idx  = IW'(i);
      end
    end
    full_o = !have_free;
  end

  entry_t tbl_nx [ENTRIES];
  logic   freed_nx;

  always_comb begin
    freed_nx = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      tbl_nx[i] = tbl[i];
      if (tbl[i].valid) begin
        if (alloc_i && lk_hit_o && lk_idx == IW'(i)) tbl_nx[i].reserved = 1'b1;
        if (snd_match[i] && snd_tail_i)              tbl_nx[i].reserved = 1'b0;
        tbl_nx[i].count = tbl[i].count + CW'(snd_match[i]) - CW'(cr_match[i]);
        if (tbl_nx[i].count == '0 && !tbl_nx[i].reserved) begin
          tbl_nx[i].valid = 1'b0;
          freed_nx        = 1'b1;
        end
      end else if (alloc_i && !lk_hit_o && have_free && free_idx == IW'(i)) begin
        tbl_nx[i].valid    = 1'b1;
        tbl_nx[i].reserved = 1'b1;
        tbl_nx[i].flow     = lk_flow_i;
        tbl_nx[i].vc       = alloc_vc_i;
        tbl_nx[i].count    = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= tbl_nx[i];
    end
  end

  assign freed_o = freed_nx;

  a_send_known:   assert property (@(posedge clk) disable iff (!rst_n) snd_i |-> (|snd_match));
  a_credit_known: assert property (@(posedge clk) disable iff (!rst_n) cr_i |-> cr_hit_o);
  a_alloc_room:   assert property (@(posedge clk) disable iff (!rst_n) alloc_i |-> (lk_hit_o || have_free));
endmodule
