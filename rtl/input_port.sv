// input_port: one ingress port of the router with NUM_VC VC buffers.
//
// Each flit arriving on link_i is written into the VC buffer named by the
// link's VC field. Every VC keeps the state of the packet at its front:
//   * idle: when the front flit is a head flit, route computation (XY) runs
//     on it and the VC requests a next-hop VC at the computed output
//     (va_req_o, va_port_o);
//   * active: after a VC grant (va_gnt_i, va_vc_i) the output port and
//     next-hop VC are cached, and the remaining flits of the packet reuse
//     them. The VC asks the switch allocator to forward its front flit
//     (sa_req_o) whenever it holds one; a grant (sa_gnt_i) pops it, and the
//     tail flit returns the VC to idle.
// For every popped flit a credit carrying the flit's flow ID is sent back
// upstream on credit_o, registered (one cycle after the pop).
//
// Timing: a flit written at edge t is at the front from t; its head may be
// granted a VC in that cycle and can be forwarded in the next one. The
// two-stage RC+VA / SA+ST split is this design's choice.
module input_port
  import noc_pkg::*;
#(
  parameter int NUM_VC   = 8,
  parameter int VC_DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  coord_t                   here_i,
  input  link_t                    link_i,
  output credit_t                  credit_o,
  // VC allocation
  output logic   [NUM_VC-1:0]      va_req_o,
  output port_e  [NUM_VC-1:0]      va_port_o,
  output flit_t  [NUM_VC-1:0]      front_o,
  input  logic   [NUM_VC-1:0]      va_gnt_i,
  input  vc_id_t [NUM_VC-1:0]      va_vc_i,
  // switch allocation
  output logic   [NUM_VC-1:0]      sa_req_o,
  output port_e  [NUM_VC-1:0]      sa_port_o,
  output vc_id_t [NUM_VC-1:0]      sa_vc_o,
  input  logic   [NUM_VC-1:0]      sa_gnt_i
);
  logic [NUM_VC-1:0] empty, full, active;
  port_e  [NUM_VC-1:0] out_port;
  vc_id_t [NUM_VC-1:0] out_vc;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    vc_fifo #(.DEPTH(VC_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push_i     (link_i.valid && link_i.vc == VC_W'(v)),
      .push_flit_i(link_i.flit),
      .pop_i      (sa_gnt_i[v]),
      .front_o    (front_o[v]),
      .empty_o    (empty[v]),
      .full_o     (full[v])
    );

    xy_route u_rc (
      .here_i(here_i),
      .dst_i (front_o[v].flow.dst),
      .port_o(va_port_o[v])
    );

    assign va_req_o[v]  = !active[v] && !empty[v] && front_o[v].head;
    assign sa_req_o[v]  = active[v] && !empty[v];
    assign sa_port_o[v] = out_port[v];
    assign sa_vc_o[v]   = out_vc[v];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        active[v]   <= 1'b0;
        out_port[v] <= P_LOCAL;
        out_vc[v]   <= '0;
      end else if (va_gnt_i[v]) begin
        active[v]   <= 1'b1;
        out_port[v] <= va_port_o[v];
        out_vc[v]   <= va_vc_i[v];
      end else if (sa_gnt_i[v] && front_o[v].tail) begin
        active[v]   <= 1'b0;
      end
    end

    a_gnt_needs_req: assert property (@(posedge clk) disable iff (!rst_n) va_gnt_i[v] |-> va_req_o[v]);
    a_pop_needs_req: assert property (@(posedge clk) disable iff (!rst_n) sa_gnt_i[v] |-> sa_req_o[v]);
  end

  // at most one flit leaves the port per cycle; return its credit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit_o <= '0;
    end else begin
      credit_o.valid <= |sa_gnt_i;
      credit_o.flow  <= '0;
      for (int v = 0; v < NUM_VC; v++)
        if (sa_gnt_i[v]) credit_o.flow <= front_o[v].flow;
    end
  end

  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sa_gnt_i));
  a_body_follows_head: assert property (@(posedge clk) disable iff (!rst_n)
    (link_i.valid) |-> (int'(link_i.vc) < NUM_VC));
endmodule
