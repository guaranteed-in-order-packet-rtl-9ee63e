// edvca_ni: network interface between a core and its router's local port.
//
// Injection: the core offers a packet as a stream of flits (inj_valid_i,
// inj_flit_i, inj_ready_o; head first, tail last, contiguous). The
// interface allocates a VC of the router's local input port to each packet
// with the same exclusive rule the routers use (edvca_out_port): a flow
// that still has flits in a local-input VC must use that VC. Once granted,
// one flit is sent per cycle while that VC has a free slot. Credits with
// flow IDs come back from the router's local input port on credit_i.
// Timing: the head flit waits one cycle for its VC grant; inj_ready_o is
// combinational and the link output is registered.
//
// Ejection: flits leaving the router's local output (link_i) are delivered
// to the core on ej_o one cycle later, and a credit with the flit's flow ID
// is returned to the router in the same cycle. The core must accept every
// ejected flit; this design's choice, since the scheme's evaluation measures delivery
// at the destination and describes no ejection back-pressure.
module edvca_ni
  import noc_pkg::*;
#(
  parameter int NUM_VC   = 8,
  parameter int VC_DEPTH = 8,
  parameter int ENTRIES  = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  // core injection
  input  logic    inj_valid_i,
  input  flit_t   inj_flit_i,
  output logic    inj_ready_o,
  // to / from the router's local input port
  output link_t   link_o,
  input  credit_t credit_i,
  // from / to the router's local output port
  input  link_t   link_i,
  output credit_t credit_o,
  // core ejection
  output link_t   ej_o,
  output va_evt_t evt_o
);
  logic              active;
  vc_id_t            cur_vc;
  logic              va_gnt;
  vc_id_t            va_vc;
  logic [NUM_VC-1:0] cr_ok;
  logic              snd;

  edvca_out_port #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .ENTRIES(ENTRIES)) u_alloc (
    .clk, .rst_n,
    .va_req_i  (inj_valid_i && inj_flit_i.head && !active),
    .va_flow_i (inj_flit_i.flow),
    .va_gnt_o  (va_gnt),
    .va_vc_o   (va_vc),
    .snd_i     (snd),
    .snd_vc_i  (cur_vc),
    .snd_flit_i(inj_flit_i),
    .cr_i      (credit_i),
    .cr_ok_o   (cr_ok),
    .evt_o     (evt_o)
  );

  assign snd         = active && inj_valid_i && cr_ok[cur_vc];
  assign inj_ready_o = snd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      cur_vc   <= '0;
      link_o   <= '0;
      ej_o     <= '0;
      credit_o <= '0;
    end else begin
      if (va_gnt) begin
        active <= 1'b1;
        cur_vc <= va_vc;
      end else if (snd && inj_flit_i.tail) begin
        active <= 1'b0;
      end
      link_o.valid <= snd;
      link_o.vc    <= cur_vc;
      link_o.flit  <= inj_flit_i;
      ej_o           <= link_i;
      credit_o.valid <= link_i.valid;
      credit_o.flow  <= link_i.flit.flow;
    end
  end

  a_stream_starts_with_head: assert property (@(posedge clk) disable iff (!rst_n)
    (inj_valid_i && !active) |-> inj_flit_i.head);
endmodule
