// edvca_router: five-port ingress-queued wormhole virtual-channel router
// with exclusive dynamic VC allocation (EDVCA) and XY routing.
//
// Ports are LOCAL, NORTH, EAST, SOUTH, WEST (noc_pkg::port_e). Each input
// port (input_port) buffers arriving flits in NUM_VC VCs of VC_DEPTH flits
// and computes the XY route of each head flit. Per cycle:
//   * VC allocation: for each output, a round-robin arbiter picks one of the
//     input VCs whose head flit wants that output, and the output's
//     edvca_out_port decides, from its per-flow table, whether that packet
//     may have a next-hop VC and which one. A packet of a flow that already
//     has flits in a next-hop VC may only use that VC, so a flow never
//     occupies two VCs of the next ingress at once.
//   * switch allocation and traversal: input VCs holding a flit with a free
//     slot in their next-hop VC compete in switch_allocator; winners cross
//     the crossbar into the output link register (one flit per input and per
//     output per cycle). Sending updates credits and the flow table.
//   * credits: every flit leaving an input VC sends its flow ID upstream;
//     credits arriving on credit_i[o] are mapped to a VC by output o's table.
// Timing: a head flit needs one cycle for RC+VA and one for SA+ST; a body
// flit at the front of an active VC leaves in the cycle it is there. The
// link register adds one cycle, so a flit that does not wait takes two
// cycles per hop (head flits three). Outputs towards a missing neighbour are
// never requested under XY routing; their credit inputs may be tied low.
//
// Link width (one flit per cycle), the pipeline split and the arbiters are
// this design's choices; the allocation rules and the flow-ID credit
// update follow the published EDVCA scheme.
module edvca_router
  import noc_pkg::*;
#(
  parameter int X        = 0,
  parameter int Y        = 0,
  parameter int NUM_VC   = 8,
  parameter int VC_DEPTH = 8,
  parameter int ENTRIES  = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  link_t   [NPORTS-1:0]    link_i,
  output credit_t [NPORTS-1:0]    credit_o,
  output link_t   [NPORTS-1:0]    link_o,
  input  credit_t [NPORTS-1:0]    credit_i,
  output va_evt_t [NPORTS-1:0]    evt_o
);
  localparam int NREQ = NPORTS * NUM_VC;
  localparam int RW   = $clog2(NREQ);

  coord_t here;
  assign here.x = COORD_W'(X);
  assign here.y = COORD_W'(Y);

  logic   [NPORTS-1:0][NUM_VC-1:0] va_req, va_gnt, sa_req, sa_gnt, elig;
  port_e  [NPORTS-1:0][NUM_VC-1:0] va_port, sa_port;
  vc_id_t [NPORTS-1:0][NUM_VC-1:0] va_vc, sa_vc;
  flit_t  [NPORTS-1:0][NUM_VC-1:0] front;
  logic   [NPORTS-1:0][NUM_VC-1:0] cr_ok;      // [output][vc]

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    input_port #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH)) u_in (
      .clk, .rst_n,
      .here_i   (here),
      .link_i   (link_i[p]),
      .credit_o (credit_o[p]),
      .va_req_o (va_req[p]),
      .va_port_o(va_port[p]),
      .front_o  (front[p]),
      .va_gnt_i (va_gnt[p]),
      .va_vc_i  (va_vc[p]),
      .sa_req_o (sa_req[p]),
      .sa_port_o(sa_port[p]),
      .sa_vc_o  (sa_vc[p]),
      .sa_gnt_i (sa_gnt[p])
    );
  end

  // ---------------- VC allocation: one request per output per cycle
  logic [NPORTS-1:0][NREQ-1:0] va_out_req;
  logic [NPORTS-1:0][RW-1:0]   va_out_idx;
  logic [NPORTS-1:0]           va_out_valid, va_out_gnt;
  vc_id_t [NPORTS-1:0]         va_out_vc;

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int p = 0; p < NPORTS; p++)
        for (int v = 0; v < NUM_VC; v++)
          va_out_req[o][p*NUM_VC+v] = va_req[p][v] && (va_port[p][v] == port_e'(o));
  end

  // ---------------- switch allocation and traversal
  logic [NPORTS-1:0]      sw_valid;
  logic [NPORTS-1:0][2:0] sw_in;
  logic [NPORTS-1:0]      snd;
  vc_id_t [NPORTS-1:0]    snd_vc;
  flit_t  [NPORTS-1:0]    snd_flit;

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    logic [NREQ-1:0] g_unused;
    rr_arbiter #(.N(NREQ)) u_va_arb (
      .clk, .rst_n,
      .req_i    (va_out_req[o]),
      .advance_i(1'b1),
      .gnt_o    (g_unused),
      .idx_o    (va_out_idx[o]),
      .valid_o  (va_out_valid[o])
    );

    edvca_out_port #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .ENTRIES(ENTRIES)) u_out (
      .clk, .rst_n,
      .va_req_i  (va_out_valid[o]),
      .va_flow_i (front[int'(va_out_idx[o]) / NUM_VC][int'(va_out_idx[o]) % NUM_VC].flow),
      .va_gnt_o  (va_out_gnt[o]),
      .va_vc_o   (va_out_vc[o]),
      .snd_i     (snd[o]),
      .snd_vc_i  (snd_vc[o]),
      .snd_flit_i(snd_flit[o]),
      .cr_i      (credit_i[o]),
      .cr_ok_o   (cr_ok[o]),
      .evt_o     (evt_o[o])
    );
  end

  always_comb begin
    va_gnt = '0;
    va_vc  = '0;
    for (int o = 0; o < NPORTS; o++) begin
      if (va_out_gnt[o]) begin
        va_gnt[int'(va_out_idx[o]) / NUM_VC][int'(va_out_idx[o]) % NUM_VC] = 1'b1;
        va_vc [int'(va_out_idx[o]) / NUM_VC][int'(va_out_idx[o]) % NUM_VC] = va_out_vc[o];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NUM_VC; v++)
        elig[p][v] = sa_req[p][v] && cr_ok[sa_port[p][v]][sa_vc[p][v]];
  end

  switch_allocator #(.NUM_VC(NUM_VC)) u_sa (
    .clk, .rst_n,
    .elig_i     (elig),
    .port_i     (sa_port),
    .gnt_o      (sa_gnt),
    .out_valid_o(sw_valid),
    .out_in_o   (sw_in)
  );

  // crossbar
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      snd[o]      = sw_valid[o];
      snd_vc[o]   = '0;
      snd_flit[o] = '0;
      for (int v = 0; v < NUM_VC; v++) begin
        if (sw_valid[o] && sa_gnt[sw_in[o]][v]) begin
          snd_vc[o]   = sa_vc[sw_in[o]][v];
          snd_flit[o] = front[sw_in[o]][v];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_o <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        link_o[o].valid <= snd[o];
        link_o[o].vc    <= snd_vc[o];
        link_o[o].flit  <= snd_flit[o];
      end
    end
  end
endmodule
