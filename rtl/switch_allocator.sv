// switch_allocator: separable input-first switch allocation for the
// NPORTS x NPORTS crossbar.
//
// elig_i[p][v] says that VC v of input p holds a flit whose next-hop VC has
// a free slot, and port_i[p][v] is the output it goes to. Stage one picks,
// per input, one eligible VC with a round-robin arbiter; stage two picks,
// per output, one of the inputs whose chosen VC wants it, again round-robin.
// A winning input VC gets gnt_o[p][v]; per output, out_valid_o and
// out_in_o name the input that drives it. At most one flit leaves each
// input and enters each output per cycle. Arbiter pointers advance only on
// a final grant. Combinational from its inputs apart from the pointers.
//
// The simulator used to evaluate EDVCA visits VCs in random order and matches greedily;
// round-robin arbitration here is this design's choice.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int NUM_VC = 8
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic  [NPORTS-1:0][NUM_VC-1:0]       elig_i,
  input  port_e [NPORTS-1:0][NUM_VC-1:0]       port_i,
  output logic  [NPORTS-1:0][NUM_VC-1:0]       gnt_o,
  output logic  [NPORTS-1:0]                   out_valid_o,
  output logic  [NPORTS-1:0][2:0]              out_in_o
);
  localparam int VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  logic [NPORTS-1:0]             in_has;
  logic [NPORTS-1:0][VW-1:0]     in_vc;
  logic [NPORTS-1:0]             in_won;
  logic [NPORTS-1:0][NPORTS-1:0] out_req;   // [output][input]
  logic [NPORTS-1:0][NPORTS-1:0] out_gnt;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    logic [NUM_VC-1:0] g_unused;
    rr_arbiter #(.N(NUM_VC)) u_arb (
      .clk, .rst_n,
      .req_i    (elig_i[p]),
      .advance_i(in_won[p]),
      .gnt_o    (g_unused),
      .idx_o    (in_vc[p]),
      .valid_o  (in_has[p])
    );
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int p = 0; p < NPORTS; p++)
        out_req[o][p] = in_has[p] && (port_i[p][in_vc[p]] == port_e'(o));
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    logic [2:0] idx;
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n,
      .req_i    (out_req[o]),
      .advance_i(1'b1),
      .gnt_o    (out_gnt[o]),
      .idx_o    (idx),
      .valid_o  (out_valid_o[o])
    );
    assign out_in_o[o] = idx;
  end

  always_comb begin
    gnt_o = '0;
    for (int p = 0; p < NPORTS; p++) begin
      in_won[p] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (out_gnt[o][p]) in_won[p] = 1'b1;
      if (in_won[p]) gnt_o[p][in_vc[p]] = 1'b1;
    end
  end
endmodule
