// edvca_mesh: MESH_X x MESH_Y 2D mesh of EDVCA routers, each with its
// network interface; the top of the design.
//
// Node n = y*MESH_X + x sits at column x, row y. Every router (edvca_router)
// links to its four neighbours: its EAST output feeds the WEST input of the
// node to its right and that input's credits flow back, and likewise for
// WEST/EAST and NORTH (row y-1) / SOUTH (row y+1). Ports facing the mesh
// edge carry no traffic under XY routing and are tied off. Each router's
// LOCAL port connects to an edvca_ni, which injects the core's packets
// (inj_*) and ejects delivered flits (ej_o). Because every hop, including
// injection, allocates VCs exclusively per flow and XY routing sends a flow
// along one fixed path, the packets of a flow are delivered in the order
// they were injected. evt_o reports each router's per-output VC allocation
// events and ni_evt_o the injection allocation events.
//
// Defaults follow the evaluated configuration: an 8 x 8 mesh, 8 VCs of 8
// flits per port; the flow table holds NUM_VC x VC_DEPTH entries, the most
// flows that can be buffered at one ingress, so it never fills.
module edvca_mesh
  import noc_pkg::*;
#(
  parameter int MESH_X   = 8,
  parameter int MESH_Y   = 8,
  parameter int NUM_VC   = 8,
  parameter int VC_DEPTH = 8,
  parameter int ENTRIES  = NUM_VC * VC_DEPTH
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic    [MESH_X*MESH_Y-1:0]             inj_valid_i,
  input  flit_t   [MESH_X*MESH_Y-1:0]             inj_flit_i,
  output logic    [MESH_X*MESH_Y-1:0]             inj_ready_o,
  output link_t   [MESH_X*MESH_Y-1:0]             ej_o,
  output va_evt_t [MESH_X*MESH_Y-1:0][NPORTS-1:0] evt_o,
  output va_evt_t [MESH_X*MESH_Y-1:0]             ni_evt_o
);
  localparam int N = MESH_X * MESH_Y;

  link_t   [N-1:0][NPORTS-1:0] r_link_in, r_link_out;
  credit_t [N-1:0][NPORTS-1:0] r_cr_in, r_cr_out;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int n = y * MESH_X + x;

      edvca_router #(.X(x), .Y(y), .NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .ENTRIES(ENTRIES)) u_router (
        .clk, .rst_n,
        .link_i  (r_link_in[n]),
        .credit_o(r_cr_out[n]),
        .link_o  (r_link_out[n]),
        .credit_i(r_cr_in[n]),
        .evt_o   (evt_o[n])
      );

      edvca_ni #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .ENTRIES(ENTRIES)) u_ni (
        .clk, .rst_n,
        .inj_valid_i(inj_valid_i[n]),
        .inj_flit_i (inj_flit_i[n]),
        .inj_ready_o(inj_ready_o[n]),
        .link_o     (r_link_in[n][P_LOCAL]),
        .credit_i   (r_cr_out[n][P_LOCAL]),
        .link_i     (r_link_out[n][P_LOCAL]),
        .credit_o   (r_cr_in[n][P_LOCAL]),
        .ej_o       (ej_o[n]),
        .evt_o      (ni_evt_o[n])
      );

      if (x < MESH_X - 1) begin : g_east
        assign r_link_in[n][P_EAST] = r_link_out[n+1][P_WEST];
        assign r_cr_in[n][P_EAST]   = r_cr_out[n+1][P_WEST];
      end else begin : g_east_edge
        assign r_link_in[n][P_EAST] = '0;
        assign r_cr_in[n][P_EAST]   = '0;
      end
      if (x > 0) begin : g_west
        assign r_link_in[n][P_WEST] = r_link_out[n-1][P_EAST];
        assign r_cr_in[n][P_WEST]   = r_cr_out[n-1][P_EAST];
      end else begin : g_west_edge
        assign r_link_in[n][P_WEST] = '0;
        assign r_cr_in[n][P_WEST]   = '0;
      end
      if (y > 0) begin : g_north
        assign r_link_in[n][P_NORTH] = r_link_out[n-MESH_X][P_SOUTH];
        assign r_cr_in[n][P_NORTH]   = r_cr_out[n-MESH_X][P_SOUTH];
      end else begin : g_north_edge
        assign r_link_in[n][P_NORTH] = '0;
        assign r_cr_in[n][P_NORTH]   = '0;
      end
      if (y < MESH_Y - 1) begin : g_south
        assign r_link_in[n][P_SOUTH] = r_link_out[n+MESH_X][P_NORTH];
        assign r_cr_in[n][P_SOUTH]   = r_cr_out[n+MESH_X][P_NORTH];
      end else begin : g_south_edge
        assign r_link_in[n][P_SOUTH] = '0;
        assign r_cr_in[n][P_SOUTH]   = '0;
      end
    end
  end
endmodule
