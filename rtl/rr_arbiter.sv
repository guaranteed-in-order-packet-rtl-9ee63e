// rr_arbiter: round-robin arbiter over N requesters.
//
// Grants the first requester at or after the priority pointer; the pointer
// moves past the winner when advance_i is high (so a grant that is not used
// does not cost the winner its turn). One-hot grant, combinational from the
// requests; the pointer is the only state.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_i,
  input  logic         advance_i,
  output logic [N-1:0] gnt_o,
  output logic [(N>1 ? $clog2(N) : 1)-1:0] idx_o,
  output logic         valid_o
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;

  always_comb begin
    gnt_o   = '0;
    idx_o   = '0;
    valid_o = 1'b0;
    for (int k = 0; k < N; k++) begin
      if (!valid_o && req_i[(int'(ptr) + k) % N]) begin
        valid_o                     = 1'b1;
        idx_o                       = IW'((int'(ptr) + k) % N);
        gnt_o[(int'(ptr) + k) % N]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance_i && valid_o) ptr <= (int'(idx_o) == N-1) ? '0 : idx_o + 1'b1;
  end
endmodule
