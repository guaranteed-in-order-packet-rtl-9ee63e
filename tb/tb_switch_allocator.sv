// tb_switch_allocator: random eligibility patterns for 5 inputs x 4 VCs.
// Checks every cycle that grants go only to eligible VCs, at most one per
// input and per output, that out_valid_o / out_in_o agree with the grants,
// and that some flit is granted whenever any VC is eligible. A fixed
// all-to-one-output pattern then checks that every input is served in turn
// (round-robin fairness: 5 grants in 5 cycles, one per input).
module tb_switch_allocator;
  import noc_pkg::*;
  localparam int NUM_VC = 4;
  logic clk = 0, rst_n = 0;
  logic  [NPORTS-1:0][NUM_VC-1:0] elig, gnt;
  port_e [NPORTS-1:0][NUM_VC-1:0] port;
  logic  [NPORTS-1:0] out_valid;
  logic  [NPORTS-1:0][2:0] out_in;
  int checks = 0, failures = 0;

  switch_allocator #(.NUM_VC(NUM_VC)) dut (.clk, .rst_n, .elig_i(elig), .port_i(port),
    .gnt_o(gnt), .out_valid_o(out_valid), .out_in_o(out_in));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_cycle();
    int per_out[NPORTS];
    foreach (per_out[o]) per_out[o] = 0;
    for (int p = 0; p < NPORTS; p++) begin
      chk($countones(gnt[p]) <= 1, "one grant per input");
      for (int v = 0; v < NUM_VC; v++) if (gnt[p][v]) begin
        chk(elig[p][v], "grant only to eligible VC");
        per_out[int'(port[p][v])]++;
        chk(out_valid[int'(port[p][v])] && int'(out_in[int'(port[p][v])]) == p, "output names its input");
      end
    end
    for (int o = 0; o < NPORTS; o++) begin
      chk(per_out[o] <= 1, "one grant per output");
      chk(out_valid[o] == (per_out[o] == 1), "out_valid matches grants");
    end
    chk((|elig) == (|gnt), "work conserving when any VC is eligible");
  endtask

  initial begin
    elig = '0; port = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) for (int v = 0; v < NUM_VC; v++) begin
        elig[p][v] = ($urandom_range(0, 2) == 0);
        port[p][v] = port_e'($urandom_range(0, 4));
      end
      #1 check_cycle();
    end
    // fairness: every input's VC 1 wants output EAST
    begin
      int served[NPORTS];
      foreach (served[p]) served[p] = 0;
      @(negedge clk);
      elig = '0;
      for (int p = 0; p < NPORTS; p++) begin elig[p][1] = 1; port[p][1] = P_EAST; end
      for (int c = 0; c < NPORTS; c++) begin
        @(negedge clk); #1;
        check_cycle();
        for (int p = 0; p < NPORTS; p++) if (gnt[p][1]) served[p]++;
      end
      foreach (served[p]) chk(served[p] == 1, $sformatf("input %0d served once in 5 cycles", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
