// tb_vc_fifo: random push/pop against a queue model. Checks the front flit,
// empty and full flags after every cycle, including simultaneous push and
// pop on a full buffer. Default depth (8 flits).
module tb_vc_fifo;
  import noc_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  flit_t din, front;
  flit_t q[$];
  int checks = 0, failures = 0, cyc = 0;

  vc_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push_i(push), .push_flit_i(din), .pop_i(pop),
                                .front_o(front), .empty_o(empty), .full_o(full));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) chk(front == q[0], "front");
      // bias: fill up in the first half of each 200-cycle window
      push = ((cyc % 200) < 100) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      pop  = ((cyc % 200) < 100) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      if (q.size() == DEPTH && !pop) push = 0;
      if (q.size() == 0) pop = 0;
      din = flit_t'({$urandom, $urandom});
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
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
