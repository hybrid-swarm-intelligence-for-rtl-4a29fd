// tb_oabc_fsm: drives the sequencer with done responses after random delays
// and checks the visited state sequence against the expected order, the
// start pulses, the iteration count and the restart from ST_DONE.
module tb_oabc_fsm;
  import oabc_pkg::*;
  localparam int MAX_ITER = 3;
  logic clk = 0, rst_n = 0, start = 0, glob_done = 0, prob_done = 0;
  oabc_state_t state;
  logic glob_start, prob_start, done;
  logic [15:0] iter;
  int checks = 0, failures = 0;
  oabc_state_t seen[$];
  int n_gs = 0, n_ps = 0;

  oabc_fsm #(.MAX_ITER(MAX_ITER)) dut (.clk, .rst_n, .start, .glob_done, .prob_done,
                                       .state, .glob_start, .prob_start, .done, .iter);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // responder: done pulses some cycles after each start pulse
  initial begin
    forever begin
      @(posedge clk);
      if (glob_start) begin
        n_gs++;
        fork begin
          repeat ($urandom_range(1, 6)) @(posedge clk);
          #1 glob_done = 1; @(posedge clk); #1 glob_done = 0;
        end join_none
      end
      if (prob_start) begin
        n_ps++;
        fork begin
          repeat ($urandom_range(1, 6)) @(posedge clk);
          #1 prob_done = 1; @(posedge clk); #1 prob_done = 0;
        end join_none
      end
    end
  end

  // record every state change
  always @(posedge clk)
    if (rst_n && (seen.size() == 0 || seen[$] != state)) seen.push_back(state);

  task automatic run_once(int run);
    oabc_state_t expq[$];
    int cyc;
    seen.delete();
    start = 1; @(posedge clk); #1 start = 0;
    cyc = 0;
    while (!done && cyc < 2000) begin @(posedge clk); #1 cyc++; end
    check(done, "done reached");
    @(posedge clk); #1;   // let the recorder see ST_DONE
    check(int'(iter) == MAX_ITER - 1, $sformatf("iter %0d", iter));
    expq.push_back(run == 0 ? ST_IDLE : ST_DONE);
    expq.push_back(ST_INIT);
    for (int i = 0; i < MAX_ITER; i++) begin
      expq.push_back(ST_EMPLOY); expq.push_back(ST_GLOBAL); expq.push_back(ST_PROB);
      expq.push_back(ST_ONLOOK); expq.push_back(ST_SCOUT);
    end
    expq.push_back(ST_FINAL); expq.push_back(ST_DONE);
    if (seen.size() != expq.size()) foreach (seen[i]) $display("%0d %s", i, seen[i].name());
    check(seen.size() == expq.size(), $sformatf("sequence length %0d/%0d", seen.size(), expq.size()));
    for (int i = 0; i < expq.size() && i < seen.size(); i++)
      check(seen[i] == expq[i], $sformatf("state %0d: %s vs %s", i, seen[i].name(), expq[i].name()));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check(state == ST_IDLE, "idle after reset");
    repeat (3) @(posedge clk);
    #1 check(state == ST_IDLE, "stays idle without start");
    run_once(0);
    repeat (4) @(posedge clk);
    #1 check(state == ST_DONE && done, "holds done");
    run_once(1);
    check(n_gs == 2 * (MAX_ITER + 1), $sformatf("glob_start pulses %0d", n_gs));
    check(n_ps == 2 * MAX_ITER, $sformatf("prob_start pulses %0d", n_ps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
