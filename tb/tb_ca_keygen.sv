// tb_ca_keygen: checks the 4-cell hybrid rule 150/90 cellular automaton.
//  - reset value 0001
//  - every step against the reference next-state model, with random
//    step enables (state must hold when step is low)
//  - load of every non-zero seed, then the cycle length: 7 steps return
//    to the seed and no earlier step does, except for 1101 (cells 4..1),
//    which the default rules map onto itself
//  - load has priority over step
module tb_ca_keygen;
  import tb_rlgcd_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [3:0] seed = '0, state, model;
  int checks = 0, failures = 0;

  ca_keygen dut (.clk, .rst_n, .load, .seed, .step, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] exp, input string what);
    checks++;
    if (state !== exp) begin
      failures++;
      $display("FAIL %s: state=%b exp=%b", what, state, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(4'b0001, "reset");
    rst_n = 1'b1;
    model = 4'b0001;
    // random stepping
    for (int i = 0; i < 200; i++) begin
      step = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (step) model = ref_ca_next(model);
      #1 check(model, "step");
    end
    // cycle length from every non-zero seed
    for (int sd = 1; sd < 16; sd++) begin
      automatic int len = 0;
      load = 1'b1; seed = 4'(sd); step = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      check(4'(sd), "load");
      do begin
        @(posedge clk); #1;
        len++;
      end while (state != 4'(sd) && len < 20);
      checks++;
      if (len != ((sd == 4'b1101) ? 1 : 7)) begin
        failures++;
        $display("FAIL seed %b: cycle length %0d", 4'(sd), len);
      end
    end
    // all-zero state is a fixed point
    load = 1'b1; seed = 4'b0000; @(posedge clk); #1 load = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(4'b0000, "zero fixed point");
    step = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
