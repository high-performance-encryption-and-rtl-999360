// tb_lfsr_keygen: checks the 4-bit XNOR LFSR (feedback from bits 2 and 4).
//  - reset value 0000
//  - every step against the reference next-state model, with random
//    step enables (state must hold when step is low)
//  - the 6-state cycle from reset: 0000 0001 0011 0110 1100 1000 (bit 4
//    on the left), then back to 0000
//  - load, and the all-ones lock-up state
module tb_lfsr_keygen;
  import tb_rlgcd_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [3:0] seed = '0, state, model;
  int checks = 0, failures = 0;
  logic [3:0] cyc [6] = '{4'b0000, 4'b0001, 4'b0011, 4'b0110, 4'b1100, 4'b1000};

  lfsr_keygen dut (.clk, .rst_n, .load, .seed, .step, .state);

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
    #1 check(4'b0000, "reset");
    rst_n = 1'b1;
    step = 1'b1;
    for (int i = 1; i <= 12; i++) begin
      @(posedge clk); #1 check(cyc[i % 6], "cycle");
    end
    model = state;
    for (int i = 0; i < 200; i++) begin
      step = 1'($urandom_range(0, 1));
      if (i % 37 == 0) begin
        load = 1'b1; seed = 4'($urandom_range(0, 14));
      end else begin
        load = 1'b0;
      end
      @(posedge clk);
      if (load) model = seed;
      else if (step) model = ref_lfsr_next(model);
      #1 check(model, "random step/load");
    end
    load = 1'b1; seed = 4'b1111; step = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(4'b1111, "lock-up state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
