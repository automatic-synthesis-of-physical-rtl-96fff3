// tb_pe_pc: self-checking test of the PE program counter.  Runs several
// step lengths, checking that pc steps 0..step_len-1 and wraps, that last
// marks the final word of each step, and that dropping run returns pc to 0.
module tb_pe_pc;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        run;
  logic [10:0] step_len;
  logic [9:0]  pc;
  logic        fetch, last;
  int          checks = 0, failures = 0;

  pe_pc #(.DEPTH(1024)) dut (.clk, .rst_n, .run, .step_len, .pc, .fetch, .last);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    int lens[5] = '{1, 2, 19, 100, 1024};
    run = 0; step_len = 11'd19;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (lens[k]) begin
      @(negedge clk); run = 0; step_len = 11'(lens[k]);
      @(negedge clk);
      check("pc held at 0", pc, 0);
      run = 1;
      for (int c = 0; c < 3 * lens[k] + 1; c++) begin
        #1;
        check("pc", pc, c % lens[k]);
        check("last", last, (c % lens[k]) == lens[k] - 1);
        check("fetch", fetch, 1);
        @(negedge clk);
      end
    end
    run = 0;
    @(negedge clk);
    check("pc back to 0", pc, 0);
    check("no fetch", fetch, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
