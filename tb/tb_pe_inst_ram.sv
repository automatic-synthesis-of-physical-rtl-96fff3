// tb_pe_inst_ram: self-checking test of the instruction RAM (1024 x 28).
// Loads a pseudo-random program, then reads it back in order and at random,
// checking that the word appears exactly one clock after its address, that
// the output holds while re is low, and that reset gives a zero (IDLE) word.
module tb_pe_inst_ram;
  localparam int DEPTH = 1024, W = 28;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          we, re;
  logic [9:0]    waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  shadow [DEPTH];
  int            checks = 0, failures = 0;

  pe_inst_ram #(.W(W), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .we, .waddr, .wdata, .re, .raddr, .rdata
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] held;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    #12 check("reset word", rdata, '0);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 10'(i); wdata = W'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); re = 1; raddr = 10'(i);
      #1 if (i > 0) check("not before edge", rdata, shadow[i-1]);
      @(posedge clk); #1 check("sequential read", rdata, shadow[i]);
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); re = 1'($urandom); raddr = 10'($urandom);
      held = rdata;
      @(posedge clk); #1
      check(re ? "random read" : "hold while re low", rdata, re ? shadow[raddr] : held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
