// tb_pe_data_ram: self-checking test of the PE data RAM in both builds.
//
// dut   64 words, asynchronous reads (LUT RAM build).  Fills the RAM, then
//       mixes random writes with reads on all three read ports and compares
//       against a shadow array.  Checks that a write becomes visible on the
//       read ports only after the clock edge.
// dut_s 1024 words, registered reads (block RAM build, chosen by the depth).
//       Random writes, read enables and addresses.  After each edge, ports
//       a and b must hold the word read at that edge when re was high (old
//       word on a same-address write) and keep their value when re was low;
//       port c is registered on every edge.
module tb_pe_data_ram;
  localparam int DEPTH = 64, DEPTH_S = 1024;
  logic        clk = 1'b0;
  logic        we, we_s, re_s;
  logic [5:0]  waddr, ra, rb, rc;
  logic [9:0]  waddr_s, ra_s, rb_s, rc_s;
  logic [31:0] wdata, qa, qb, qc;
  logic [31:0] wdata_s, qa_s, qb_s, qc_s;
  logic [31:0] shadow [DEPTH];
  logic [31:0] shadow_s [DEPTH_S];
  logic [31:0] exp_a, exp_b, exp_c;
  int          checks = 0, failures = 0;

  pe_data_ram #(.DW(32), .DEPTH(DEPTH)) dut (
    .clk, .we, .waddr, .wdata, .re(1'b0),
    .raddr_a(ra), .rdata_a(qa), .raddr_b(rb), .rdata_b(qb),
    .raddr_c(rc), .rdata_c(qc)
  );

  pe_data_ram #(.DW(32), .DEPTH(DEPTH_S)) dut_s (
    .clk, .we(we_s), .waddr(waddr_s), .wdata(wdata_s), .re(re_s),
    .raddr_a(ra_s), .rdata_a(qa_s), .raddr_b(rb_s), .rdata_b(qb_s),
    .raddr_c(rc_s), .rdata_c(qc_s)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; ra = 0; rb = 0; rc = 0;
    we_s = 0; re_s = 0; waddr_s = 0; wdata_s = 0; ra_s = 0; rb_s = 0; rc_s = 0;

    // ---- asynchronous build ----
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 6'($urandom); wdata = $urandom;
      ra = 6'($urandom); rb = 6'($urandom); rc = waddr;
      #1;
      check("read a", qa, shadow[ra]);
      check("read b", qb, shadow[rb]);
      check("old word before edge", qc, shadow[rc]);
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      check("new word after edge", qc, shadow[rc]);
    end

    // ---- registered-read build ----
    for (int i = 0; i < DEPTH_S; i++) begin
      @(negedge clk);
      we_s = 1; waddr_s = 10'(i); wdata_s = $urandom; shadow_s[i] = wdata_s;
    end
    @(negedge clk); we_s = 0;
    @(posedge clk); #1;
    exp_a = qa_s; exp_b = qb_s;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we_s = 1'($urandom); re_s = 1'($urandom);
      ra_s = 10'($urandom); rb_s = 10'($urandom); rc_s = 10'($urandom);
      // aim the write at a read address now and then
      case ($urandom_range(3))
        0:       waddr_s = ra_s;
        1:       waddr_s = rc_s;
        default: waddr_s = 10'($urandom);
      endcase
      wdata_s = $urandom;
      check("sync a holds between edges", qa_s, exp_a);
      check("sync b holds between edges", qb_s, exp_b);
      if (re_s) begin
        exp_a = shadow_s[ra_s];
        exp_b = shadow_s[rb_s];
      end
      exp_c = shadow_s[rc_s];
      @(posedge clk);
      if (we_s) shadow_s[waddr_s] = wdata_s;
      #1;
      check("sync read a", qa_s, exp_a);
      check("sync read b", qb_s, exp_b);
      check("sync read c", qc_s, exp_c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
