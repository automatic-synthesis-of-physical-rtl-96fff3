// tb_pe_input_mux: self-checking test of the PE input multiplexer in three
// sizes: 3 ports (default PE), 15 ports (the largest PE version) and 5 ports
// (not a described version; its select field has out-of-range codes, which
// must give zero).  Every select value is driven with random data and the
// expected word is picked here from the same random values.
module tb_pe_input_mux;
  logic              clk = 1'b0;
  logic [31:0]       d0, q, q15, q5;
  logic [15:1][31:0] din;
  logic [1:0]        sel;
  logic [3:0]        sel15;
  logic [2:0]        sel5;
  int                checks = 0, failures = 0;

  pe_input_mux #(.DW(32), .N_IN(3))  dut   (.d0, .din(din[3:1]), .sel, .q);
  pe_input_mux #(.DW(32), .N_IN(15)) dut15 (.d0, .din(din), .sel(sel15), .q(q15));
  pe_input_mux #(.DW(32), .N_IN(5))  dut5  (.d0, .din(din[5:1]), .sel(sel5), .q(q5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int s, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s sel=%0d q=%h exp=%h", what, s, got, exp);
    end
  endtask

  function automatic logic [31:0] pick(int s, int n_in);
    if (s == 0) return d0;
    if (s <= n_in) return din[s];
    return '0;
  endfunction

  initial begin
    for (int i = 0; i < 800; i++) begin
      d0 = $urandom;
      for (int p = 1; p <= 15; p++) din[p] = $urandom;
      sel   = 2'(i % 4);
      sel15 = 4'(i % 16);
      sel5  = 3'(i % 8);
      @(posedge clk);
      check("3 ports",  int'(sel),   q,   pick(int'(sel), 3));
      check("15 ports", int'(sel15), q15, pick(int'(sel15), 15));
      check("5 ports",  int'(sel5),  q5,  pick(int'(sel5), 5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
