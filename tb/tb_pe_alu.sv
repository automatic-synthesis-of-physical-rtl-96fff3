// tb_pe_alu: self-checking test of the PE ALU.  Drives every operation with
// directed corner cases and random operands and compares with a reference
// computed here in 64-bit integer arithmetic (product, arithmetic shift,
// 32-bit wrap).  A second instance is built without the multiplier and
// without the left shift (OPS mask); it must give zero for those two
// operations and the reference result for the others.  The ALU is
// combinational; a clock only paces the test.
module tb_pe_alu;
  import pe_pkg::*;

  logic               clk = 1'b0;
  op_e                op;
  logic signed [31:0] a, b, y, y_small;
  localparam logic [7:0] OPS_SMALL = OPS_ALL & ~(8'd1 << OP_MUL) & ~(8'd1 << OP_SHL);
  logic [4:0]         shamt;
  int                 checks = 0, failures = 0;

  pe_alu #(.DW(32)) dut (.op, .a, .b, .shamt, .y);
  pe_alu #(.DW(32), .OPS(OPS_SMALL)) dut_small (.op, .a, .b, .shamt, .y(y_small));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_y(op_e o, logic signed [31:0] x,
                                         logic signed [31:0] z, logic [4:0] s);
    longint p;
    case (o)
      OP_ADD:  return x + z;
      OP_SUB:  return x - z;
      OP_MUL:  begin p = longint'(x) * longint'(z); p = p >>> s; return p[31:0]; end
      OP_SHL:  return x << s;
      OP_SHR:  return x >>> s;
      OP_PASS: return x;
      default: return '0;
    endcase
  endfunction

  task automatic apply(op_e o, logic [31:0] x, logic [31:0] z, logic [4:0] s);
    op = o; a = x; b = z; shamt = s;
    @(posedge clk);
    checks++;
    if (y !== ref_y(o, x, z, s)) begin
      failures++;
      $display("FAIL op=%s a=%0d b=%0d sh=%0d y=%0d exp=%0d", o.name(), $signed(x),
               $signed(z), s, y, $signed(ref_y(o, x, z, s)));
    end
    checks++;
    if (y_small !== (OPS_SMALL[o] ? ref_y(o, x, z, s) : 32'd0)) begin
      failures++;
      $display("FAIL reduced ALU op=%s y=%0d", o.name(), y_small);
    end
  endtask

  initial begin
    // directed: 1.5 * 2.25 in Q16.16 = 3.375
    apply(OP_MUL, 32'sd98304, 32'sd147456, 5'd16);
    if (y !== 32'sd221184) begin failures++; $display("FAIL Q16 multiply"); end
    checks++;
    // negative product with arithmetic shift: -1.5 * 2.0 = -3.0
    apply(OP_MUL, -32'sd98304, 32'sd131072, 5'd16);
    if (y !== -32'sd196608) begin failures++; $display("FAIL signed Q16 multiply"); end
    checks++;
    apply(OP_SHR, -32'sd64, 32'sd0, 5'd3);
    if (y !== -32'sd8) begin failures++; $display("FAIL arithmetic shift"); end
    checks++;
    apply(OP_SUB, 32'sd5, 32'sd7, 5'd0);
    if (y !== -32'sd2) begin failures++; $display("FAIL subtract"); end
    checks++;
    apply(OP_ADD, 32'h7fffffff, 32'd1, 5'd0);   // wraps
    apply(OP_MUL, 32'h7fffffff, 32'h7fffffff, 5'd31);
    apply(OP_PASS, 32'h12345678, 32'hdeadbeef, 5'd0);
    for (int i = 0; i < 3000; i++)
      apply(op_e'($urandom_range(0, 5)), $urandom, $urandom, 5'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
