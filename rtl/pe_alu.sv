// pe_alu: the PE's arithmetic unit for 32-bit fixed-point ODE evaluation.
//
// Model values are fixed-point integers whose per-variable scale factor is
// chosen offline, so the unit needs only integer add/subtract, a multiplier
// (one DSP block on an FPGA) and a shifter to rescale.  MUL forms the full
// 2*DW-bit signed product and shifts it right arithmetically by `shamt`
// before truncating to DW bits, so a product of two fixed-point numbers can
// be brought back to the scale of the result in one operation.
//
// OPS selects which operations are built, one bit per op_e value; an
// operation that is left out gives zero, so its logic (the multiplier for
// OP_MUL) is removed by synthesis.
//
// Interface: op (pe_pkg::op_e), a, b, shamt in; y out.
// Timing: purely combinational; the PE registers y in its Out reg.
//
// The integer ALU with a shift operator follows the PE description; the
// operation set and the product-then-shift form of MUL are this design's
// choices, and so is the OPS mask, which is how this design lets the ALU be
// fitted to the ODEs mapped to a PE.  Unused op encodings give zero.
module pe_alu
  import pe_pkg::*;
#(
  parameter int unsigned DW  = DW_DEFAULT,
  parameter logic [7:0]  OPS = OPS_ALL
) (
  input  op_e                  op,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  input  logic [SHW-1:0]       shamt,
  output logic signed [DW-1:0] y
);

  logic signed [2*DW-1:0] prod;
  logic signed [2*DW-1:0] prod_sh;

  assign prod    = (2*DW)'(a) * (2*DW)'(b);
  assign prod_sh = prod >>> shamt;

  always_comb begin
    y = '0;
    if (OPS[op]) unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_MUL:  y = prod_sh[DW-1:0];
      OP_SHL:  y = a <<< shamt;
      OP_SHR:  y = a >>> shamt;
      OP_PASS: y = a;
      default: y = '0;
    endcase
  end

endmodule
