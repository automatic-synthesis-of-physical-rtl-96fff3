// pe_input_mux: the PE's input multiplexer (MUX / Input_sel in the PE block
// diagram).  It chooses the word a STORE control word writes into the data
// RAM: select 0 is the PE's own output d0 (its Out reg, used to write a
// computed result back), select p = 1..N_IN is input port p, wired to
// another PE's output or to an external input.
//
// Interface: d0, din[N_IN:1], sel in; q out.  A select above N_IN gives 0.
// Timing: combinational.
//
// Port count N_IN is one of 1, 3, 7, 15 in the PE versions described
// (a power of two minus one, so that with d0 the select field is full).
module pe_input_mux
  import pe_pkg::*;
#(
  parameter int unsigned DW   = DW_DEFAULT,
  parameter int unsigned N_IN = 3
) (
  input  logic [DW-1:0]              d0,
  input  logic [N_IN:1][DW-1:0]      din,
  input  logic [isel_w(N_IN)-1:0]    sel,
  output logic [DW-1:0]              q
);

  always_comb begin
    q = '0;
    if (sel == '0) q = d0;
    for (int unsigned p = 1; p <= N_IN; p++)
      if (sel == ($bits(sel))'(p)) q = din[p];
  end

endmodule
