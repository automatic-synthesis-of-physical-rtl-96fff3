// pe_pc: the PE's program counter.
//
// A PE program is one solver step (evaluate, update, data transfer) of
// exactly step_len control words; all PEs of a network share step_len, so
// on one global clock they stay in step without any handshake.  While run is
// high the counter steps through 0 .. step_len-1 and wraps to 0; while run
// is low it holds 0, so every run starts at the beginning of a step.
//
// Interface: run, step_len in; pc (address to fetch this cycle), fetch (pc
// is being fetched), last (this fetch is the last word of a step).
// Timing: pc changes on the rising edge; asynchronous active-low reset.
//
// The counter is named in the PE diagram; the wrap at a shared step length
// and the run input are this design's way of repeating one step's program.
module pe_pc #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  input  logic [$clog2(DEPTH+1)-1:0]  step_len,
  output logic [$clog2(DEPTH)-1:0]    pc,
  output logic                        fetch,
  output logic                        last
);

  assign fetch = run;
  assign last  = run && ({1'b0, pc} == step_len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pc <= '0;
    else if (!run)  pc <= '0;
    else if (last)  pc <= '0;
    else            pc <= pc + 1'b1;
  end

endmodule
