// pe_inst_ram: the PE's programmable instruction RAM.  Each word is one
// microcoded control word; there is no instruction decoding.
//
// One write port loads the program; one synchronous read port, addressed by
// the program counter, presents the control word one clock after the address
// (the registered output of an FPGA block RAM).  The read register only
// updates when re is high.
//
// Interface: we/waddr/wdata (write on the rising edge); re/raddr in, rdata
// out one cycle later.  rdata resets to zero, which is an IDLE word.
//
// DEPTH defaults to 1024 words, one block RAM of 32 Kb at a 32-bit word; the
// PE versions use 1 to 4 block RAMs.  The word width W is set by the PE.
module pe_inst_ram #(
  parameter int unsigned W     = 28,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [$clog2(DEPTH)-1:0]   waddr,
  input  logic [W-1:0]               wdata,
  input  logic                       re,
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output logic [W-1:0]               rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
