// pe_data_ram: the PE's data RAM, used as its register file.  It holds the
// state variables, model constants and temporaries of the ODEs mapped to the
// PE, and the latest values received from neighbouring PEs.
//
// Two read ports feed the two ALU operands; one synchronous write port takes
// STORE results and program loading.  A third read port lets the
// surroundings read results for monitoring.
//
// Two build styles, chosen by SYNC_READ (default: DEPTH > 128):
//   SYNC_READ = 0  asynchronous reads (LUT RAM).  rdata_x follows raddr_x
//                  in the same cycle; re is not used.
//   SYNC_READ = 1  registered reads (block RAM).  On a clock edge with re
//                  high, rdata_a/rdata_b take the words at raddr_a/raddr_b
//                  and hold them while re is low.  rdata_c is registered
//                  on every edge.  A synthesis tool builds one block RAM
//                  copy per read port.
// Interface: we/waddr/wdata (write on the rising clock edge), re,
// raddr_a/b/c, rdata_a/b/c.  A read of the address written in the same
// cycle returns the old word in both styles.
//
// The split (32/64/128 words in LUTs, 1024 words in block RAM) follows the
// described PE versions.  The register-output style of the block RAM version
// and the replicated read ports are this design's choices.  No reset:
// contents are loaded.
module pe_data_ram
  import pe_pkg::*;
#(
  parameter int unsigned DW        = DW_DEFAULT,
  parameter int unsigned DEPTH     = 64,
  parameter bit          SYNC_READ = (DEPTH > 128)
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [addr_w(DEPTH)-1:0]  waddr,
  input  logic [DW-1:0]             wdata,
  input  logic                      re,
  input  logic [addr_w(DEPTH)-1:0]  raddr_a,
  output logic [DW-1:0]             rdata_a,
  input  logic [addr_w(DEPTH)-1:0]  raddr_b,
  output logic [DW-1:0]             rdata_b,
  input  logic [addr_w(DEPTH)-1:0]  raddr_c,
  output logic [DW-1:0]             rdata_c
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  if (SYNC_READ) begin : g_sync
    always_ff @(posedge clk) begin
      if (re) begin
        rdata_a <= mem[raddr_a];
        rdata_b <= mem[raddr_b];
      end
      rdata_c <= mem[raddr_c];
    end
  end else begin : g_async
    logic re_unused;
    assign re_unused = re;
    assign rdata_a = mem[raddr_a];
    assign rdata_b = mem[raddr_b];
    assign rdata_c = mem[raddr_c];
  end

endmodule
