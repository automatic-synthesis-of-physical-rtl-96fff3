// pe: general pipelined processing element for solving ODEs.
//
// A small programmable processor without an instruction decoder.  The program
// counter addresses the instruction RAM; each word read is a control word
// (layout in pe_pkg) whose fields drive the datapath directly:
//
//   fetch  PC -> instruction RAM (registered read)
//   S1     STORE:   input mux (own Out reg d0, or port 1..N_IN) -> data RAM
//          COMPUTE: data RAM read A/B -> mux (RAM / forward path 2 / zero)
//                   -> Data reg
//   S2     COMPUTE: mux (Data reg / forward path 1) -> ALU -> Out reg
//
// With a data RAM deeper than 128 words (block RAM) the RAM read is
// registered: the RAM output register takes the place of the Data reg and
// the forward path 2 / zero choice is made right after it, from a copy of
// the Out reg taken in S1.  Programs see the same timing in both builds.
//
// Forward path 1 feeds the Out reg back into the ALU, so a compute can use
// the result of the compute issued one cycle earlier.  Forward path 2 feeds
// the Out reg into the Data reg, so a compute can use a result issued two
// cycles earlier.  Temporaries therefore rarely need to be written back.
// The Out reg changes only when a COMPUTE reaches S2 and is the PE's output
// dout, wired to the input ports of other PEs.  With this timing a value
// computed in cycle n is in the Out reg from cycle n+2 on, so two PEs
// exchange data in three cycles: compute, idle, store the neighbour's output.
//
// Interface:
//   run, step_len   run the program, step_len words per solver step
//   din[N_IN:1]     input ports from other PEs / external inputs
//   dout            Out reg
//   ld_*            program and data loading; only while run is low
//   dbg_addr/data   read of the data RAM for monitoring: combinational, or
//                   one cycle late with the block RAM data RAM
//
// Follows the PE described for this architecture: microcoded store/compute
// control words, data RAM as register file, input mux, Data reg and Out reg
// pipeline registers, two forward paths, configurable port count, data RAM
// and instruction RAM sizes (default PE3_D64_I1), an adjustable ALU
// operation set (ALU_OPS, default all), LUT data RAM up to 128
// words and block RAM data RAM for 1024 words.  This design's own choices:
// the control word encoding, the IDLE kind, the zero operand source, the
// step-length wrap of the PC, and the load and monitor ports (the original
// fills RAM contents at synthesis time).
module pe
  import pe_pkg::*;
#(
  parameter int unsigned DW         = DW_DEFAULT,
  parameter int unsigned N_IN       = 3,
  parameter int unsigned DATA_DEPTH = 64,
  parameter int unsigned INST_DEPTH = 1024,
  parameter logic [7:0]  ALU_OPS    = OPS_ALL,
  localparam int unsigned AW        = addr_w(DATA_DEPTH),
  localparam int unsigned IAW       = $clog2(INST_DEPTH),
  localparam int unsigned ISW       = isel_w(N_IN),
  localparam int unsigned CW_W      = cw_width(DATA_DEPTH, N_IN),
  localparam bit          BRAM_DATA = (DATA_DEPTH > 128)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          run,
  input  logic [$clog2(INST_DEPTH+1)-1:0] step_len,
  input  logic [N_IN:1][DW-1:0]         din,
  output logic [DW-1:0]                 dout,
  input  logic                          ld_inst_we,
  input  logic [IAW-1:0]                ld_inst_addr,
  input  logic [CW_W-1:0]               ld_inst_data,
  input  logic                          ld_data_we,
  input  logic [AW-1:0]                 ld_data_addr,
  input  logic [DW-1:0]                 ld_data_data,
  input  logic [AW-1:0]                 dbg_addr,
  output logic [DW-1:0]                 dbg_data
);

  typedef struct packed {
    logic [AW-1:0]  addr_b;
    logic [AW-1:0]  addr_a;
    logic [SHW-1:0] shamt;
    src_e           src_b;
    src_e           src_a;
    logic [ISW-1:0] isel;
    op_e            op;
    kind_e          kind;
  } cw_t;

  // S2 (execute) control, registered alongside the Data reg
  typedef struct packed {
    logic           valid;
    op_e            op;
    logic           fwd1_a;
    logic           fwd1_b;
    logic [SHW-1:0] shamt;
  } ex_t;

  // ---------------- fetch ----------------
  logic [IAW-1:0]   pc;
  logic             fetch;
  logic             last_unused;
  logic [CW_W-1:0]  iram_q;
  logic             s1_valid;

  pe_pc #(.DEPTH(INST_DEPTH)) u_pc (
    .clk, .rst_n, .run, .step_len,
    .pc, .fetch, .last(last_unused)
  );

  pe_inst_ram #(.W(CW_W), .DEPTH(INST_DEPTH)) u_iram (
    .clk, .rst_n,
    .we(ld_inst_we), .waddr(ld_inst_addr), .wdata(ld_inst_data),
    .re(fetch), .raddr(pc), .rdata(iram_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= fetch;
  end

  // ---------------- S1: store / operand read ----------------
  cw_t            cw;
  logic           is_store, is_compute;
  logic [DW-1:0]  out_reg;
  logic [DW-1:0]  mux_q;
  logic [DW-1:0]  ram_a, ram_b;
  logic           ram_we;
  logic [AW-1:0]  ram_waddr;
  logic [DW-1:0]  ram_wdata;
  logic [DW-1:0]  data_reg_a, data_reg_b;   // Data reg, as seen by S2
  ex_t            ex;

  assign cw         = s1_valid ? cw_t'(iram_q) : '0;
  assign is_store   = (cw.kind == K_STORE);
  assign is_compute = (cw.kind == K_COMPUTE);

  pe_input_mux #(.DW(DW), .N_IN(N_IN)) u_mux (
    .d0(out_reg), .din, .sel(cw.isel), .q(mux_q)
  );

  assign ram_we    = is_store || (!run && ld_data_we);
  assign ram_waddr = is_store ? cw.addr_a : ld_data_addr;
  assign ram_wdata = is_store ? mux_q     : ld_data_data;

  pe_data_ram #(.DW(DW), .DEPTH(DATA_DEPTH), .SYNC_READ(BRAM_DATA)) u_dram (
    .clk,
    .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .re(is_compute),
    .raddr_a(cw.addr_a), .rdata_a(ram_a),
    .raddr_b(cw.addr_b), .rdata_b(ram_b),
    .raddr_c(dbg_addr),  .rdata_c(dbg_data)
  );

  // S2 control, registered alongside the Data reg
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex <= '0;
    end else begin
      ex.valid  <= is_compute;
      ex.op     <= cw.op;
      ex.fwd1_a <= (cw.src_a == SRC_FWD1);
      ex.fwd1_b <= (cw.src_b == SRC_FWD1);
      ex.shamt  <= cw.shamt;
    end
  end

  if (!BRAM_DATA) begin : g_lut_data
    logic [DW-1:0] opnd_a, opnd_b;

    // mux in front of the Data reg: RAM, forward path 2, or zero
    always_comb begin
      unique case (cw.src_a)
        SRC_FWD2: opnd_a = out_reg;
        SRC_ZERO: opnd_a = '0;
        default:  opnd_a = ram_a;
      endcase
      unique case (cw.src_b)
        SRC_FWD2: opnd_b = out_reg;
        SRC_ZERO: opnd_b = '0;
        default:  opnd_b = ram_b;
      endcase
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        data_reg_a <= '0;
        data_reg_b <= '0;
      end else if (is_compute) begin
        data_reg_a <= opnd_a;
        data_reg_b <= opnd_b;
      end
    end
  end else begin : g_bram_data
    // Block RAM version: the RAM output registers are the Data reg.  The
    // forward path 2 / zero choice cannot sit in front of them, so the Out
    // reg of S1 is kept in fwd2_q and the choice is made after the RAM.
    // Seen from the program the timing is the same as the LUT version.
    logic [DW-1:0] fwd2_q;
    src_e          src_a_q, src_b_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        fwd2_q  <= '0;
        src_a_q <= SRC_RAM;
        src_b_q <= SRC_RAM;
      end else if (is_compute) begin
        fwd2_q  <= out_reg;
        src_a_q <= cw.src_a;
        src_b_q <= cw.src_b;
      end
    end

    always_comb begin
      unique case (src_a_q)
        SRC_FWD2: data_reg_a = fwd2_q;
        SRC_ZERO: data_reg_a = '0;
        default:  data_reg_a = ram_a;
      endcase
      unique case (src_b_q)
        SRC_FWD2: data_reg_b = fwd2_q;
        SRC_ZERO: data_reg_b = '0;
        default:  data_reg_b = ram_b;
      endcase
    end
  end

  // ---------------- S2: execute ----------------
  logic [DW-1:0] alu_a, alu_b, alu_y;

  // mux in front of the ALU: Data reg or forward path 1
  assign alu_a = ex.fwd1_a ? out_reg : data_reg_a;
  assign alu_b = ex.fwd1_b ? out_reg : data_reg_b;

  pe_alu #(.DW(DW), .OPS(ALU_OPS)) u_alu (
    .op(ex.op), .a(alu_a), .b(alu_b), .shamt(ex.shamt), .y(alu_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out_reg <= '0;
    else if (ex.valid) out_reg <= alu_y;
  end

  assign dout = out_reg;

  // Loading is only allowed while the program is stopped.
  a_no_load_while_running: assert property (
    @(posedge clk) disable iff (!rst_n) run |-> !(ld_inst_we || ld_data_we)
  ) else $error("pe: program or data load while running");

endmodule
