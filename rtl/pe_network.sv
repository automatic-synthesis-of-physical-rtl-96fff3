// pe_network: a custom point-to-point network of general PEs that solves a
// system of ODEs, one solver step after another.
//
// The ODEs of a physical model are split among the PEs.  Each PE runs its own
// program of exactly step_len control words per solver step: evaluate the
// derivatives, update the state variables, then transfer new values to the
// PEs that need them.  Transfers are scheduled when the programs are built:
// a PE puts a value on its Out reg and, once it is there, the receiving PE
// executes a STORE from the input port that is wired to that Out reg.
// Because every PE has the same step length and one global clock, no
// handshake is needed: the wiring and the programs alone keep all PEs in
// step.  Programs that finish early are padded with IDLE words.
//
// Wiring.  Input port p (1..N_IN) of PE i is driven by source CONN[i][p-1]:
// a value below N_PE is that PE's Out reg, N_PE+k is external input k, and
// pe_pkg::CONN_NONE gives zero.  The default, tree_conn(), is the binary
// tree of one ODE group per lung branch: PE 0 is the root, PE i has children
// 2i+1 and 2i+2; port 1 is the parent (external input 0, the driving
// pressure, for the root), ports 2 and 3 the left and right child.  A model
// with another structure passes its own CONN.
//
// PE versions.  By default every PE is the version given by N_IN,
// DATA_DEPTH and INST_DEPTH, with every ALU operation.  PE_N_IN,
// PE_DATA_DEPTH, PE_INST_DEPTH and PE_ALU_OPS pick a version per PE
// instead, as a mapping that gives busy PEs more memory or ports, or drops
// the multiplier where it is not used, would.  The network-wide sizes are
// then the largest ones and size the shared load and monitor ports; a
// smaller PE uses their low bits (its control word layout follows its own
// widths, see pe_pkg).
//
// Step control.  A pulse on start (while idle) runs n_steps solver steps:
// run is raised for exactly n_steps * step_len fetch cycles, then the last
// two instructions drain through the PE pipelines and done pulses for one
// cycle.  busy is high from start until done.  steps_done counts completed
// steps of the current run.  Data RAM contents stay between runs, so a run
// can continue the previous one (for example with a new external input).
//
// Loading and monitoring (while not busy): ld_pe selects a PE, ld_inst_we /
// ld_data_we write one control word or data word.  dbg_pe / dbg_addr read a
// data word: combinationally, or one clock edge later when DATA_DEPTH > 128
// (block RAM data RAM, registered read).
//
// Follows the described architecture: network of PEs with custom
// point-to-point wiring, global clock, static schedule, equal-length
// programs per step, the 7-PE tree of a 3-generation lung model as default,
// a version chosen per PE from the set of PE versions.
// This design's own choices: the CONN encoding, the start/n_steps step
// controller, the shared step_len input and the load and monitor ports.
module pe_network
  import pe_pkg::*;
#(
  parameter int unsigned DW         = DW_DEFAULT,
  parameter int unsigned N_PE       = 7,
  parameter int unsigned N_IN       = 3,
  parameter int unsigned N_EXT      = 1,
  parameter int unsigned DATA_DEPTH = 64,
  parameter int unsigned INST_DEPTH = 1024,
  parameter logic [N_PE-1:0][N_IN-1:0][15:0] CONN = tree_conn(),
  // per-PE version (ports, data RAM words, instruction RAM words); each
  // entry at most the network-wide value above, which sizes shared ports
  parameter int unsigned PE_N_IN       [N_PE] = '{default: N_IN},
  parameter int unsigned PE_DATA_DEPTH [N_PE] = '{default: DATA_DEPTH},
  parameter int unsigned PE_INST_DEPTH [N_PE] = '{default: INST_DEPTH},
  parameter logic [7:0]  PE_ALU_OPS    [N_PE] = '{default: OPS_ALL},
  localparam int unsigned AW        = addr_w(DATA_DEPTH),
  localparam int unsigned IAW       = $clog2(INST_DEPTH),
  localparam int unsigned PW        = (N_PE < 2) ? 1 : $clog2(N_PE),
  localparam int unsigned SLW       = $clog2(INST_DEPTH + 1),
  localparam int unsigned CW_W      = cw_width(DATA_DEPTH, N_IN)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // step control
  input  logic                        start,
  input  logic [31:0]                 n_steps,
  input  logic [SLW-1:0]              step_len,
  output logic                        busy,
  output logic                        done,
  output logic [31:0]                 steps_done,
  // external inputs and PE outputs
  input  logic [N_EXT-1:0][DW-1:0]    ext_in,
  output logic [N_PE-1:0][DW-1:0]     pe_out,
  // loading
  input  logic [PW-1:0]               ld_pe,
  input  logic                        ld_inst_we,
  input  logic [IAW-1:0]              ld_inst_addr,
  input  logic [CW_W-1:0]             ld_inst_data,
  input  logic                        ld_data_we,
  input  logic [AW-1:0]               ld_data_addr,
  input  logic [DW-1:0]               ld_data_data,
  // monitoring
  input  logic [PW-1:0]               dbg_pe,
  input  logic [AW-1:0]               dbg_addr,
  output logic [DW-1:0]               dbg_data
);

  // Binary tree wiring, see header.
  function automatic logic [N_PE-1:0][N_IN-1:0][15:0] tree_conn();
    logic [N_PE-1:0][N_IN-1:0][15:0] c;
    for (int unsigned i = 0; i < N_PE; i++) begin
      for (int unsigned p = 0; p < N_IN; p++) c[i][p] = CONN_NONE;
      c[i][0] = (i == 0) ? 16'(N_PE) : 16'((i - 1) / 2);
      if (N_IN > 1 && 2*i + 1 < N_PE) c[i][1] = 16'(2*i + 1);
      if (N_IN > 2 && 2*i + 2 < N_PE) c[i][2] = 16'(2*i + 2);
    end
    return c;
  endfunction

  // ---------------- step controller ----------------
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e          state;
  logic            run;
  logic [SLW-1:0]  cyc;
  logic [1:0]      drain;
  logic            step_end;

  assign step_end = (state == S_RUN) && (cyc == step_len - 1'b1);
  assign run      = (state == S_RUN);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cyc        <= '0;
      drain      <= '0;
      steps_done <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start && n_steps != 0 && step_len != 0) begin
          state      <= S_RUN;
          cyc        <= '0;
          steps_done <= '0;
        end
        S_RUN: begin
          if (step_end) begin
            cyc        <= '0;
            steps_done <= steps_done + 1;
            if (steps_done + 1 == n_steps) begin
              state <= S_DRAIN;
              drain <= 2'd1;
            end
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        S_DRAIN: begin
          // last word fetched in the final RUN cycle: S1 now, S2 next cycle
          if (drain == 0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
          drain <= drain - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- PEs and point-to-point wiring ----------------
  logic [N_PE-1:0][DW-1:0] dbg_q;

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    localparam int unsigned PN  = PE_N_IN[i];
    localparam int unsigned PD  = PE_DATA_DEPTH[i];
    localparam int unsigned PI  = PE_INST_DEPTH[i];
    localparam int unsigned PAW = addr_w(PD);
    localparam int unsigned PCW = cw_width(PD, PN);
    localparam logic [7:0]  POP = PE_ALU_OPS[i];

    if (PN > N_IN || PN < 1 || PD > DATA_DEPTH || PI > INST_DEPTH) begin : g_bad_version
      $error("pe_network: PE version larger than the network-wide N_IN / DATA_DEPTH / INST_DEPTH");
    end

    logic [PN:1][DW-1:0] din;

    for (genvar p = 1; p <= PN; p++) begin : g_port
      localparam int unsigned SRC = 32'(CONN[i][p-1]);
      if (SRC < N_PE) begin : g_from_pe
        assign din[p] = pe_out[SRC];
      end else if (SRC < N_PE + N_EXT) begin : g_from_ext
        assign din[p] = ext_in[SRC - N_PE];
      end else begin : g_none
        assign din[p] = '0;
      end
    end

    // A smaller version takes the low bits of the shared load and monitor
    // buses: its control word is the low PCW bits of ld_inst_data.
    pe #(
      .DW(DW), .N_IN(PN), .DATA_DEPTH(PD), .INST_DEPTH(PI),
      .ALU_OPS(POP)
    ) u_pe (
      .clk, .rst_n, .run,
      .step_len    (step_len[$clog2(PI+1)-1:0]),
      .din, .dout(pe_out[i]),
      .ld_inst_we  (ld_inst_we && !busy && ld_pe == PW'(i)),
      .ld_inst_addr(ld_inst_addr[$clog2(PI)-1:0]),
      .ld_inst_data(ld_inst_data[PCW-1:0]),
      .ld_data_we  (ld_data_we && !busy && ld_pe == PW'(i)),
      .ld_data_addr(ld_data_addr[PAW-1:0]),
      .ld_data_data,
      .dbg_addr    (dbg_addr[PAW-1:0]),
      .dbg_data    (dbg_q[i])
    );

    // every PE must hold a whole step of program
    a_step_fits: assert property (
      @(posedge clk) disable iff (!rst_n) (start && !busy) |-> (step_len <= SLW'(PI))
    ) else $error("pe_network: step_len exceeds the instruction RAM of PE %0d", i);
  end

  assign dbg_data = dbg_q[dbg_pe];

  // A finished run has executed exactly the requested number of steps.
  a_done_steps: assert property (
    @(posedge clk) disable iff (!rst_n) done |-> (steps_done == n_steps)
  ) else $error("pe_network: run ended after a wrong number of steps");

endmodule
