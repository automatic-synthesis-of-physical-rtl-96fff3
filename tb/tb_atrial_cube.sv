// tb_atrial_cube: workload test of the PE network on a three-dimensional
// cubic structure, the shape of the atrial cell model: every cell talks to
// its six neighbours, and a pacemaker drives one corner.
//
// 3x3x3 cells, one per PE, on 27 PEs of the 7-port, 32-word version
// (N_IN=7, DATA_DEPTH=32).  PE i holds cell (x,y,z) with i = x + 3y + 9z.
// Ports 1..6 are the -x,+x,-y,+y,-z,+z neighbours (tied to zero at the
// faces of the cube); port 7 of PE 0 is the pacemaker input ext_in[0], and
// port 7 of the others is tied to zero.  Each cell has one state, its
// membrane potential V (Q16.16, rest 0, excited 1), advanced by the Euler
// method with the time step folded into the constants:
//   V <- V + D*(sum of neighbour V - n*V) + A*(V-TH)*(1-V)*V + stim
// where n is the cell's neighbour count (NBQ = n in Q16) and stim is the
// value received on port 7 in the previous step.  The cubic term is a
// simple excitable membrane: below TH a cell relaxes to rest, above it the
// cell fires towards 1.
//
// The 26-word program adds the six neighbour copies with forward path 1,
// forms sum - n*V with forward path 2 on operand A and path 1 on operand B,
// takes (1-V) * A*(V-TH) with path 1 on A and path 2 on B, and ends with
// the write-back and seven STOREs from the ports.  It needs only add,
// subtract and multiply, so the PEs are built with that reduced ALU.  A reference model here
// steps the same integer arithmetic.  Checked after 4 steps of stimulus
// and two runs of 20 steps without: every V and every received word, and
// the cycle count of each run.  The excitation must have fired the far
// corner of the cube (V above one half).
module tb_atrial_cube;
  import pe_pkg::*;

  localparam int N_PE = 27, N_IN = 7, DEPTH = 32;
  localparam int AW = 5, ISW = 3, CW = cw_width(DEPTH, N_IN);
  localparam int S = 16, ONE = 1 << 16;
  localparam int STEP_LEN = 26;
  localparam int A_V = 0, A_N1 = 1, A_NBQ = 7, A_D = 8, A_ONE = 9, A_TH = 10,
                 A_A = 11, A_TMP = 12, A_ST = 13;
  localparam int D = 6554;         // 0.1
  localparam int TH = 6554;        // 0.1
  localparam int A = 65536;        // 1.0
  localparam int STIM = 39322;     // 0.6
  // the program only adds, subtracts and multiplies: PEs with a reduced ALU
  localparam logic [7:0] OPS_CELL = (8'd1 << OP_ADD) | (8'd1 << OP_SUB) | (8'd1 << OP_MUL);
  localparam logic [7:0] CELL_OPS [N_PE] = '{default: OPS_CELL};

  function automatic int cell_idx(int x, int y, int z);
    return x + 3 * y + 9 * z;
  endfunction

  // neighbour of PE i on port p (1..6), or -1 at a face of the cube
  function automatic int nb(int i, int p);
    int x = i % 3, y = (i / 3) % 3, z = i / 9;
    case (p)
      1: return (x > 0) ? cell_idx(x - 1, y, z) : -1;
      2: return (x < 2) ? cell_idx(x + 1, y, z) : -1;
      3: return (y > 0) ? cell_idx(x, y - 1, z) : -1;
      4: return (y < 2) ? cell_idx(x, y + 1, z) : -1;
      5: return (z > 0) ? cell_idx(x, y, z - 1) : -1;
      default: return (z < 2) ? cell_idx(x, y, z + 1) : -1;
    endcase
  endfunction

  function automatic logic [N_PE-1:0][N_IN-1:0][15:0] cube_conn();
    logic [N_PE-1:0][N_IN-1:0][15:0] c;
    for (int i = 0; i < N_PE; i++) begin
      for (int p = 1; p <= 6; p++) c[i][p-1] = (nb(i, p) < 0) ? CONN_NONE : 16'(nb(i, p));
      c[i][6] = (i == 0) ? 16'(N_PE) : CONN_NONE;
    end
    return c;
  endfunction

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             start = 0;
  logic [31:0]      n_steps = 0;
  logic [10:0]      step_len = 11'(STEP_LEN);
  logic             busy, done;
  logic [31:0]      steps_done;
  logic [0:0][31:0] ext_in = '0;
  logic [N_PE-1:0][31:0] pe_out;
  logic [4:0]       ld_pe = 0, dbg_pe = 0;
  logic             ld_inst_we = 0, ld_data_we = 0;
  logic [9:0]       ld_inst_addr = 0;
  logic [CW-1:0]    ld_inst_data = 0;
  logic [AW-1:0]    ld_data_addr = 0, dbg_addr = 0;
  logic [31:0]      ld_data_data = 0, dbg_data;
  int               checks = 0, failures = 0;

  pe_network #(
    .N_PE(N_PE), .N_IN(N_IN), .DATA_DEPTH(DEPTH), .CONN(cube_conn()),
    .PE_ALU_OPS(CELL_OPS)
  ) dut (
    .clk, .rst_n, .start, .n_steps, .step_len, .busy, .done, .steps_done,
    .ext_in, .pe_out,
    .ld_pe, .ld_inst_we, .ld_inst_addr, .ld_inst_data,
    .ld_data_we, .ld_data_addr, .ld_data_data,
    .dbg_pe, .dbg_addr, .dbg_data
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  function automatic logic [CW-1:0] cw(kind_e k, op_e o, int isel, src_e sa, src_e sb,
                                       int sh, int a, int b);
    return {AW'(b), AW'(a), 5'(sh), sb, sa, ISW'(isel), o, k};
  endfunction
  function automatic logic [CW-1:0] comp(op_e o, src_e sa, int a, src_e sb, int b, int sh = 0);
    return cw(K_COMPUTE, o, 0, sa, sb, sh, a, b);
  endfunction
  function automatic logic [CW-1:0] store(int isel, int addr);
    return cw(K_STORE, OP_ADD, isel, SRC_RAM, SRC_RAM, 0, addr, 0);
  endfunction

  logic [CW-1:0] prog [STEP_LEN];

  task automatic build_program();
    int pc = 0;
    prog[pc++] = comp(OP_ADD, SRC_RAM,  A_N1,     SRC_RAM,  A_N1 + 1);   // n1 + n2
    for (int k = 2; k < 6; k++)
      prog[pc++] = comp(OP_ADD, SRC_FWD1, 0,      SRC_RAM,  A_N1 + k);   // + n3..n6
    prog[pc++] = comp(OP_MUL, SRC_RAM,  A_V,      SRC_RAM,  A_NBQ, S);   // n*V
    prog[pc++] = comp(OP_SUB, SRC_FWD2, 0,        SRC_FWD1, 0);          // sum - n*V
    prog[pc++] = comp(OP_MUL, SRC_FWD1, 0,        SRC_RAM,  A_D, S);     // diffusion
    prog[pc++] = comp(OP_SUB, SRC_RAM,  A_V,      SRC_RAM,  A_TH);       // V - TH
    prog[pc++] = store(0, A_TMP);                                        // keep diffusion
    prog[pc++] = comp(OP_MUL, SRC_FWD2, 0,        SRC_RAM,  A_A, S);     // A*(V-TH)
    prog[pc++] = comp(OP_SUB, SRC_RAM,  A_ONE,    SRC_RAM,  A_V);        // 1 - V
    prog[pc++] = comp(OP_MUL, SRC_FWD1, 0,        SRC_FWD2, 0, S);       // (1-V)*A*(V-TH)
    prog[pc++] = comp(OP_MUL, SRC_FWD1, 0,        SRC_RAM,  A_V, S);     // ... * V
    prog[pc++] = comp(OP_ADD, SRC_FWD1, 0,        SRC_RAM,  A_TMP);      // + diffusion
    prog[pc++] = comp(OP_ADD, SRC_FWD1, 0,        SRC_RAM,  A_ST);       // + stimulus
    prog[pc++] = comp(OP_ADD, SRC_FWD1, 0,        SRC_RAM,  A_V);        // new V
    prog[pc++] = '0;
    prog[pc++] = store(0, A_V);
    for (int p = 1; p <= 6; p++) prog[pc++] = store(p, A_N1 + p - 1);    // neighbours
    prog[pc++] = store(7, A_ST);                                         // pacemaker
    if (pc != STEP_LEN) $fatal(1, "program length %0d", pc);
  endtask

  // ---------------- reference model ----------------
  int v [N_PE], nbv [N_PE][6], st [N_PE], nbq [N_PE];

  function automatic int mulsh(int a, int b);
    longint p = longint'(a) * longint'(b);
    p = p >>> S;
    return int'(p[31:0]);
  endfunction

  task automatic ref_step(int stim);
    int vn [N_PE];
    for (int i = 0; i < N_PE; i++) begin
      int sum, dif, q, r;
      sum = nbv[i][0];
      for (int k = 1; k < 6; k++) sum = sum + nbv[i][k];
      dif = mulsh(sum - mulsh(v[i], nbq[i]), D);
      q   = mulsh(v[i] - TH, A);
      r   = mulsh(mulsh(ONE - v[i], q), v[i]);
      vn[i] = ((r + dif) + st[i]) + v[i];
    end
    for (int i = 0; i < N_PE; i++) begin
      v[i] = vn[i];
      st[i] = (i == 0) ? stim : 0;
    end
    for (int i = 0; i < N_PE; i++)
      for (int p = 1; p <= 6; p++) nbv[i][p-1] = (nb(i, p) < 0) ? 0 : v[nb(i, p)];
  endtask

  // ---------------- helpers ----------------
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d", what, $signed(got), $signed(exp));
    end
  endtask

  task automatic load_data(int pe, int a, int d);
    @(negedge clk);
    ld_pe = 5'(pe); ld_data_we = 1; ld_data_addr = AW'(a); ld_data_data = d;
    @(negedge clk); ld_data_we = 0;
  endtask

  task automatic run_steps(int n, int stim, string tag);
    int cycles = 1;
    @(negedge clk); ext_in[0] = stim; n_steps = n; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cycles++; end
    check({tag, " cycles"}, cycles, n * STEP_LEN + 3);
    @(negedge clk);
    for (int s = 0; s < n; s++) ref_step(stim);
    for (int i = 0; i < N_PE; i++) begin
      dbg_pe = 5'(i);
      dbg_addr = AW'(A_V);  #1 check($sformatf("%s V[%0d]", tag, i), dbg_data, v[i]);
      dbg_addr = AW'(A_ST); #1 check($sformatf("%s stim at %0d", tag, i), dbg_data, st[i]);
      for (int k = 0; k < 6; k++) begin
        dbg_addr = AW'(A_N1 + k); #1;
        check($sformatf("%s port %0d of %0d", tag, k + 1, i), dbg_data, nbv[i][k]);
      end
    end
  endtask

  // ---------------- test ----------------
  initial begin
    int n;
    build_program();
    for (int i = 0; i < N_PE; i++) begin
      v[i] = 0; st[i] = 0;
      for (int k = 0; k < 6; k++) nbv[i][k] = 0;
      n = 0;
      for (int p = 1; p <= 6; p++) if (nb(i, p) >= 0) n++;
      nbq[i] = n << S;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < N_PE; p++) begin
      for (int k = 0; k < STEP_LEN; k++) begin
        @(negedge clk);
        ld_pe = 5'(p); ld_inst_we = 1; ld_inst_addr = 10'(k); ld_inst_data = prog[k];
      end
      @(negedge clk); ld_inst_we = 0;
      load_data(p, A_V, 0);    load_data(p, A_ST, 0);   load_data(p, A_TMP, 0);
      for (int k = 0; k < 6; k++) load_data(p, A_N1 + k, 0);
      load_data(p, A_NBQ, nbq[p]); load_data(p, A_D, D);  load_data(p, A_ONE, ONE);
      load_data(p, A_TH, TH);      load_data(p, A_A, A);
    end

    run_steps(4,  STIM, "paced");
    run_steps(20, 0,    "step24");
    run_steps(20, 0,    "step44");

    checks++;
    if (v[N_PE - 1] < ONE / 2) begin
      failures++;
      $display("FAIL excitation did not reach the far corner (V=%0d)", v[N_PE - 1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
