// tb_wave_grid: workload test of the PE network on a grid model, the
// structure of the wave (FDTD) model, with several ODEs per PE.
//
// An 8x8 grid of nodes, each with one ODE
//   dv(i,j)/dt = a * (v(i-1,j) + v(i+1,j) + v(i,j-1) + v(i,j+1)) + b * v(i,j)
// (nodes outside the grid read as 0), solved with the Euler method in Q16.16:
//   v <- v + (a*dt)*sum + (b*dt)*v
// is mapped onto a 4x4 network of PEs, each PE holding a 2x2 block of nodes
// (4 ODEs per PE).  PEs use 7 input ports (ports 1..4 = north, south, west,
// east neighbour PE, 5..7 unused) and a 32-word data RAM; the network wiring
// is passed in as CONN.  Every PE runs the same 53-word program per step:
//   evaluate and update the 4 nodes into temporaries (9 words per node),
//   then send each new value (compute "n + 0"), let the two neighbour PEs
//   that need it store it from their ports, and store it back as own state.
//
// A reference model here steps the same integer arithmetic.  Checked: every
// node value after 1, 10 and 40 more steps, the run cycle counts, and that
// PE-to-PE stores happened on all four directions.
module tb_wave_grid;
  import pe_pkg::*;

  localparam int G = 8, PG = 4, N_PE = PG * PG, N_IN = 7, DEPTH = 32;
  localparam int AW = 5, ISW = 3, CW = cw_width(DEPTH, N_IN);
  localparam int S = 16;
  localparam int STEP_LEN = 53;
  localparam int P_N = 1, P_S = 2, P_W = 3, P_E = 4;

  // data RAM layout: v00 v01 v10 v11, received words, temporaries, constants
  localparam int A_V = 0;            // A_V + 2r + c
  localparam int A_S0 = 4, A_S1 = 5, A_N0 = 6, A_N1 = 7,
                 A_W0 = 8, A_W1 = 9, A_E0 = 10, A_E1 = 11;
  localparam int A_NEW = 12;         // A_NEW + 2r + c
  localparam int A_KA = 16, A_KB = 17;

  function automatic logic [N_PE-1:0][N_IN-1:0][15:0] grid_conn();
    logic [N_PE-1:0][N_IN-1:0][15:0] c;
    for (int r = 0; r < PG; r++)
      for (int q = 0; q < PG; q++) begin
        int p = r * PG + q;
        for (int k = 0; k < N_IN; k++) c[p][k] = CONN_NONE;
        if (r > 0)      c[p][P_N-1] = 16'(p - PG);
        if (r < PG - 1) c[p][P_S-1] = 16'(p + PG);
        if (q > 0)      c[p][P_W-1] = 16'(p - 1);
        if (q < PG - 1) c[p][P_E-1] = 16'(p + 1);
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
  logic [3:0]       ld_pe = 0, dbg_pe = 0;
  logic             ld_inst_we = 0, ld_data_we = 0;
  logic [9:0]       ld_inst_addr = 0;
  logic [CW-1:0]    ld_inst_data = 0;
  logic [AW-1:0]    ld_data_addr = 0, dbg_addr = 0;
  logic [31:0]      ld_data_data = 0, dbg_data;
  int               checks = 0, failures = 0;

  pe_network #(
    .N_PE(N_PE), .N_IN(N_IN), .N_EXT(1), .DATA_DEPTH(DEPTH), .INST_DEPTH(1024),
    .CONN(grid_conn())
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

  // stores from each neighbour direction, all PEs
  int n_dir [1:4] = '{0, 0, 0, 0};
  for (genvar i = 0; i < N_PE; i++) begin : g_mon
    always @(posedge clk)
      if (rst_n && dut.g_pe[i].u_pe.is_store && dut.g_pe[i].u_pe.cw.isel inside {[1:4]})
        n_dir[dut.g_pe[i].u_pe.cw.isel]++;
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

  // addresses of the four neighbours of local node (r, c)
  function automatic int nb_n(int r, int c); return (r == 0) ? A_N0 + c : A_V + 2*(r-1) + c; endfunction
  function automatic int nb_s(int r, int c); return (r == 1) ? A_S0 + c : A_V + 2*(r+1) + c; endfunction
  function automatic int nb_w(int r, int c); return (c == 0) ? A_W0 + r : A_V + 2*r + c - 1; endfunction
  function automatic int nb_e(int r, int c); return (c == 1) ? A_E0 + r : A_V + 2*r + c + 1; endfunction

  task automatic build_program();
    int pc = 0;
    // evaluate + update, 9 words per node
    for (int x = 0; x < 4; x++) begin
      int r = x / 2, c = x % 2;
      prog[pc++] = comp(OP_ADD, SRC_RAM,  nb_n(r, c), SRC_RAM,  nb_s(r, c));
      prog[pc++] = comp(OP_ADD, SRC_FWD1, 0,          SRC_RAM,  nb_w(r, c));
      prog[pc++] = comp(OP_ADD, SRC_FWD1, 0,          SRC_RAM,  nb_e(r, c));
      prog[pc++] = comp(OP_MUL, SRC_FWD1, 0,          SRC_RAM,  A_KA, S);
      prog[pc++] = comp(OP_MUL, SRC_RAM,  A_V + x,    SRC_RAM,  A_KB, S);
      prog[pc++] = comp(OP_ADD, SRC_FWD1, 0,          SRC_FWD2, 0);
      prog[pc++] = comp(OP_ADD, SRC_FWD1, 0,          SRC_RAM,  A_V + x);
      prog[pc++] = '0;
      prog[pc++] = store(0, A_NEW + x);
    end
    // transfer: send node x, the two PEs that need it store it, then keep it
    // v00 -> north PE (its S0) and west PE (its E0)
    // v01 -> north PE (its S1) and east PE (its W0)
    // v10 -> south PE (its N0) and west PE (its E1)
    // v11 -> south PE (its N1) and east PE (its W1)
    for (int x = 0; x < 4; x++) begin
      prog[pc++] = comp(OP_ADD, SRC_RAM, A_NEW + x, SRC_ZERO, 0);
      prog[pc++] = (x == 0) ? '0 : store(0, A_V + x - 1);
      case (x)
        0: begin prog[pc++] = store(P_S, A_S0); prog[pc++] = store(P_E, A_E0); end
        1: begin prog[pc++] = store(P_S, A_S1); prog[pc++] = store(P_W, A_W0); end
        2: begin prog[pc++] = store(P_N, A_N0); prog[pc++] = store(P_E, A_E1); end
        default: begin prog[pc++] = store(P_N, A_N1); prog[pc++] = store(P_W, A_W1); end
      endcase
    end
    prog[pc++] = store(0, A_V + 3);
    if (pc != STEP_LEN) $fatal(1, "program length %0d", pc);
  endtask

  // ---------------- reference model ----------------
  int v [G][G];
  localparam int KA = 3277;    // a*dt = 0.05
  localparam int KB = -13107;  // b*dt = -0.2

  function automatic int mulsh(int a, int b);
    longint p = longint'(a) * longint'(b);
    p = p >>> S;
    return int'(p[31:0]);
  endfunction

  function automatic int at(int i, int j);
    return (i < 0 || j < 0 || i >= G || j >= G) ? 0 : v[i][j];
  endfunction

  task automatic ref_step();
    int vn [G][G];
    for (int i = 0; i < G; i++)
      for (int j = 0; j < G; j++) begin
        int sum = ((at(i-1, j) + at(i+1, j)) + at(i, j-1)) + at(i, j+1);
        vn[i][j] = (mulsh(v[i][j], KB) + mulsh(sum, KA)) + v[i][j];
      end
    v = vn;
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
    ld_pe = 4'(pe); ld_data_we = 1; ld_data_addr = AW'(a); ld_data_data = d;
    @(negedge clk); ld_data_we = 0;
  endtask

  function automatic int node_of(int p, int x, output int i, output int j);
    i = (p / PG) * 2 + x / 2;
    j = (p % PG) * 2 + x % 2;
    return 0;
  endfunction

  task automatic check_grid(string tag);
    int i, j, dummy;
    for (int p = 0; p < N_PE; p++)
      for (int x = 0; x < 4; x++) begin
        dummy = node_of(p, x, i, j);
        dbg_pe = 4'(p); dbg_addr = AW'(A_V + x); #1;
        check($sformatf("%s v(%0d,%0d)", tag, i, j), dbg_data, v[i][j]);
      end
  endtask

  task automatic run_steps(int n, string tag);
    int cycles = 1;
    @(negedge clk); n_steps = n; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cycles++; end
    check({tag, " cycles"}, cycles, n * STEP_LEN + 3);
    @(negedge clk);
    for (int s = 0; s < n; s++) ref_step();
    check_grid(tag);
  endtask

  // ---------------- test ----------------
  initial begin
    int i, j, dummy;
    build_program();
    for (int a = 0; a < G; a++) for (int b = 0; b < G; b++) v[a][b] = 0;
    v[3][4] = 40 << 16;            // initial disturbance
    v[6][1] = -(25 << 16);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < N_PE; p++) begin
      for (int k = 0; k < STEP_LEN; k++) begin
        @(negedge clk);
        ld_pe = 4'(p); ld_inst_we = 1; ld_inst_addr = 10'(k); ld_inst_data = prog[k];
      end
      @(negedge clk); ld_inst_we = 0;
      for (int a = 0; a < DEPTH; a++) load_data(p, a, 0);
      for (int x = 0; x < 4; x++) begin
        dummy = node_of(p, x, i, j);
        load_data(p, A_V + x, v[i][j]);
      end
      // received words must match the neighbours' initial values
      begin
        int r0, c0;
        r0 = (p / PG) * 2;
        c0 = (p % PG) * 2;
        load_data(p, A_S0, at(r0 + 2, c0));     load_data(p, A_S1, at(r0 + 2, c0 + 1));
        load_data(p, A_N0, at(r0 - 1, c0));     load_data(p, A_N1, at(r0 - 1, c0 + 1));
        load_data(p, A_W0, at(r0, c0 - 1));     load_data(p, A_W1, at(r0 + 1, c0 - 1));
        load_data(p, A_E0, at(r0, c0 + 2));     load_data(p, A_E1, at(r0 + 1, c0 + 2));
      end
      load_data(p, A_KA, KA);
      load_data(p, A_KB, KB);
    end

    run_steps(1, "step1");
    run_steps(10, "step11");
    run_steps(40, "step51");

    // the disturbance must have spread to a node far from both sources
    dbg_pe = 0; dbg_addr = A_V; #1;
    checks++;
    if (dbg_data == 0) begin failures++; $display("FAIL corner node never changed"); end
    $display("stores per direction: N=%0d S=%0d W=%0d E=%0d", n_dir[1], n_dir[2], n_dir[3], n_dir[4]);
    for (int d = 1; d <= 4; d++) begin
      checks++;
      if (n_dir[d] == 0) begin failures++; $display("FAIL no store from direction %0d", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
