// tb_pe_network: end-to-end test of the PE network at its default size
// (7 PEs in a binary tree, 3 input ports, 64-word data RAM, 1024-word
// instruction RAM): a 3-generation airway tree of RLC branches solved with
// the Euler method, one branch per PE.
//
// Branch k has volume V and flow F (two ODEs), node pressure P = V / C:
//   dF/dt = (Pparent - P - R*F) / L        (root: Pparent = driving pressure)
//   dV/dt = F - Fleft - Fright             (leaves: no children)
// in Q16.16 fixed point, with kL = dt/L, kV = dt and ic = 1/C folded into
// constants.  Every PE runs the same 20-word program per step; only its data
// (R, kL, kV, ic) differs.  After evaluate/update, each PE sends its new P
// down to its children (parent port) and its new F up to its parent (child
// ports), with the compute / idle / store exchange pattern.
//
// A reference model here steps the same equations with the same integer
// arithmetic.  The driving pressure is a square wave: several runs, each of
// a number of steps at +P0 or -P0, continuing from the previous state.
// Checked: every V, F, P, Ppar, Fl, Fr word of every PE after every run,
// the cycle count of each run (n_steps * 20 + 3 edges from start to done), and
// the number of completed steps.  Counted, each must occur: forward path 1,
// forward path 2, zero operand, store of own output, store from a
// neighbouring PE, store from the external input, idle words, step wraps,
// a run continuing a previous one.
module tb_pe_network;
  import pe_pkg::*;

  localparam int N_PE = 7, AW = 6, ISW = 2, CW = cw_width(64, 3);
  localparam int S = 16;            // fixed-point fraction bits
  localparam int STEP_LEN = 20;

  // data RAM layout
  localparam int A_V = 0, A_F = 1, A_P = 2, A_PPAR = 3, A_FL = 4, A_FR = 5,
                 A_R = 6, A_KL = 7, A_KV = 8, A_IC = 9, A_DF = 10;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             start = 0;
  logic [31:0]      n_steps = 0;
  logic [10:0]      step_len = 11'(STEP_LEN);
  logic             busy, done;
  logic [31:0]      steps_done;
  logic [0:0][31:0] ext_in = '0;
  logic [N_PE-1:0][31:0] pe_out;
  logic [2:0]       ld_pe = 0, dbg_pe = 0;
  logic             ld_inst_we = 0, ld_data_we = 0;
  logic [9:0]       ld_inst_addr = 0;
  logic [CW-1:0]    ld_inst_data = 0;
  logic [5:0]       ld_data_addr = 0, dbg_addr = 0;
  logic [31:0]      ld_data_data = 0, dbg_data;
  int               checks = 0, failures = 0;

  pe_network dut (
    .clk, .rst_n, .start, .n_steps, .step_len, .busy, .done, .steps_done,
    .ext_in, .pe_out,
    .ld_pe, .ld_inst_we, .ld_inst_addr, .ld_inst_data,
    .ld_data_we, .ld_data_addr, .ld_data_data,
    .dbg_pe, .dbg_addr, .dbg_data
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_fwd1 = 0, n_fwd2 = 0, n_zero = 0, n_store_own = 0, n_store_pe = 0,
      n_store_ext = 0, n_idle = 0, n_wrap = 0, n_continue = 0;

  for (genvar i = 0; i < N_PE; i++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_pe[i].u_pe.ex.valid && (dut.g_pe[i].u_pe.ex.fwd1_a || dut.g_pe[i].u_pe.ex.fwd1_b))
        n_fwd1++;
      if (dut.g_pe[i].u_pe.is_compute &&
          (dut.g_pe[i].u_pe.cw.src_a == SRC_FWD2 || dut.g_pe[i].u_pe.cw.src_b == SRC_FWD2))
        n_fwd2++;
      if (dut.g_pe[i].u_pe.is_compute &&
          (dut.g_pe[i].u_pe.cw.src_a == SRC_ZERO || dut.g_pe[i].u_pe.cw.src_b == SRC_ZERO))
        n_zero++;
      if (dut.g_pe[i].u_pe.is_store) begin
        if (dut.g_pe[i].u_pe.cw.isel == 0) n_store_own++;
        else if (i == 0 && dut.g_pe[i].u_pe.cw.isel == 1) n_store_ext++;
        else n_store_pe++;
      end
      if (dut.g_pe[i].u_pe.s1_valid && dut.g_pe[i].u_pe.cw.kind == K_IDLE) n_idle++;
      if (dut.g_pe[i].u_pe.u_pc.last) n_wrap++;
    end
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
    // evaluate
    prog[0]  = comp(OP_MUL, SRC_RAM,  A_R,    SRC_RAM,  A_F, S);   // R*F
    prog[1]  = comp(OP_SUB, SRC_RAM,  A_PPAR, SRC_RAM,  A_P);      // Ppar - P
    prog[2]  = comp(OP_SUB, SRC_FWD1, 0,      SRC_FWD2, 0);        // - R*F
    prog[3]  = comp(OP_MUL, SRC_FWD1, 0,      SRC_RAM,  A_KL, S);  // dF
    prog[4]  = comp(OP_SUB, SRC_RAM,  A_F,    SRC_RAM,  A_FL);     // F - Fl
    prog[5]  = store(0, A_DF);                                     // keep dF
    prog[6]  = comp(OP_SUB, SRC_FWD1, 0,      SRC_RAM,  A_FR);     // - Fr
    prog[7]  = comp(OP_MUL, SRC_FWD1, 0,      SRC_RAM,  A_KV, S);  // dV
    // update
    prog[8]  = comp(OP_ADD, SRC_RAM,  A_V,    SRC_FWD1, 0);        // V + dV
    prog[9]  = comp(OP_ADD, SRC_RAM,  A_F,    SRC_RAM,  A_DF);     // F + dF
    prog[10] = store(0, A_V);
    prog[11] = store(0, A_F);
    prog[12] = comp(OP_MUL, SRC_RAM,  A_V,    SRC_RAM,  A_IC, S);  // P = V/C
    prog[13] = '0;                                                 // idle
    // data transfer: P down the tree, F up the tree
    prog[14] = store(1, A_PPAR);                                   // parent's P
    prog[15] = store(0, A_P);
    prog[16] = comp(OP_ADD, SRC_RAM,  A_F,    SRC_ZERO, 0);        // F + 0
    prog[17] = '0;                                                 // idle
    prog[18] = store(2, A_FL);                                     // left child's F
    prog[19] = store(3, A_FR);                                     // right child's F
  endtask

  // ---------------- reference model ----------------
  int V[N_PE], F[N_PE], P[N_PE], Ppar[N_PE], Fl[N_PE], Fr[N_PE];
  int R[N_PE], KL[N_PE], KV[N_PE], IC[N_PE];

  function automatic int mulsh(int a, int b);
    longint p = longint'(a) * longint'(b);
    p = p >>> S;
    return int'(p[31:0]);
  endfunction

  task automatic ref_step(int pin);
    int Vn[N_PE], Fn[N_PE], Pn[N_PE];
    for (int k = 0; k < N_PE; k++) begin
      int d, dF, dV;
      d  = (Ppar[k] - P[k]) - mulsh(R[k], F[k]);
      dF = mulsh(d, KL[k]);
      dV = mulsh(F[k] - Fl[k] - Fr[k], KV[k]);
      Vn[k] = V[k] + dV;
      Fn[k] = F[k] + dF;
      Pn[k] = mulsh(Vn[k], IC[k]);
    end
    for (int k = 0; k < N_PE; k++) begin
      V[k] = Vn[k]; F[k] = Fn[k]; P[k] = Pn[k];
      Ppar[k] = (k == 0) ? pin : Pn[(k - 1) / 2];
      Fl[k]   = (2*k + 1 < N_PE) ? Fn[2*k + 1] : 0;
      Fr[k]   = (2*k + 2 < N_PE) ? Fn[2*k + 2] : 0;
    end
  endtask

  // ---------------- helpers ----------------
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s got=%0d exp=%0d", what, $signed(got), $signed(exp));
    end
  endtask

  task automatic load_data(int pe, int a, int d);
    @(negedge clk);
    ld_pe = 3'(pe); ld_data_we = 1; ld_data_addr = 6'(a); ld_data_data = d;
    @(negedge clk); ld_data_we = 0;
  endtask

  task automatic check_state(string tag);
    for (int k = 0; k < N_PE; k++) begin
      dbg_pe = 3'(k);
      dbg_addr = A_V;    #1 check($sformatf("%s PE%0d V", tag, k), dbg_data, V[k]);
      dbg_addr = A_F;    #1 check($sformatf("%s PE%0d F", tag, k), dbg_data, F[k]);
      dbg_addr = A_P;    #1 check($sformatf("%s PE%0d P", tag, k), dbg_data, P[k]);
      dbg_addr = A_PPAR; #1 check($sformatf("%s PE%0d Ppar", tag, k), dbg_data, Ppar[k]);
      dbg_addr = A_FL;   #1 check($sformatf("%s PE%0d Fl", tag, k), dbg_data, Fl[k]);
      dbg_addr = A_FR;   #1 check($sformatf("%s PE%0d Fr", tag, k), dbg_data, Fr[k]);
    end
  endtask

  task automatic run_steps(int n, int pin, string tag);
    int cycles = 0;
    @(negedge clk);
    ext_in[0] = pin; n_steps = n; start = 1;
    @(negedge clk); start = 0;
    check({tag, " busy after start"}, busy, 1);
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    // clock edges from the one that samples start to the one that sets done:
    // that edge, n*STEP_LEN fetch cycles and two drain cycles
    check({tag, " cycles start->done"}, cycles, n * STEP_LEN + 3);
    check({tag, " steps_done"}, steps_done, n);
    @(negedge clk);
    check({tag, " idle after done"}, busy, 0);
    for (int s = 0; s < n; s++) ref_step(pin);
    check_state(tag);
    n_continue++;
  endtask

  // ---------------- test ----------------
  initial begin
    build_program();
    for (int k = 0; k < N_PE; k++) begin
      int gen;
      gen = (k == 0) ? 1 : (k < 3) ? 2 : 3;
      R[k]  = 65536 * gen / 2 + 4096 * k;  // deeper: larger resistance; siblings differ
      KL[k] = 1311;                    // dt/L = 0.02
      KV[k] = 1311;                    // dt = 0.02
      IC[k] = 65536 * gen;             // deeper branches: smaller compliance
      V[k] = 0; F[k] = 0; P[k] = 0; Ppar[k] = 0; Fl[k] = 0; Fr[k] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load the same program into every PE, and each PE's data
    for (int k = 0; k < N_PE; k++) begin
      for (int i = 0; i < STEP_LEN; i++) begin
        @(negedge clk);
        ld_pe = 3'(k); ld_inst_we = 1; ld_inst_addr = 10'(i); ld_inst_data = prog[i];
      end
      @(negedge clk); ld_inst_we = 0;
      for (int a = 0; a <= A_DF; a++) load_data(k, a, 0);
      load_data(k, A_R, R[k]); load_data(k, A_KL, KL[k]);
      load_data(k, A_KV, KV[k]); load_data(k, A_IC, IC[k]);
    end

    // square-wave driving pressure, +/- 10.0 in Q16.16
    run_steps(1,   655360, "run1");
    run_steps(24,  655360, "run2");
    run_steps(40, -655360, "run3");
    run_steps(40,  655360, "run4");
    run_steps(15, -655360, "run5");

    // something must actually have moved through the tree
    dbg_pe = 3; dbg_addr = A_V; #1;
    checks++;
    if (dbg_data == 0) begin failures++; $display("FAIL leaf volume never changed"); end

    $display("mechanisms: fwd1=%0d fwd2=%0d zero=%0d store_own=%0d store_pe=%0d store_ext=%0d idle=%0d wraps=%0d continued_runs=%0d",
             n_fwd1, n_fwd2, n_zero, n_store_own, n_store_pe, n_store_ext, n_idle, n_wrap, n_continue);
    checks++; if (n_fwd1 == 0)      begin failures++; $display("FAIL forward path 1 never used"); end
    checks++; if (n_fwd2 == 0)      begin failures++; $display("FAIL forward path 2 never used"); end
    checks++; if (n_zero == 0)      begin failures++; $display("FAIL zero operand never used"); end
    checks++; if (n_store_own == 0) begin failures++; $display("FAIL no store of own output"); end
    checks++; if (n_store_pe == 0)  begin failures++; $display("FAIL no PE-to-PE transfer"); end
    checks++; if (n_store_ext == 0) begin failures++; $display("FAIL external input never stored"); end
    checks++; if (n_idle == 0)      begin failures++; $display("FAIL no idle word"); end
    checks++; if (n_wrap != N_PE * 120) begin failures++; $display("FAIL step wraps %0d", n_wrap); end
    checks++; if (n_continue < 2)   begin failures++; $display("FAIL no continued run"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
