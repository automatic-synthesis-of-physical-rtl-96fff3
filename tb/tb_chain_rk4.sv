// tb_chain_rk4: workload test of the PE network on a linear chain model, the
// structure of the segmented airway (gas cell) lung model, solved with the
// classical fourth-order Runge-Kutta method.
//
// Eight cells in a row, one per PE, each with one ODE
//   dy(i)/dt = k * (y(i-1) - 2 y(i) + y(i+1))
// where y(-1) is the external input (concentration at the airway opening)
// and y(8) = 0.  In Q16.16 with KH = k*h, one RK4 step is
//   d1 = f(y)          u2 = y + d1/2
//   d2 = f(u2)         u3 = y + d2/2
//   d3 = f(u3)         u4 = y + d3
//   d4 = f(u4)         y  = y + (d1 + 2 d2 + 2 d3 + d4) * (1/6)
// with f(u) = KH * ((u_left - u) + u_right - u).  Each stage needs the
// neighbours' stage values, so every stage ends with an exchange: the stage
// value sits in the Out reg while the PE stores it and both neighbours store
// it from their ports.  The program is 47 words per step and leans on both
// forward paths.  The network uses the default PE (3 ports, 64 words) with
// a chain CONN: port 1 = left neighbour (external input for PE 0), port 2 =
// right neighbour.
//
// A second copy of the network is built from a different PE version per PE
// (3, 7 or 15 ports; 32, 64, 128 or 1024 data words, the last in the block
// RAM build; 1024 or 2048 instruction words; with or without the unused
// PASS operation) and runs the same program,
// packed for each PE's control word layout.  It shows that all these
// versions give programs the same timing.
//
// A reference model here steps the same integer arithmetic.  Checked: every
// y and every received neighbour word of both networks after 1, 5 and 30
// more steps, with the input switched between runs, the cycle count of each
// run, and that the two networks' outputs agree in every cycle.
module tb_chain_rk4;
  import pe_pkg::*;

  localparam int N_PE = 8, N_IN = 3, AW = 6, ISW = 2, CW = cw_width(64, 3);
  // second network: mixed PE versions, largest 15 ports, 1024 words, 2 BRAMs
  localparam int NIB = 15, AWB = 10, IAB = 11, CWB = cw_width(1024, NIB);
  localparam int unsigned VB_N_IN [N_PE] = '{3, 7, 3, 15, 3, 7, 3, 3};
  localparam int unsigned VB_DEPTH [N_PE] = '{1024, 64, 32, 1024, 128, 1024, 64, 32};
  localparam int unsigned VB_INST [N_PE] = '{1024, 2048, 1024, 1024, 2048, 1024, 1024, 1024};
  localparam logic [7:0] NO_PASS = OPS_ALL & ~(8'd1 << OP_PASS);   // PASS is not used
  localparam logic [7:0] VB_OPS [N_PE] = '{OPS_ALL, NO_PASS, OPS_ALL, NO_PASS,
                                           OPS_ALL, NO_PASS, OPS_ALL, NO_PASS};
  localparam int S = 16;
  localparam int STEP_LEN = 47;
  localparam int A_Y = 0, A_U = 1, A_UL = 2, A_UR = 3, A_KH = 4, A_ACC = 5,
                 A_C6 = 6, A_D = 7;
  localparam int KH = 9830;        // k*h = 0.15
  localparam int C6 = 10923;       // 1/6

  function automatic logic [N_PE-1:0][N_IN-1:0][15:0] chain_conn();
    logic [N_PE-1:0][N_IN-1:0][15:0] c;
    for (int i = 0; i < N_PE; i++) begin
      c[i][0] = (i == 0) ? 16'(N_PE) : 16'(i - 1);
      c[i][1] = (i == N_PE - 1) ? CONN_NONE : 16'(i + 1);
      c[i][2] = CONN_NONE;
    end
    return c;
  endfunction

  function automatic logic [N_PE-1:0][NIB-1:0][15:0] chain_conn_b();
    logic [N_PE-1:0][NIB-1:0][15:0] c;
    for (int i = 0; i < N_PE; i++) begin
      for (int p = 0; p < NIB; p++) c[i][p] = CONN_NONE;
      c[i][0] = (i == 0) ? 16'(N_PE) : 16'(i - 1);
      if (i < N_PE - 1) c[i][1] = 16'(i + 1);
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
  logic [2:0]       ld_pe = 0, dbg_pe = 0;
  logic             ld_inst_we = 0, ld_data_we = 0;
  logic [9:0]       ld_inst_addr = 0;
  logic [CW-1:0]    ld_inst_data = 0;
  logic [CWB-1:0]   ld_inst_data_b = 0;
  logic [IAB-1:0]   ld_inst_addr_b = 0;
  logic [11:0]      step_len_b = 12'(STEP_LEN);
  logic [AW-1:0]    ld_data_addr = 0, dbg_addr = 0;
  logic [AWB-1:0]   ld_data_addr_b = 0, dbg_addr_b = 0;
  logic [31:0]      ld_data_data = 0, dbg_data, dbg_data_b;
  logic             busy_b, done_b;
  logic [31:0]      steps_done_b;
  logic [N_PE-1:0][31:0] pe_out_b;
  int               lockstep_errors = 0;
  int               checks = 0, failures = 0;

  pe_network #(.N_PE(N_PE), .CONN(chain_conn())) dut (
    .clk, .rst_n, .start, .n_steps, .step_len, .busy, .done, .steps_done,
    .ext_in, .pe_out,
    .ld_pe, .ld_inst_we, .ld_inst_addr, .ld_inst_data,
    .ld_data_we, .ld_data_addr, .ld_data_data,
    .dbg_pe, .dbg_addr, .dbg_data
  );

  // Same chain built from a different PE version per PE, block RAM data RAMs
  // included (registered read, monitor port one edge late).  Each PE gets
  // the same program, packed for its own control word layout.
  pe_network #(
    .N_PE(N_PE), .N_IN(NIB), .DATA_DEPTH(1024), .INST_DEPTH(2048),
    .CONN(chain_conn_b()),
    .PE_N_IN(VB_N_IN), .PE_DATA_DEPTH(VB_DEPTH), .PE_INST_DEPTH(VB_INST),
    .PE_ALU_OPS(VB_OPS)
  ) dut_b (
    .clk, .rst_n, .start, .n_steps, .step_len(step_len_b), .busy(busy_b), .done(done_b),
    .steps_done(steps_done_b), .ext_in, .pe_out(pe_out_b),
    .ld_pe, .ld_inst_we, .ld_inst_addr(ld_inst_addr_b), .ld_inst_data(ld_inst_data_b),
    .ld_data_we, .ld_data_addr(ld_data_addr_b), .ld_data_data,
    .dbg_pe, .dbg_addr(dbg_addr_b), .dbg_data(dbg_data_b)
  );

  // both builds must run in lock-step: same outputs in every cycle
  always @(negedge clk) begin
    if (rst_n && (pe_out_b !== pe_out || done_b !== done || busy_b !== busy ||
                  steps_done_b !== steps_done))
      lockstep_errors++;
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  // Instructions are kept here as field lists and packed for each build.
  typedef struct {
    kind_e k; op_e o; int isel; src_e sa; src_e sb; int sh; int a; int b;
  } ins_t;

  function automatic ins_t comp(op_e o, src_e sa, int a, src_e sb, int b, int sh = 0);
    ins_t i = '{K_COMPUTE, o, 0, sa, sb, sh, a, b};
    return i;
  endfunction
  function automatic ins_t store(int isel, int addr);
    ins_t i = '{K_STORE, OP_ADD, isel, SRC_RAM, SRC_RAM, 0, addr, 0};
    return i;
  endfunction
  function automatic ins_t idle();
    ins_t i = '{K_IDLE, OP_ADD, 0, SRC_RAM, SRC_RAM, 0, 0, 0};
    return i;
  endfunction
  function automatic logic [CW-1:0] pack(ins_t i);
    return {AW'(i.b), AW'(i.a), 5'(i.sh), i.sb, i.sa, ISW'(i.isel), i.o, i.k};
  endfunction
  // any version: select field isw bits, addresses aw bits each
  function automatic logic [CWB-1:0] pack_v(ins_t i, int isw, int aw);
    logic [63:0] w;
    w = 64'(i.k) | (64'(i.o) << 2) | (64'(i.isel) << 5) |
        (64'(i.sa) << (5 + isw)) | (64'(i.sb) << (7 + isw)) |
        (64'(i.sh) << (9 + isw)) | (64'(i.a) << (14 + isw)) |
        (64'(i.b) << (14 + isw + aw));
    return CWB'(w);
  endfunction

  ins_t prog [STEP_LEN];

  task automatic build_program();
    int pc = 0;
    for (int s = 1; s <= 4; s++) begin
      // d_s = KH * (ul - u + ur - u), from the current stage values
      prog[pc++] = comp(OP_SUB, SRC_RAM,  A_UL, SRC_RAM, A_U);
      prog[pc++] = comp(OP_ADD, SRC_FWD1, 0,    SRC_RAM, A_UR);
      prog[pc++] = comp(OP_SUB, SRC_FWD1, 0,    SRC_RAM, A_U);
      prog[pc++] = comp(OP_MUL, SRC_FWD1, 0,    SRC_RAM, A_KH, S);
      case (s)
        1: begin
          prog[pc++] = comp(OP_SHR, SRC_FWD1, 0, SRC_ZERO, 0, 1);     // d1/2
          prog[pc++] = store(0, A_ACC);                               // acc = d1
          prog[pc++] = comp(OP_ADD, SRC_FWD2, 0, SRC_RAM, A_Y);       // u2
          prog[pc++] = idle();
        end
        2: begin
          prog[pc++] = comp(OP_SHL, SRC_FWD1, 0, SRC_ZERO, 0, 1);     // 2 d2
          prog[pc++] = comp(OP_SHR, SRC_FWD2, 0, SRC_ZERO, 0, 1);     // d2/2
          prog[pc++] = comp(OP_ADD, SRC_FWD2, 0, SRC_RAM, A_ACC);     // acc + 2 d2
          prog[pc++] = comp(OP_ADD, SRC_FWD2, 0, SRC_RAM, A_Y);       // u3
          prog[pc++] = store(0, A_ACC);
        end
        3: begin
          prog[pc++] = comp(OP_SHL, SRC_FWD1, 0, SRC_ZERO, 0, 1);     // 2 d3
          prog[pc++] = store(0, A_D);                                 // keep d3
          prog[pc++] = comp(OP_ADD, SRC_FWD2, 0, SRC_RAM, A_ACC);     // acc + 2 d3
          prog[pc++] = comp(OP_ADD, SRC_RAM, A_Y, SRC_RAM, A_D);      // u4
          prog[pc++] = store(0, A_ACC);
        end
        default: begin
          prog[pc++] = comp(OP_ADD, SRC_FWD1, 0, SRC_RAM, A_ACC);     // acc + d4
          prog[pc++] = comp(OP_MUL, SRC_FWD1, 0, SRC_RAM, A_C6, S);   // / 6
          prog[pc++] = comp(OP_ADD, SRC_FWD1, 0, SRC_RAM, A_Y);       // new y
          prog[pc++] = idle();
          prog[pc++] = store(0, A_Y);
        end
      endcase
      // exchange the new stage value (or new y): own copy, left, right
      prog[pc++] = store(0, A_U);
      prog[pc++] = store(1, A_UL);
      prog[pc++] = store(2, A_UR);
    end
    if (pc != STEP_LEN) $fatal(1, "program length %0d", pc);
  endtask

  // ---------------- reference model ----------------
  int y [N_PE], yl [N_PE], yr [N_PE];

  function automatic int mulsh(int a, int b);
    longint p = longint'(a) * longint'(b);
    p = p >>> S;
    return int'(p[31:0]);
  endfunction

  task automatic ref_step(int yin);
    int u [N_PE], d [N_PE], acc [N_PE], ul [N_PE], ur [N_PE];
    for (int i = 0; i < N_PE; i++) begin u[i] = y[i]; ul[i] = yl[i]; ur[i] = yr[i]; end
    for (int s = 1; s <= 4; s++) begin
      for (int i = 0; i < N_PE; i++) begin
        d[i] = mulsh(((ul[i] - u[i]) + ur[i]) - u[i], KH);
        case (s)
          1: begin acc[i] = d[i];             u[i] = y[i] + (d[i] >>> 1); end
          2: begin acc[i] = acc[i] + (d[i] <<< 1); u[i] = y[i] + (d[i] >>> 1); end
          3: begin acc[i] = acc[i] + (d[i] <<< 1); u[i] = y[i] + d[i]; end
          default: begin y[i] = y[i] + mulsh(acc[i] + d[i], C6); u[i] = y[i]; end
        endcase
      end
      for (int i = 0; i < N_PE; i++) begin
        ul[i] = (i == 0) ? yin : u[i - 1];
        ur[i] = (i == N_PE - 1) ? 0 : u[i + 1];
      end
    end
    for (int i = 0; i < N_PE; i++) begin yl[i] = ul[i]; yr[i] = ur[i]; end
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
    ld_pe = 3'(pe); ld_data_we = 1; ld_data_addr = AW'(a); ld_data_addr_b = AWB'(a);
    ld_data_data = d;
    @(negedge clk); ld_data_we = 0;
  endtask

  task automatic run_steps(int n, int yin, string tag);
    int cycles = 1;
    @(negedge clk); ext_in[0] = yin; n_steps = n; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cycles++; end
    check({tag, " cycles"}, cycles, n * STEP_LEN + 3);
    check({tag, " lock-step"}, lockstep_errors, 0);
    @(negedge clk);
    for (int s = 0; s < n; s++) ref_step(yin);
    for (int i = 0; i < N_PE; i++) begin
      read_check($sformatf("%s y[%0d]", tag, i), i, A_Y, y[i]);
      read_check($sformatf("%s u[%0d]", tag, i), i, A_U, y[i]);
      read_check($sformatf("%s left of %0d", tag, i), i, A_UL, yl[i]);
      read_check($sformatf("%s right of %0d", tag, i), i, A_UR, yr[i]);
    end
  endtask

  // monitor read of both builds; the block RAM build answers one edge later
  task automatic read_check(string what, int pe, int a, int exp);
    dbg_pe = 3'(pe); dbg_addr = AW'(a); dbg_addr_b = AWB'(a);
    #1 check(what, dbg_data, exp);
    @(posedge clk); #1 check({what, " (block RAM)"}, dbg_data_b, exp);
  endtask

  // ---------------- test ----------------
  initial begin
    build_program();
    for (int i = 0; i < N_PE; i++) begin
      y[i] = (i == 5) ? (20 << 16) : 0;
    end
    for (int i = 0; i < N_PE; i++) begin
      yl[i] = (i == 0) ? 0 : y[i - 1];
      yr[i] = (i == N_PE - 1) ? 0 : y[i + 1];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < N_PE; p++) begin
      for (int k = 0; k < STEP_LEN; k++) begin
        @(negedge clk);
        ld_pe = 3'(p); ld_inst_we = 1; ld_inst_addr = 10'(k);
        ld_inst_addr_b = IAB'(k);
        ld_inst_data = pack(prog[k]);
        ld_inst_data_b = pack_v(prog[k], int'(isel_w(VB_N_IN[p])), int'(addr_w(VB_DEPTH[p])));
      end
      @(negedge clk); ld_inst_we = 0;
      load_data(p, A_Y, y[p]);   load_data(p, A_U, y[p]);
      load_data(p, A_UL, yl[p]); load_data(p, A_UR, yr[p]);
      load_data(p, A_KH, KH);    load_data(p, A_C6, C6);
      load_data(p, A_ACC, 0);    load_data(p, A_D, 0);
    end

    run_steps(1,  100 << 16, "step1");
    run_steps(5,  100 << 16, "step6");
    run_steps(30, 0,         "step36");

    dbg_pe = 7; dbg_addr = AW'(A_Y); #1;
    checks++;
    if (dbg_data == 0) begin failures++; $display("FAIL far end of the chain never changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
