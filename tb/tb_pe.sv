// tb_pe: self-checking test of one pipelined PE (3 ports, 64-word data RAM,
// 1024-word instruction RAM).  Loads a 16-word program that uses every ALU
// operation, both forward paths, the zero operand, IDLE words and STOREs
// from the own output and from each input port, runs it for one and then two
// steps, and checks:
//   - the data RAM words written by the program (values worked out by hand),
//   - the Out reg timeline: a COMPUTE fetched in cycle k of a run is on dout
//     from cycle k+3 on (fetch, Data reg, Out reg),
//   - that the PC wraps so a second step repeats the program.
module tb_pe;
  import pe_pkg::*;

  localparam int AW = 6, ISW = 2, CW = cw_width(64, 3);

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            run = 1'b0;
  logic [10:0]     step_len = 11'd16;
  logic [3:1][31:0] din;
  logic [31:0]     dout;
  logic            ld_inst_we = 0, ld_data_we = 0;
  logic [9:0]      ld_inst_addr = 0;
  logic [CW-1:0]   ld_inst_data = 0;
  logic [5:0]      ld_data_addr = 0, dbg_addr = 0;
  logic [31:0]     ld_data_data = 0, dbg_data;
  int              checks = 0, failures = 0;

  pe #(.DW(32), .N_IN(3), .DATA_DEPTH(64), .INST_DEPTH(1024)) dut (
    .clk, .rst_n, .run, .step_len, .din, .dout,
    .ld_inst_we, .ld_inst_addr, .ld_inst_data,
    .ld_data_we, .ld_data_addr, .ld_data_data,
    .dbg_addr, .dbg_data
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // control word encoder, field order as documented in pe_pkg
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
  function automatic logic [CW-1:0] idle();
    return '0;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0d (%h) exp=%0d (%h)", what, $signed(got), got, $signed(exp), exp);
    end
  endtask

  task automatic ld_data(int a, logic [31:0] d);
    @(negedge clk); ld_data_we = 1; ld_data_addr = 6'(a); ld_data_data = d;
    @(negedge clk); ld_data_we = 0;
  endtask

  logic [CW-1:0] prog [16];
  int            exp_out [int];   // cycle -> expected dout from then on

  initial begin
    prog[0]  = comp(OP_ADD,  SRC_RAM,  0, SRC_RAM,  1);        // 7 + 5 = 12
    prog[1]  = comp(OP_SUB,  SRC_FWD1, 0, SRC_RAM,  2);        // 12 - (-3) = 15
    prog[2]  = comp(OP_MUL,  SRC_FWD1, 0, SRC_FWD2, 0);        // 15 * 12 = 180
    prog[3]  = idle();
    prog[4]  = store(0, 10);                                   // RAM10 = 180
    prog[5]  = comp(OP_MUL,  SRC_RAM,  4, SRC_RAM,  5, 16);    // 1.5*2.25 Q16
    prog[6]  = comp(OP_SHR,  SRC_RAM,  3, SRC_ZERO, 0, 2);     // 100 >>> 2 = 25
    prog[7]  = store(0, 11);                                   // RAM11 = 3.375 Q16
    prog[8]  = store(1, 12);                                   // RAM12 = din[1]
    prog[9]  = store(2, 13);
    prog[10] = store(3, 14);
    prog[11] = comp(OP_ADD,  SRC_RAM, 10, SRC_ZERO, 0);        // 180 + 0
    prog[12] = comp(OP_SUB,  SRC_ZERO, 0, SRC_FWD2, 0);        // 0 - 25 = -25
    prog[13] = comp(OP_SHL,  SRC_FWD1, 0, SRC_RAM,  0, 3);     // -25 << 3 = -200
    prog[14] = idle();
    prog[15] = store(0, 15);                                   // RAM15 = -200
    exp_out[3] = 12;  exp_out[4] = 15;  exp_out[5] = 180; exp_out[8] = 221184;
    exp_out[9] = 25;  exp_out[14] = 180; exp_out[15] = -25; exp_out[16] = -200;

    din[1] = 32'h1111_0001; din[2] = 32'h2222_0002; din[3] = 32'h3333_0003;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); ld_inst_we = 1; ld_inst_addr = 10'(i); ld_inst_data = prog[i];
    end
    @(negedge clk); ld_inst_we = 0;
    ld_data(0, 7); ld_data(1, 5); ld_data(2, -3); ld_data(3, 100);
    ld_data(4, 32'h0001_8000); ld_data(5, 32'h0002_4000);
    for (int a = 10; a < 16; a++) ld_data(a, 32'hdead_0000 + a);

    // ---- one step, checking the Out reg timeline cycle by cycle ----
    begin
      logic [31:0] cur;
      cur = 0;
      @(negedge clk); run = 1;
      for (int c = 0; c < 19; c++) begin
        if (exp_out.exists(c)) cur = exp_out[c];
        check($sformatf("dout in cycle %0d", c), dout, cur);
        @(negedge clk);
        if (c == 15) run = 0;
      end
    end
    dbg_addr = 10; #1 check("RAM10 (fwd1, fwd2, store d0)", dbg_data, 180);
    dbg_addr = 11; #1 check("RAM11 Q16 multiply", dbg_data, 221184);
    dbg_addr = 12; #1 check("RAM12 from port 1", dbg_data, 32'h1111_0001);
    dbg_addr = 13; #1 check("RAM13 from port 2", dbg_data, 32'h2222_0002);
    dbg_addr = 14; #1 check("RAM14 from port 3", dbg_data, 32'h3333_0003);
    dbg_addr = 15; #1 check("RAM15 zero/fwd chain", dbg_data, -200);
    dbg_addr = 0;  #1 check("RAM0 untouched", dbg_data, 7);

    // ---- two steps back to back: PC wraps, program repeats ----
    ld_data(10, 0); ld_data(15, 0);
    din[2] = 32'h0bad_cafe;
    @(negedge clk); run = 1;
    repeat (32) @(negedge clk);
    run = 0;
    repeat (3) @(negedge clk);
    dbg_addr = 10; #1 check("RAM10 after two steps", dbg_data, 180);
    dbg_addr = 13; #1 check("RAM13 new port 2 value", dbg_data, 32'h0bad_cafe);
    dbg_addr = 15; #1 check("RAM15 after two steps", dbg_data, -200);
    check("dout after two steps", dout, -200);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
