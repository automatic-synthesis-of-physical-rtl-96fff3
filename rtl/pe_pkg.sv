// pe_pkg: shared types and constants of the general ODE processing element (PE)
// and of the point-to-point PE network.
//
// A PE has no instruction decoder: each instruction RAM word is a microcoded
// control word whose fields drive the datapath directly.  Two kinds of word
// do work, as in the PE this RTL follows: STORE writes the input mux output
// (own Out reg or an input port) into the data RAM, COMPUTE reads the data
// RAM (or a forward path) and sends an ALU result to the Out reg.  IDLE does
// nothing and pads programs so that every PE of a network has the same
// number of instructions per solver step.  The numeric encodings and the
// field order below are this design's own choice.
//
// Control word, LSB first:
//   kind  [1:0]   K_IDLE / K_STORE / K_COMPUTE
//   op    [2:0]   ALU operation (COMPUTE)
//   isel  [ISW]   input mux select, 0 = own Out reg (d0), p = port p (STORE)
//   src_a [1:0]   operand A source (COMPUTE)
//   src_b [1:0]   operand B source (COMPUTE)
//   shamt [4:0]   shift amount of MUL/SHL/SHR (COMPUTE)
//   addr_a[AW]    read address A (COMPUTE) or write address (STORE)
//   addr_b[AW]    read address B (COMPUTE)
// where AW = clog2(data RAM depth) and ISW = clog2(input ports + 1).
package pe_pkg;

  localparam int unsigned DW_DEFAULT = 32;  // 32-bit fixed point
  localparam int unsigned SHW        = 5;   // shift amount width for 32-bit words

  typedef enum logic [1:0] {
    K_IDLE    = 2'd0,
    K_STORE   = 2'd1,
    K_COMPUTE = 2'd2
  } kind_e;

  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,  // a + b
    OP_SUB  = 3'd1,  // a - b
    OP_MUL  = 3'd2,  // (a * b) >>> shamt, full 64-bit signed product
    OP_SHL  = 3'd3,  // a << shamt
    OP_SHR  = 3'd4,  // a >>> shamt (arithmetic)
    OP_PASS = 3'd5   // a
  } op_e;

  // ALU operation sets: bit k enables the op_e value k.  A PE whose programs
  // never multiply can leave out the multiplier (OPS_ALL without OP_MUL).
  localparam logic [7:0] OPS_ALL = 8'h3F;

  // Operand source.  SRC_FWD2 and SRC_ZERO are selected by the mux in front
  // of the Data reg, SRC_FWD1 by the mux in front of the ALU.
  typedef enum logic [1:0] {
    SRC_RAM  = 2'd0,  // data RAM word, through the Data reg
    SRC_FWD1 = 2'd1,  // Out reg into the ALU: result of the previous compute
    SRC_FWD2 = 2'd2,  // Out reg into the Data reg: result two instructions back
    SRC_ZERO = 2'd3   // constant zero (e.g. "compute RAM[5] + 0" to send a word)
  } src_e;

  // Width of the address and select fields for a given PE version.
  function automatic int unsigned addr_w(input int unsigned depth);
    return (depth < 2) ? 1 : $clog2(depth);
  endfunction

  function automatic int unsigned isel_w(input int unsigned n_in);
    return $clog2(n_in + 1);
  endfunction

  function automatic int unsigned cw_width(input int unsigned data_depth,
                                           input int unsigned n_in);
    return 2 + 3 + isel_w(n_in) + 2 + 2 + SHW + 2 * addr_w(data_depth);
  endfunction

  // Network port source code: a value below the number of PEs names a PE
  // output, N_PE + k names external input k, CONN_NONE ties the port to zero.
  localparam logic [15:0] CONN_NONE = 16'hFFFF;

endpackage
