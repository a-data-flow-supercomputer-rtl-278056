// dfs_pkg: shared constants and packet formats of the static data flow machine.
//
// The machine is a ring: processing elements (PEs) send operation packets
// through RN2 to floating point ADD / MUL units, or on through RN3 to array
// memory (AM) modules; every unit emits result and signal packets that RN1
// delivers back to the PE holding the target instruction cell.
//
// Sizes that follow the design description: 256 PEs, 32 array memory modules
// of 64K words, 128 ADD and 96 MUL units (4 ADD + 3 MUL + 1 RN3 port behind
// each (8,8) RN2), 32-bit words, four 32-bit words of instruction memory per
// cell in a 4K-word PE memory (1024 cells).  The field layouts below (opcode
// encoding, destination format, six destinations per cell, IEEE-754 binary32
// numbers, address split) are choices of this implementation.
package dfs_pkg;

  localparam int WORD_W    = 32;
  localparam int NPE       = 256;             // processing elements
  localparam int PE_W      = 8;               // PE number field
  localparam int NCELL     = 1024;            // 4K words / 4 words per cell
  localparam int CELL_W    = 10;              // cell number field
  localparam int NDEST     = 6;               // destination fields per cell
  localparam int NAM       = 32;              // array memory modules
  localparam int AM_W      = 5;               // module number field
  localparam int AM_WORDS  = 65536;           // words per module
  localparam int AMA_W     = 16;              // word address inside a module
  localparam int CLUSTER   = 8;               // PEs behind one (8,8) RN2
  localparam int NADD_PER  = 4;               // ADD units behind one RN2
  localparam int NMUL_PER  = 3;               // MUL units behind one RN2
  localparam int UNIT_W    = 3;               // RN2 output number
  localparam int AM_PORT   = 7;               // RN2 output that leads to RN3

  // Operand field numbers used in a destination; PORT_SIG marks a signal arc.
  localparam logic [1:0] PORT_OP1  = 2'd0;
  localparam logic [1:0] PORT_OP2  = 2'd1;
  localparam logic [1:0] PORT_CTL  = 2'd2;
  localparam logic [1:0] PORT_SIG  = 2'd3;

  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    // functional unit operations (leave the PE as operation packets)
    OP_ADD   = 5'd1,   // ADD unit: a + b
    OP_SUB   = 5'd2,   // ADD unit: a - b
    OP_MUL   = 5'd3,   // MUL unit: a * b
    OP_INDEX = 5'd4,   // AM: block pointer a + index b -> absolute address
    OP_READ  = 5'd5,   // AM: mem[a]
    OP_WRITE = 5'd6,   // AM: mem[a] := b, result b
    // operations performed inside the PE
    OP_ID    = 5'd7,   // identity (also the forwarding op sent to ADD units)
    OP_MERGE = 5'd8,   // control ? a : b
    OP_IADD  = 5'd9,
    OP_ISUB  = 5'd10,
    OP_IEQ   = 5'd11,
    OP_ILT   = 5'd12,  // signed integer less-than
    OP_FLT   = 5'd13,  // floating point less-than
    OP_AND   = 5'd14,
    OP_OR    = 5'd15,
    OP_NOT   = 5'd16
  } opcode_e;

  typedef enum logic [1:0] {
    G_ALWAYS = 2'd0,   // untagged arc
    G_T      = 2'd1,   // sent only when the control operand is true
    G_F      = 2'd2    // sent only when the control operand is false
  } gate_e;

  // One destination field of an instruction cell.
  typedef struct packed {
    logic              valid;
    gate_e             gate;
    logic              host;   // deliver to the host port of PE 'pe'
    logic [PE_W-1:0]   pe;
    logic [CELL_W-1:0] cid;
    logic [1:0]        port;   // PORT_OP1/OP2/CTL or PORT_SIG
  } dest_t;

  // Result or signal packet (carried by RN1).
  typedef struct packed {
    logic              host;
    logic [PE_W-1:0]   pe;
    logic [CELL_W-1:0] cid;
    logic [1:0]        port;
    logic [WORD_W-1:0] value;
  } res_pkt_t;

  // Operation packet (carried by RN2 and RN3): an enabled cell with its operands.
  typedef struct packed {
    logic [UNIT_W-1:0]  unit;  // RN2 output
    logic [AM_W-1:0]    am;    // RN3 output
    opcode_e            op;
    logic [WORD_W-1:0]  a;
    logic [WORD_W-1:0]  b;
    dest_t [NDEST-1:0]  dest;  // already filtered by the control operand
  } op_pkt_t;

  // Static part of an instruction cell, written by the program loader.
  typedef struct packed {
    opcode_e            op;
    logic               gated;   // has a Boolean control operand
    logic [1:0]         konst;   // operand 1/2 is a constant
    logic [3:0]         reset_t; // signal reset (control true or ungated)
    logic [3:0]         reset_f; // signal reset (control false)
    dest_t [NDEST-1:0]  dest;
  } instr_t;

  // Bit positions of the routing fields, for the routing networks.
  localparam int RES_W       = $bits(res_pkt_t);
  localparam int OP_W        = $bits(op_pkt_t);
  localparam int RES_PE_LSB  = WORD_W + 2 + CELL_W;
  localparam int OP_UNIT_LSB = OP_W - UNIT_W;
  localparam int OP_AM_LSB   = OP_W - UNIT_W - AM_W;

  function automatic logic is_fu_op(opcode_e op);
    return op inside {OP_ADD, OP_SUB, OP_MUL, OP_INDEX, OP_READ, OP_WRITE};
  endfunction

  function automatic logic needs_b(opcode_e op);
    return op inside {OP_ADD, OP_SUB, OP_MUL, OP_INDEX, OP_WRITE, OP_IADD,
                      OP_ISUB, OP_IEQ, OP_ILT, OP_FLT, OP_AND, OP_OR};
  endfunction

endpackage
