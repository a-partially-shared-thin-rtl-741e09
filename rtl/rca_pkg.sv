// rca_pkg: sizes, operation encodings and configuration formats shared by the
// partially shared thin reconfigurable array (four cores, one thin column each).
//
// Sizes that follow the document: 4 cores and 4 columns, 3 processing elements
// (PEs) and 1 load/store unit per column, 32-entry array register files with 10
// read and 5 write ports, configurations generated as if a column had 5 PEs,
// 128 configurations per configuration cache.
// Own choices of this design: 16 configuration words per configuration, the
// operation set (the MIPS integer ALU subset), the bit layout of a slot and of a
// configuration header, 2-bit thread priorities.
package rca_pkg;

  localparam int XLEN      = 32;   // word-level datapath
  localparam int NCORES    = 4;    // processing cores = reconfigurable columns
  localparam int NPE       = 3;    // physical PEs per column
  localparam int NSLOT     = 5;    // operations per configuration word (virtual 5-PE column)
  localparam int NREG      = 32;   // entries of each array register file
  localparam int NRD       = 10;   // read ports per array register file
  localparam int NWR       = 5;    // write ports per array register file
  localparam int NWORDS    = 16;   // configuration words per configuration (assumed)
  localparam int NCONF     = 128;  // configurations per configuration cache
  localparam int PRIO_W    = 2;    // thread priority width (assumed)

  // Word-level PE operations. Operand a comes from the first read port of the
  // slot, operand b from the second read port or the slot's immediate.
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,  OP_SUB  = 4'd1,  OP_AND = 4'd2,  OP_OR  = 4'd3,
    OP_XOR  = 4'd4,  OP_NOR  = 4'd5,  OP_SLT = 4'd6,  OP_SLTU = 4'd7,
    OP_SLL  = 4'd8,  OP_SRL  = 4'd9,  OP_SRA = 4'd10, OP_LUI = 4'd11
  } alu_op_e;

  // One operation of a configuration word.
  typedef struct packed {
    logic            valid;
    logic            is_mem;    // executed by the column's load/store unit
    logic            is_store;  // with is_mem: store R[rb] to R[ra]+imm, else load
    alu_op_e         op;        // PE operation when !is_mem
    logic [4:0]      rd;        // destination register (0 = no write)
    logic [4:0]      ra;        // first source register
    logic [4:0]      rb;        // second source register
    logic            b_imm;     // operand b is imm instead of R[rb]
    logic [XLEN-1:0] imm;       // already sign/zero extended immediate
  } slot_t;

  typedef slot_t [NSLOT-1:0] cword_t;

  // Configuration header: where it starts, where the core resumes, its length.
  typedef struct packed {
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] next_pc;
    logic [4:0]      nwords;    // 1..NWORDS
  } chdr_t;

  // Scheduler's control of one physical PE (configuration bits plus the routing
  // bits it adds: which core's register file the PE reads and writes).
  typedef struct packed {
    logic            valid;
    logic [1:0]      owner;     // core whose register file feeds and receives it
    logic [2:0]      slot;      // slot of the owner's word, selects read ports 2s/2s+1
    alu_op_e         op;
    logic            b_imm;
    logic [XLEN-1:0] imm;
  } pe_ctl_t;

  // Where the operation in a (core, slot) position executes this cycle.
  typedef struct packed {
    logic       go;             // executes this cycle
    logic [1:0] col;            // column of the PE
    logic [1:0] pe;             // PE index 0..2, 3 = load/store unit
  } exec_t;

  localparam logic [1:0] EXEC_LSU = 2'd3;

endpackage
