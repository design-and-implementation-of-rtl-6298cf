// lars_pkg: types and constants shared by the DATA LARs processor.
//
// A DATA LAR (line associative register) is a 132-bit record: a 64-bit line of
// packed SIMD data, a 64-bit address split into a 61-bit tag and a 3-bit byte
// word offset, a 2-bit element size (WDSZ), a sign bit (TYP) and a dirty bit.
// Instructions are 32 bits with a 5-bit opcode and three 5-bit LAR fields; only
// the low 3 bits of a LAR field select one of the 8 LARs. The opcode map, the
// field positions and the WDSZ/TYP codes follow the instruction-set tables.
// The control-word layout (ctrl_t) and the ALU operation codes are this
// design's own.
package lars_pkg;

  localparam int unsigned XLEN      = 64;   // LAR data and address width
  localparam int unsigned TAG_W     = 61;   // line tag
  localparam int unsigned WOFF_W    = 3;    // byte offset within the 8-byte line

  // Element size codes (WDSZ)
  typedef enum logic [1:0] {
    WD_BYTE = 2'b00, WD_HALF = 2'b01, WD_WORD = 2'b10, WD_DWORD = 2'b11
  } wdsz_e;

  // Opcodes
  typedef enum logic [4:0] {
    OP_NOP      = 5'h00,
    OP_LOADUB   = 5'h01, OP_LOADUHW = 5'h02, OP_LOADUW = 5'h03, OP_LOADUDW = 5'h04,
    OP_LOADSB   = 5'h05, OP_LOADSHW = 5'h06, OP_LOADSW = 5'h07, OP_LOADSDW = 5'h08,
    OP_STOREUB  = 5'h09, OP_STOREUHW= 5'h0A, OP_STOREUW= 5'h0B, OP_STOREUDW= 5'h0C,
    OP_STORESB  = 5'h0D, OP_STORESHW= 5'h0E, OP_STORESW= 5'h0F, OP_STORESDW= 5'h10,
    OP_ADD      = 5'h12, OP_SUB     = 5'h13, OP_MUL    = 5'h14,
    OP_AND      = 5'h15, OP_OR      = 5'h16, OP_EXOR   = 5'h17,
    OP_LOADDUMMY= 5'h1F
  } opcode_e;

  // The 132-bit DATA LAR record
  typedef struct packed {
    logic [XLEN-1:0]   data;
    logic [TAG_W-1:0]  tag;
    logic [WOFF_W-1:0] woff;
    logic [1:0]        wdsz;
    logic              typ;    // 1 = signed
    logic              dirty;
  } lar_t;

  // Instruction word (arithmetic layout; loads/stores reuse bits [11:0] as immediate)
  typedef struct packed {
    logic [4:0] op;
    logic [4:0] dst;
    logic [4:0] src1;
    logic [4:0] src2;
    logic       sv;     // 1 = scalar
    logic [2:0] off1;
    logic [2:0] off2;
    logic [2:0] doff;
    logic [1:0] unused;
  } instr_t;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_ADD64
  } alu_op_e;

  // Decoded control word carried down the pipeline
  typedef struct packed {
    logic    valid;      // a real instruction (not a bubble or NO-OP)
    logic    is_alu;     // ADD/SUB/AND/OR/EXOR: writes data, updates aliases
    logic    is_addr;    // LOAD/STORE/LOADDUMMY: writes address and type
    logic    is_load;    // LOADxx: searches the LARs, else reads memory
    logic    is_dummy;   // LOADDUMMY: type copied from SRC1 LAR
    logic    sv;         // scalar operation
    alu_op_e alu_op;
    logic [1:0] new_wdsz; // type tag written by LOAD/STORE
    logic    new_typ;
  } ctrl_t;

  // Byte-lane mask of element boundaries: bit i set when byte i starts an element
  function automatic logic [7:0] lane_start(input logic [1:0] wdsz);
    case (wdsz)
      2'b00:   return 8'hFF;
      2'b01:   return 8'h55;
      2'b10:   return 8'h11;
      default: return 8'h01;
    endcase
  endfunction

endpackage
