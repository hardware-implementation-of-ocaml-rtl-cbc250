// vm_pkg: types and constants shared by the OCaml virtual machine blocks.
//
// Value representation. An OCaml value is a pair of a 31-bit signed integer
// ("long") and a mark bit: mark = 1 for an immediate integer, mark = 0 for a
// pointer, in which case the integer is a word address in the value memory.
// This differs from the usual tagged-word encoding (mark in the low bit of a
// shifted integer): here no shifting is ever needed.
//
// Memory map of the single value memory (ram), in words:
//   [DATA_START, STACK_START)   global data (block header + global slots)
//   [STACK_START, STACK_END)    stack, growing downwards from STACK_END
//   [HEAP_START, +HEAP_SIZE)    semi-space 0
//   [HEAP_START+HEAP_SIZE, +HEAP_SIZE) semi-space 1
// The numbers (16384 words, 0 / 1000 / 4000 / 6000) are those of the
// reference configuration; the stack then holds 3000 words.
//
// Block header (stored in the integer field of a word, mark = 0):
//   bits [30:10] size in words, [9:8] colour, [7:0] tag.
// The colour value HDR_FORWARDED marks a block that the garbage collector has
// already copied; its first field then holds the new address.
//
// Opcodes follow the numbering of the standard OCaml bytecode instruction
// set (POP = 19 and so on); only the subset listed in vm_interp is executed.
//
// Follows the published design in: the value encoding (31-bit long plus mark
// bit), the memory partition (ram of 16384 words, data at 0, stack at 1000,
// heap at 4000, semi-spaces of 6000 words), and the opcode POP = 19.
// Choices made here: the header bit layout, the rest of the opcode numbering
// (the standard OCaml order), the primitive numbers, the error codes and the
// memory request struct.
package vm_pkg;

  localparam int unsigned LONG_W = 31;

  typedef logic signed [LONG_W-1:0] long_t;

  typedef struct packed {
    long_t n;       // integer, or address when is_int = 0
    logic  is_int;  // mark bit
  } value_t;

  // ---------------------------------------------------------------- headers
  localparam int unsigned HDR_SIZE_W = 21;
  localparam logic [1:0]  HDR_WHITE     = 2'b00;
  localparam logic [1:0]  HDR_FORWARDED = 2'b11;
  localparam logic [7:0]  CLOSURE_TAG   = 8'd247;
  localparam logic [7:0]  NO_SCAN_TAG   = 8'd251;

  // ------------------------------------------------------------ primitives
  // Index of each external function in the C_CALL primitive table.
  localparam int unsigned PRIM_GCD    = 0;  // gcd_glue  : int -> int -> int
  localparam int unsigned PRIM_LENGTH = 1;  // length    : 'a list -> int
  localparam int unsigned PRIM_INPUT  = 2;  // input bit : unit -> bool
  localparam int unsigned PRIM_GCD16  = 3;  // gcd_parallel: int -> int -> int, 16 gcd in parallel, summed
  localparam int unsigned N_EXT_ARGS  = 5;  // C_CALL1 .. C_CALL5

  // ------------------------------------------------------------ error codes
  typedef enum logic [2:0] {
    ERR_NONE      = 3'd0,
    ERR_OPCODE    = 3'd1,  // opcode outside the executed subset
    ERR_HEAP      = 3'd2,  // heap exhausted even after a collection
    ERR_UNCAUGHT  = 3'd3,  // exception raised with no handler
    ERR_STACK     = 3'd4,  // stack overflow
    ERR_DIV_ZERO  = 3'd5   // division or modulo by zero
  } vm_err_e;

  // ------------------------------------------------------ memory request
  // One request per tick on a single-port memory. A read issued in tick t
  // delivers its word in tick t+1 (two ticks per read); a write takes the
  // tick it is issued in.
  typedef struct packed {
    logic        en;
    logic        we;
    logic [15:0] addr;
    value_t      wdata;
  } ram_req_t;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [7:0] {
    ACC0=0, ACC1, ACC2, ACC3, ACC4, ACC5, ACC6, ACC7, ACC, PUSH,
    PUSHACC0=10, PUSHACC1, PUSHACC2, PUSHACC3, PUSHACC4, PUSHACC5, PUSHACC6,
    PUSHACC7, PUSHACC, POP, ASSIGN=20,
    ENVACC1=21, ENVACC2, ENVACC3, ENVACC4, ENVACC,
    PUSHENVACC1=26, PUSHENVACC2, PUSHENVACC3, PUSHENVACC4, PUSHENVACC,
    PUSH_RETADDR=31, APPLY, APPLY1, APPLY2, APPLY3,
    APPTERM=36, APPTERM1, APPTERM2, APPTERM3,
    RETURN=40, RESTART, GRAB, CLOSURE, CLOSUREREC,
    OFFSETCLOSUREM2=45, OFFSETCLOSURE0, OFFSETCLOSURE2, OFFSETCLOSURE,
    PUSHOFFSETCLOSUREM2=49, PUSHOFFSETCLOSURE0, PUSHOFFSETCLOSURE2, PUSHOFFSETCLOSURE,
    GETGLOBAL=53, PUSHGETGLOBAL, GETGLOBALFIELD, PUSHGETGLOBALFIELD, SETGLOBAL,
    ATOM0=58, ATOM, PUSHATOM0, PUSHATOM,
    MAKEBLOCK=62, MAKEBLOCK1, MAKEBLOCK2, MAKEBLOCK3, MAKEFLOATBLOCK,
    GETFIELD0=67, GETFIELD1, GETFIELD2, GETFIELD3, GETFIELD, GETFLOATFIELD,
    SETFIELD0=73, SETFIELD1, SETFIELD2, SETFIELD3, SETFIELD, SETFLOATFIELD,
    VECTLENGTH=79, GETVECTITEM, SETVECTITEM,
    GETSTRINGCHAR=82, GETBYTESCHAR, SETBYTESCHAR,
    BRANCH=85, BRANCHIF, BRANCHIFNOT, SWITCH, BOOLNOT,
    PUSHTRAP=90, POPTRAP, RAISE, CHECK_SIGNALS,
    C_CALL1=94, C_CALL2, C_CALL3, C_CALL4, C_CALL5, C_CALLN,
    CONST0=100, CONST1, CONST2, CONST3, CONSTINT,
    PUSHCONST0=105, PUSHCONST1, PUSHCONST2, PUSHCONST3, PUSHCONSTINT,
    NEGINT=110, ADDINT, SUBINT, MULINT, DIVINT, MODINT,
    ANDINT=116, ORINT, XORINT, LSLINT, LSRINT, ASRINT,
    EQ=122, NEQ, LTINT, LEINT, GTINT, GEINT,
    OFFSETINT=128, OFFSETREF, ISINT, GETMETHOD,
    BEQ=132, BNEQ, BLTINT, BLEINT, BGTINT, BGEINT,
    ULTINT=138, UGEINT, BULTINT, BUGEINT,
    GETPUBMET=142, GETDYNMET, STOP, EVENT, BREAK, RERAISE, RAISE_NOTRACE
  } opcode_e;

  // ------------------------------------------------------------- helpers
  function automatic value_t val_long(input long_t n);
    return '{n: n, is_int: 1'b1};
  endfunction

  function automatic value_t val_ptr(input int unsigned a);
    return '{n: long_t'(a), is_int: 1'b0};
  endfunction

  localparam value_t VAL_UNIT = '{n: '0, is_int: 1'b1};

  function automatic value_t mk_header(input int unsigned size, input logic [7:0] tag,
                                       input logic [1:0] colour);
    return '{n: long_t'({size[HDR_SIZE_W-1:0], colour, tag}), is_int: 1'b0};
  endfunction

  function automatic int unsigned hdr_size(input value_t h);
    return int'(unsigned'(h.n[30:10]));
  endfunction

  function automatic logic [7:0] hdr_tag(input value_t h);
    return h.n[7:0];
  endfunction

  function automatic logic [1:0] hdr_colour(input value_t h);
    return h.n[9:8];
  endfunction

  // Number of operand words that follow each opcode in the code memory.
  function automatic int unsigned n_operands(input logic [7:0] op);
    case (op)
      ACC, PUSHACC, POP, ASSIGN, ENVACC, PUSHENVACC, PUSH_RETADDR, APPLY,
      RETURN, GRAB, OFFSETCLOSURE, PUSHOFFSETCLOSURE, GETGLOBAL, PUSHGETGLOBAL,
      SETGLOBAL, ATOM, PUSHATOM, MAKEBLOCK1, MAKEBLOCK2, MAKEBLOCK3,
      MAKEFLOATBLOCK, GETFIELD, GETFLOATFIELD, SETFIELD, SETFLOATFIELD,
      BRANCH, BRANCHIF, BRANCHIFNOT, SWITCH, PUSHTRAP,
      C_CALL1, C_CALL2, C_CALL3, C_CALL4, C_CALL5,
      CONSTINT, PUSHCONSTINT, OFFSETINT, OFFSETREF,
      APPTERM1, APPTERM2, APPTERM3:                        return 1;
      APPTERM, CLOSURE, GETGLOBALFIELD, PUSHGETGLOBALFIELD, MAKEBLOCK,
      C_CALLN, BEQ, BNEQ, BLTINT, BLEINT, BGTINT, BGEINT, BULTINT, BUGEINT,
      GETPUBMET:                                           return 2;
      CLOSUREREC:                                          return 3;
      default:                                             return 0;
    endcase
  endfunction

endpackage
