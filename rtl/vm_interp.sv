// vm_interp: bytecode interpreter of the OCaml virtual machine.
//
// The machine is the OCaml stack machine: an accumulator (accu), a stack
// pointer (sp, the stack grows downwards from STACK_END), an environment
// (env, the current closure), the count of pending extra arguments
// (extra_args), a trap pointer for exception handlers, a code pointer (pc)
// and a heap allocation pointer. Instructions are executed one at a time by a
// multi-cycle state machine; nothing is pipelined.
//
// Per instruction: F0..F4 fetch the opcode and its operands from the code
// memory (one word per tick, two ticks of latency), EX starts the work, and
// optional sequencing states do the memory traffic. All memory traffic goes
// through one port of the value memory (a read costs two ticks, a write one).
// Four small engines are shared by many instructions and always return to
// state FIN with step counter fstep incremented:
//   RSEQ  read up to 4 consecutive stack words into rbuf
//   WSEQ  write up to 6 (address, value) pairs
//   COPY  copy n words, ascending or descending (stack shuffles, filling
//         closure and block fields from the stack)
//   ALLOC reserve a block in the heap and write its header; when the current
//         semi-space is full it runs the garbage collector first (vm_gc)
// C_CALLk hands its arguments to the external-call unit and waits for it.
// The PUSH... forms first push accu and then execute the plain form.
//
// Executed subset: ACC*, PUSH*, POP, ASSIGN, ENVACC*, PUSH_RETADDR, APPLY*,
// APPTERM*, RETURN, RESTART, GRAB, CLOSURE, CLOSUREREC (one function),
// OFFSETCLOSURE0, GETGLOBAL*, GETGLOBALFIELD*, SETGLOBAL, MAKEBLOCK*,
// GETFIELD*, SETFIELD*, VECTLENGTH, GETVECTITEM, SETVECTITEM, BRANCH*,
// SWITCH, BOOLNOT, PUSHTRAP, POPTRAP, RAISE/RERAISE/RAISE_NOTRACE,
// CHECK_SIGNALS, C_CALL1..5, CONST*, integer arithmetic, logic, shifts and
// comparisons, OFFSETINT, OFFSETREF, ISINT, the conditional branches and STOP.
// Anything else (floats, strings, objects, atoms, mutually recursive
// closures) stops the machine with ERR_OPCODE.
//
// Closures use the layout without a closure-info word: field 0 is the code
// pointer (stored as an integer), fields 1.. the free variables; partial
// applications built by GRAB hold the code pointer, the environment and the
// arguments. Code pointers, return addresses, extra_args and trap links are
// stored as integers, so the collector never follows them.
//
// Interface: start (after global data is loaded) begins execution at code
// address 0; instr_done is high for one tick at the end of every
// instruction; stopped rises at STOP or on an error, with the final
// accumulator on accu_out and the cause on error. en = 0 freezes the state.
//
// Follows the published design in: the OCaml stack machine and its
// instruction set, without floats and objects.
// Choices made here: the multi-cycle state machine, the shared memory
// engines, the closure layout without a closure-info word, the stack
// direction, the error stops, and leaving out strings, atoms and mutually
// recursive closures.
module vm_interp
  import vm_pkg::*;
#(
  parameter int unsigned CODE_SIZE   = 4096,
  parameter int unsigned DATA_START  = 0,
  parameter int unsigned STACK_START = 1000,
  parameter int unsigned HEAP_START  = 4000,   // also the end of the stack
  parameter int unsigned HEAP_SIZE   = 6000    // words per semi-space
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en,
  input  logic                         start,
  // code memory
  output logic [$clog2(CODE_SIZE)-1:0] code_addr,
  input  logic [31:0]                  code_rdata,
  // value memory
  output ram_req_t                     req,
  input  value_t                       rdata,
  // garbage collector
  output logic                         gc_start,
  output logic [15:0]                  gc_from,
  output logic [15:0]                  gc_to,
  output logic [15:0]                  gc_sp,
  output value_t                       gc_accu,
  output value_t                       gc_env,
  input  logic                         gc_done,
  input  value_t                       gc_accu_out,
  input  value_t                       gc_env_out,
  input  logic [15:0]                  gc_free,
  // external functions
  output logic                         ext_start,
  output logic [7:0]                   ext_prim,
  output value_t                       ext_args [N_EXT_ARGS],
  input  logic                         ext_done,
  input  value_t                       ext_result,
  // status
  output logic                         running,
  output logic                         stopped,
  output logic                         instr_done,
  output vm_err_e                      error,
  output value_t                       accu_out
);
  localparam int unsigned STACK_END = HEAP_START;
  localparam int unsigned GLOB_BASE = DATA_START + 1;
  localparam int unsigned CAW       = $clog2(CODE_SIZE);

  typedef enum logic [5:0] {
    S_IDLE, S_F0, S_F1, S_F2, S_F3, S_F4, S_EX, S_LOAD, S_BINOP, S_GGF,
    S_SETF, S_VLEN, S_GVI, S_SVI1, S_SVI2, S_OREF, S_POPTRAP, S_RSEQ,
    S_RSEQ_GOT, S_WSEQ, S_COPY, S_COPY_WR, S_ALLOC, S_GC, S_FIN, S_JMPCLO,
    S_JMPCLO_GOT, S_RESTART_HDR, S_LOADENV, S_SW_HDR, S_SW_TBL, S_SW_GOT,
    S_EXT, S_EXTWAIT, S_DONE, S_STOP
  } state_e;

  typedef struct packed {
    state_e             state;
    logic [15:0]        pc;      // next instruction
    logic [15:0]        ipc;     // current instruction
    logic [15:0]        sp;
    value_t             accu;
    value_t             env;
    long_t              extra;
    logic [15:0]        trapsp;
    logic [15:0]        hp;
    logic               from_sel;  // 0: semi-space 0 is the from-space
    logic [7:0]         op;
    logic signed [31:0] a1, a2, a3;
    logic               pushed;
    logic [2:0]         fstep;
    logic [15:0]        blk;
    logic [15:0]        asize;
    logic [7:0]         atag;
    logic               gc_tried;
    value_t [3:0]       rbuf;
    logic [2:0]         rn, rk;
    logic [15:0]        raddr;
    logic [5:0][15:0]   wa;
    value_t [5:0]       wv;
    logic [2:0]         wn, wk;
    logic [15:0]        cp_src, cp_dst, cp_n, cp_k;
    logic               cp_desc;
    logic [15:0]        nsp;     // stack pointer to install later
    long_t              idx;
    vm_err_e            err;
  } regs_t;

  regs_t r, n;

  // ------------------------------------------------------------ helpers
  function automatic logic is_push_form(input logic [7:0] op);
    case (op)
      PUSH, PUSHACC0, PUSHACC1, PUSHACC2, PUSHACC3, PUSHACC4, PUSHACC5,
      PUSHACC6, PUSHACC7, PUSHACC, PUSHENVACC1, PUSHENVACC2, PUSHENVACC3,
      PUSHENVACC4, PUSHENVACC, PUSHOFFSETCLOSURE0, PUSHGETGLOBAL,
      PUSHGETGLOBALFIELD, PUSHCONST0, PUSHCONST1, PUSHCONST2, PUSHCONST3,
      PUSHCONSTINT: return 1'b1;
      default:      return 1'b0;
    endcase
  endfunction

  // plain form executed after the push (PUSH itself maps to CHECK_SIGNALS,
  // which does nothing)
  function automatic logic [7:0] plain_form(input logic [7:0] op);
    case (op)
      PUSH:               return CHECK_SIGNALS;
      PUSHACC:            return ACC;
      PUSHENVACC:         return ENVACC;
      PUSHOFFSETCLOSURE0: return OFFSETCLOSURE0;
      PUSHGETGLOBAL:      return GETGLOBAL;
      PUSHGETGLOBALFIELD: return GETGLOBALFIELD;
      PUSHCONSTINT:       return CONSTINT;
      default:
        if (op >= PUSHACC0 && op <= PUSHACC7)            return op - 8'd10;
        else if (op >= PUSHENVACC1 && op <= PUSHENVACC4) return op - 8'd5;
        else if (op >= PUSHCONST0 && op <= PUSHCONST3)   return op - 8'd5;
        else                                             return op;
    endcase
  endfunction

  function automatic logic [15:0] a16(input logic signed [31:0] v);
    return v[15:0];
  endfunction

  function automatic value_t vint(input logic signed [31:0] v);
    return val_long(long_t'(v));
  endfunction

  // binary integer operation of accu with the top of stack
  function automatic value_t binop(input logic [7:0] op, input value_t x, input value_t y);
    long_t a, b;
    logic [LONG_W-1:0] ua, ub;
    a = x.n; b = y.n; ua = x.n; ub = y.n;
    case (op)
      ADDINT: return val_long(a + b);
      SUBINT: return val_long(a - b);
      MULINT: return val_long(a * b);
      DIVINT: return val_long((b == 0) ? long_t'(0) : a / b);
      MODINT: return val_long((b == 0) ? long_t'(0) : a % b);
      ANDINT: return val_long(a & b);
      ORINT:  return val_long(a | b);
      XORINT: return val_long(a ^ b);
      LSLINT: return val_long(a <<  b[4:0]);
      LSRINT: return val_long(long_t'(ua >> ub[4:0]));
      ASRINT: return val_long(a >>> b[4:0]);
      EQ:     return val_long(long_t'(x == y));
      NEQ:    return val_long(long_t'(x != y));
      LTINT:  return val_long(long_t'(a <  b));
      LEINT:  return val_long(long_t'(a <= b));
      GTINT:  return val_long(long_t'(a >  b));
      GEINT:  return val_long(long_t'(a >= b));
      ULTINT: return val_long(long_t'(ua <  ub));
      UGEINT: return val_long(long_t'(ua >= ub));
      default: return VAL_UNIT;
    endcase
  endfunction

  logic [15:0] cur_base, oth_base;
  assign cur_base = r.from_sel ? 16'(HEAP_START + HEAP_SIZE) : 16'(HEAP_START);
  assign oth_base = r.from_sel ? 16'(HEAP_START) : 16'(HEAP_START + HEAP_SIZE);

  // ------------------------------------------------------------ outputs
  assign running    = (r.state != S_IDLE) && (r.state != S_STOP);
  assign stopped    = (r.state == S_STOP);
  assign instr_done = (r.state == S_DONE);
  assign error      = r.err;
  assign accu_out   = r.accu;
  assign gc_from    = cur_base;
  assign gc_to      = oth_base;
  assign gc_sp      = r.sp;
  assign gc_accu    = r.accu;
  assign gc_env     = r.env;
  assign ext_prim   = r.a1[7:0];
  always_comb begin
    ext_args[0] = r.accu;
    for (int k = 1; k < N_EXT_ARGS; k++) ext_args[k] = r.rbuf[k-1];
  end

  // small helpers for the combinational block
  function automatic ram_req_t rd(input logic [15:0] a);
    return '{en: 1'b1, we: 1'b0, addr: a, wdata: VAL_UNIT};
  endfunction
  function automatic ram_req_t wr(input logic [15:0] a, input value_t v);
    return '{en: 1'b1, we: 1'b1, addr: a, wdata: v};
  endfunction

  // ------------------------------------------------------- next state
  always_comb begin
    logic [7:0]  op;
    logic [15:0] k16;
    logic [15:0] newsp;
    int unsigned nargs;
    n         = r;
    req       = '0;
    code_addr = '0;
    gc_start  = 1'b0;
    ext_start = 1'b0;
    op        = r.op;
    k16       = '0;
    newsp     = '0;
    nargs     = 0;

    unique case (r.state)
      S_IDLE: if (start) begin
        n.state    = S_F0;
        n.pc       = '0;
        n.sp       = 16'(STACK_END);
        n.trapsp   = 16'(STACK_END);
        n.hp       = 16'(HEAP_START);
        n.from_sel = 1'b0;
        n.accu     = VAL_UNIT;
        n.env      = VAL_UNIT;
        n.extra    = '0;
        n.err      = ERR_NONE;
      end

      // ------------------------------------------------------ fetch
      S_F0: begin
        code_addr  = CAW'(r.pc);
        n.ipc      = r.pc;
        n.pushed   = 1'b0;
        n.fstep    = '0;
        n.gc_tried = 1'b0;
        n.state    = S_F1;
      end
      S_F1: begin
        n.op      = code_rdata[7:0];
        code_addr = CAW'(r.ipc + 16'd1);
        n.state   = (n_operands(code_rdata[7:0]) == 0) ? S_EX : S_F2;
      end
      S_F2: begin
        n.a1      = code_rdata;
        code_addr = CAW'(r.ipc + 16'd2);
        n.state   = (n_operands(r.op) == 1) ? S_EX : S_F3;
      end
      S_F3: begin
        n.a2      = code_rdata;
        code_addr = CAW'(r.ipc + 16'd3);
        n.state   = (n_operands(r.op) == 2) ? S_EX : S_F4;
      end
      S_F4: begin
        n.a3    = code_rdata;
        n.state = S_EX;
      end

      // ---------------------------------------------------- execute
      S_EX: begin
        n.pc  = r.ipc + 16'd1 + 16'(n_operands(r.op));
        n.state = S_DONE;
        if (is_push_form(op) && !r.pushed) begin
          req      = wr(r.sp - 16'd1, r.accu);
          n.sp     = r.sp - 16'd1;
          n.pushed = 1'b1;
          n.op     = plain_form(op);
          n.state  = S_EX;
        end else begin
          unique case (op) inside
            [ACC0:ACC7]: begin req = rd(r.sp + 16'((int'(op) - int'(ACC0)))); n.state = S_LOAD; end
            ACC:         begin req = rd(r.sp + a16(r.a1));      n.state = S_LOAD; end
            POP:         n.sp = r.sp + a16(r.a1);
            ASSIGN: begin
              req    = wr(r.sp + a16(r.a1), r.accu);
              n.accu = VAL_UNIT;
            end
            [ENVACC1:ENVACC4]: begin
              req = rd(16'(r.env.n) + 16'((int'(op) - int'(ENVACC1)) + 1)); n.state = S_LOAD;
            end
            ENVACC: begin req = rd(16'(r.env.n) + a16(r.a1)); n.state = S_LOAD; end
            PUSH_RETADDR: begin
              n.wa[0] = r.sp - 16'd1; n.wv[0] = val_long(r.extra);
              n.wa[1] = r.sp - 16'd2; n.wv[1] = r.env;
              n.wa[2] = r.sp - 16'd3; n.wv[2] = vint(32'(r.ipc) + 1 + r.a1);
              n.wn = 3'd3; n.wk = '0;
              n.sp = r.sp - 16'd3;
              n.state = S_WSEQ;
            end
            APPLY: begin
              n.extra = long_t'(r.a1 - 1);
              n.state = S_JMPCLO;
            end
            APPLY1, APPLY2, APPLY3: begin
              n.raddr = r.sp; n.rn = 3'((int'(op) - int'(APPLY1)) + 1); n.rk = '0;
              n.state = S_RSEQ;
            end
            APPTERM, APPTERM1, APPTERM2, APPTERM3: begin
              if (op == APPTERM) begin
                nargs = unsigned'(r.a1);
                newsp = r.sp + a16(r.a2) - a16(r.a1);
              end else begin
                nargs = int'((int'(op) - int'(APPTERM1))) + 1;
                newsp = r.sp + a16(r.a1) - 16'(nargs);
              end
              n.nsp = newsp;
              n.cp_src = r.sp; n.cp_dst = newsp; n.cp_n = 16'(nargs);
              n.cp_k = '0; n.cp_desc = 1'b1;
              n.extra = r.extra + long_t'(nargs) - 1;
              n.state = S_COPY;
            end
            RETURN: begin
              newsp = r.sp + a16(r.a1);
              n.sp  = newsp;
              if (r.extra > 0) begin
                n.extra = r.extra - 1;
                n.state = S_JMPCLO;
              end else begin
                n.raddr = newsp; n.rn = 3'd3; n.rk = '0;
                n.state = S_RSEQ;
              end
            end
            RESTART: begin
              req = rd(16'(r.env.n) - 16'd1);
              n.state = S_RESTART_HDR;
            end
            GRAB:
              if (r.extra >= long_t'(r.a1)) begin
                n.extra = r.extra - long_t'(r.a1);
              end else begin
                n.asize = 16'(r.extra) + 16'd3;    // code, env, 1+extra args
                n.atag  = CLOSURE_TAG;
                n.state = S_ALLOC;
              end
            CLOSURE, CLOSUREREC: begin
              if (op == CLOSUREREC && r.a1 != 1) begin
                n.err = ERR_OPCODE; n.state = S_STOP;
              end else begin
                k16 = (op == CLOSURE) ? a16(r.a1) : a16(r.a2);   // free variables
                if (k16 != 0) begin
                  req  = wr(r.sp - 16'd1, r.accu);
                  n.sp = r.sp - 16'd1;
                end
                n.asize = k16 + 16'd1;
                n.atag  = CLOSURE_TAG;
                n.state = S_ALLOC;
              end
            end
            OFFSETCLOSURE0: n.accu = r.env;
            GETGLOBAL: begin req = rd(16'(GLOB_BASE) + a16(r.a1)); n.state = S_LOAD; end
            GETGLOBALFIELD: begin req = rd(16'(GLOB_BASE) + a16(r.a1)); n.state = S_GGF; end
            SETGLOBAL: begin
              req = wr(16'(GLOB_BASE) + a16(r.a1), r.accu);
              n.accu = VAL_UNIT;
            end
            MAKEBLOCK, MAKEBLOCK1, MAKEBLOCK2, MAKEBLOCK3: begin
              n.asize = (op == MAKEBLOCK) ? a16(r.a1) : 16'((int'(op) - int'(MAKEBLOCK1)) + 1);
              n.atag  = (op == MAKEBLOCK) ? r.a2[7:0] : r.a1[7:0];
              n.state = S_ALLOC;
            end
            [GETFIELD0:GETFIELD3]: begin
              req = rd(16'(r.accu.n) + 16'((int'(op) - int'(GETFIELD0)))); n.state = S_LOAD;
            end
            GETFIELD: begin req = rd(16'(r.accu.n) + a16(r.a1)); n.state = S_LOAD; end
            [SETFIELD0:SETFIELD]: begin req = rd(r.sp); n.state = S_SETF; end
            VECTLENGTH:  begin req = rd(16'(r.accu.n) - 16'd1); n.state = S_VLEN; end
            GETVECTITEM: begin req = rd(r.sp); n.state = S_GVI;  end
            SETVECTITEM: begin req = rd(r.sp); n.state = S_SVI1; end
            BRANCH: n.pc = 16'(32'(r.ipc) + 1 + r.a1);
            BRANCHIF:    if (r.accu != VAL_UNIT) n.pc = 16'(32'(r.ipc) + 1 + r.a1);
            BRANCHIFNOT: if (r.accu == VAL_UNIT) n.pc = 16'(32'(r.ipc) + 1 + r.a1);
            SWITCH:
              if (r.accu.is_int) begin
                n.idx = r.accu.n; n.state = S_SW_TBL;
              end else begin
                req = rd(16'(r.accu.n) - 16'd1); n.state = S_SW_HDR;
              end
            BOOLNOT: n.accu = val_long(long_t'(1) - r.accu.n);
            PUSHTRAP: begin
              n.wa[0] = r.sp - 16'd1; n.wv[0] = val_long(r.extra);
              n.wa[1] = r.sp - 16'd2; n.wv[1] = r.env;
              n.wa[2] = r.sp - 16'd3; n.wv[2] = val_long(long_t'(r.trapsp));
              n.wa[3] = r.sp - 16'd4; n.wv[3] = vint(32'(r.ipc) + 1 + r.a1);
              n.wn = 3'd4; n.wk = '0;
              n.sp = r.sp - 16'd4;
              n.trapsp = r.sp - 16'd4;
              n.state = S_WSEQ;
            end
            POPTRAP: begin req = rd(r.sp + 16'd1); n.state = S_POPTRAP; end
            RAISE, RERAISE, RAISE_NOTRACE:
              if (r.trapsp == 16'(STACK_END)) begin
                n.err = ERR_UNCAUGHT; n.state = S_STOP;
              end else begin
                n.sp = r.trapsp;
                n.raddr = r.trapsp; n.rn = 3'd4; n.rk = '0;
                n.state = S_RSEQ;
              end
            CHECK_SIGNALS: ;
            [C_CALL1:C_CALL5]: begin
              n.raddr = r.sp; n.rn = 3'((int'(op) - int'(C_CALL1))); n.rk = '0;
              n.state = S_RSEQ;
            end
            [CONST0:CONST3]: n.accu = val_long(long_t'((int'(op) - int'(CONST0))));
            CONSTINT:  n.accu = vint(r.a1);
            NEGINT:    n.accu = val_long(-r.accu.n);
            [ADDINT:ASRINT], [EQ:GEINT], ULTINT, UGEINT: begin
              req = rd(r.sp); n.state = S_BINOP;
            end
            OFFSETINT: n.accu = val_long(r.accu.n + long_t'(r.a1));
            OFFSETREF: begin req = rd(16'(r.accu.n)); n.state = S_OREF; end
            ISINT:     n.accu = val_long(long_t'(r.accu.is_int));
            BEQ:  if (long_t'(r.a1) == r.accu.n) n.pc = 16'(32'(r.ipc) + 2 + r.a2);
            BNEQ: if (long_t'(r.a1) != r.accu.n) n.pc = 16'(32'(r.ipc) + 2 + r.a2);
            BLTINT: if (long_t'(r.a1) <  r.accu.n) n.pc = 16'(32'(r.ipc) + 2 + r.a2);
            BLEINT: if (long_t'(r.a1) <= r.accu.n) n.pc = 16'(32'(r.ipc) + 2 + r.a2);
            BGTINT: if (long_t'(r.a1) >  r.accu.n) n.pc = 16'(32'(r.ipc) + 2 + r.a2);
            BGEINT: if (long_t'(r.a1) >= r.accu.n) n.pc = 16'(32'(r.ipc) + 2 + r.a2);
            BULTINT: if (unsigned'(r.a1[30:0]) <  unsigned'(r.accu.n))
                       n.pc = 16'(32'(r.ipc) + 2 + r.a2);
            BUGEINT: if (unsigned'(r.a1[30:0]) >= unsigned'(r.accu.n))
                       n.pc = 16'(32'(r.ipc) + 2 + r.a2);
            STOP: n.state = S_STOP;
            default: begin n.err = ERR_OPCODE; n.state = S_STOP; end
          endcase
        end
      end

      // ---------------------------------------------- single-read finishes
      S_LOAD:  begin n.accu = rdata; n.state = S_DONE; end
      S_GGF:   begin req = rd(16'(rdata.n) + a16(r.a2)); n.state = S_LOAD; end
      S_SETF: begin
        k16 = (op == SETFIELD) ? a16(r.a1) : 16'((int'(op) - int'(SETFIELD0)));
        req    = wr(16'(r.accu.n) + k16, rdata);
        n.sp   = r.sp + 16'd1;
        n.accu = VAL_UNIT;
        n.state = S_DONE;
      end
      S_VLEN:  begin n.accu = val_long(long_t'(hdr_size(rdata))); n.state = S_DONE; end
      S_GVI: begin
        req  = rd(16'(r.accu.n) + 16'(rdata.n));
        n.sp = r.sp + 16'd1;
        n.state = S_LOAD;
      end
      S_SVI1:  begin n.idx = rdata.n; req = rd(r.sp + 16'd1); n.state = S_SVI2; end
      S_SVI2: begin
        req    = wr(16'(r.accu.n) + 16'(r.idx), rdata);
        n.sp   = r.sp + 16'd2;
        n.accu = VAL_UNIT;
        n.state = S_DONE;
      end
      S_OREF: begin
        req    = wr(16'(r.accu.n), val_long(rdata.n + long_t'(r.a1)));
        n.accu = VAL_UNIT;
        n.state = S_DONE;
      end
      S_POPTRAP: begin
        n.trapsp = 16'(rdata.n);
        n.sp     = r.sp + 16'd4;
        n.state  = S_DONE;
      end
      S_BINOP: begin
        n.sp = r.sp + 16'd1;
        if ((op == DIVINT || op == MODINT) && rdata.n == 0) begin
          n.err = ERR_DIV_ZERO; n.state = S_STOP;
        end else begin
          n.accu  = binop(op, r.accu, rdata);
          n.state = S_DONE;
        end
      end
      S_SW_HDR: begin
        n.idx   = long_t'(r.a1[15:0]) + long_t'(hdr_tag(rdata));
        n.state = S_SW_TBL;
      end
      S_SW_TBL: begin
        code_addr = CAW'(r.ipc + 16'd2 + 16'(r.idx));
        n.state   = S_SW_GOT;
      end
      S_SW_GOT: begin
        n.pc    = 16'(32'(r.ipc) + 2 + 32'(r.idx) + code_rdata);
        n.state = S_DONE;
      end
      S_RESTART_HDR: begin
        k16 = 16'(hdr_size(rdata)) - 16'd2;       // number of saved arguments
        newsp = r.sp - k16;
        n.sp = newsp;
        n.cp_src = 16'(r.env.n) + 16'd2; n.cp_dst = newsp; n.cp_n = k16;
        n.cp_k = '0; n.cp_desc = 1'b0;
        n.extra = r.extra + long_t'(k16);
        n.state = S_COPY;
      end
      S_LOADENV: begin n.env = rdata; n.state = S_DONE; end

      // -------------------------------------------------------- engines
      S_RSEQ:
        if (r.rk == r.rn) begin
          n.state = S_FIN; n.fstep = r.fstep + 3'd1;
        end else begin
          req = rd(r.raddr + 16'(r.rk));
          n.state = S_RSEQ_GOT;
        end
      S_RSEQ_GOT: begin
        n.rbuf[r.rk[1:0]] = rdata;
        n.rk    = r.rk + 3'd1;
        n.state = S_RSEQ;
      end
      S_WSEQ:
        if (r.wk == r.wn) begin
          n.state = S_FIN; n.fstep = r.fstep + 3'd1;
        end else begin
          req  = wr(r.wa[r.wk], r.wv[r.wk]);
          n.wk = r.wk + 3'd1;
        end
      S_COPY:
        if (r.cp_k == r.cp_n) begin
          n.state = S_FIN; n.fstep = r.fstep + 3'd1;
        end else begin
          k16 = r.cp_desc ? (r.cp_n - 16'd1 - r.cp_k) : r.cp_k;
          req = rd(r.cp_src + k16);
          n.state = S_COPY_WR;
        end
      S_COPY_WR: begin
        k16 = r.cp_desc ? (r.cp_n - 16'd1 - r.cp_k) : r.cp_k;
        req = wr(r.cp_dst + k16, rdata);
        n.cp_k  = r.cp_k + 16'd1;
        n.state = S_COPY;
      end
      S_ALLOC:
        if (32'(r.hp) + 32'(r.asize) + 1 > 32'(cur_base) + HEAP_SIZE) begin
          if (r.gc_tried) begin
            n.err = ERR_HEAP; n.state = S_STOP;
          end else begin
            gc_start   = 1'b1;
            n.gc_tried = 1'b1;
            n.state    = S_GC;
          end
        end else begin
          req     = wr(r.hp, mk_header(int'(r.asize), r.atag, HDR_WHITE));
          n.blk   = r.hp + 16'd1;
          n.hp    = r.hp + r.asize + 16'd1;
          n.state = S_FIN;
          n.fstep = r.fstep + 3'd1;
        end
      S_GC:
        if (gc_done) begin
          n.accu     = gc_accu_out;
          n.env      = gc_env_out;
          n.hp       = gc_free;
          n.from_sel = !r.from_sel;
          n.state    = S_ALLOC;
        end
      S_JMPCLO: begin
        req = rd(16'(r.accu.n));
        n.env = r.accu;
        n.state = S_JMPCLO_GOT;
      end
      S_JMPCLO_GOT: begin
        n.pc = 16'(rdata.n);
        n.state = S_DONE;
      end
      S_EXT: begin
        ext_start = 1'b1;
        n.state   = S_EXTWAIT;
      end
      S_EXTWAIT:
        if (ext_done) begin
          n.accu  = ext_result;
          n.sp    = r.sp + 16'((int'(op) - int'(C_CALL1)));
          n.state = S_DONE;
        end

      // ------------------------------------ continuation after an engine
      S_FIN: begin
        n.state = S_DONE;
        unique case (op) inside
          APPLY1, APPLY2, APPLY3: begin
            nargs = int'((int'(op) - int'(APPLY1))) + 1;
            newsp = r.sp - 16'd3;
            for (int k = 0; k < 3; k++) begin
              n.wa[k] = newsp + 16'(k);
              n.wv[k] = r.rbuf[k];
            end
            n.wa[nargs]   = newsp + 16'(nargs);     n.wv[nargs]   = vint(32'(r.ipc) + 1);
            n.wa[nargs+1] = newsp + 16'(nargs + 1); n.wv[nargs+1] = r.env;
            n.wa[nargs+2] = newsp + 16'(nargs + 2); n.wv[nargs+2] = val_long(r.extra);
            if (r.fstep == 3'd1) begin
              n.wn = 3'(nargs + 3); n.wk = '0;
              n.sp = newsp;
              n.extra = long_t'(nargs - 1);
              n.state = S_WSEQ;
            end else n.state = S_JMPCLO;
          end
          APPTERM, APPTERM1, APPTERM2, APPTERM3: begin
            n.sp = r.nsp;
            n.state = S_JMPCLO;
          end
          RETURN: begin
            n.pc    = 16'(r.rbuf[0].n);
            n.env   = r.rbuf[1];
            n.extra = r.rbuf[2].n;
            n.sp    = r.sp + 16'd3;
          end
          RESTART: begin
            req = rd(16'(r.env.n) + 16'd1);
            n.state = S_LOADENV;
          end
          GRAB:
            unique case (r.fstep)
              3'd1: begin      // block allocated: code pointer and env
                n.wa[0] = r.blk;         n.wv[0] = vint(32'(r.ipc) - 1);
                n.wa[1] = r.blk + 16'd1; n.wv[1] = r.env;
                n.wn = 3'd2; n.wk = '0;
                n.state = S_WSEQ;
              end
              3'd2: begin      // arguments from the stack
                n.cp_src = r.sp; n.cp_dst = r.blk + 16'd2;
                n.cp_n = r.asize - 16'd2; n.cp_k = '0; n.cp_desc = 1'b0;
                n.state = S_COPY;
              end
              3'd3: begin      // return to the caller with the closure
                n.accu  = val_ptr(int'(r.blk));
                newsp   = r.sp + r.asize - 16'd2;
                n.sp    = newsp;
                n.raddr = newsp; n.rn = 3'd3; n.rk = '0;
                n.state = S_RSEQ;
              end
              default: begin
                n.pc    = 16'(r.rbuf[0].n);
                n.env   = r.rbuf[1];
                n.extra = r.rbuf[2].n;
                n.sp    = r.sp + 16'd3;
              end
            endcase
          CLOSURE, CLOSUREREC:
            unique case (r.fstep)
              3'd1: begin
                n.wa[0] = r.blk;
                n.wv[0] = (op == CLOSURE) ? vint(32'(r.ipc) + 2 + r.a2)
                                          : vint(32'(r.ipc) + 3 + r.a3);
                n.wn = 3'd1; n.wk = '0;
                n.state = S_WSEQ;
              end
              3'd2: begin
                n.cp_src = r.sp; n.cp_dst = r.blk + 16'd1;
                n.cp_n = r.asize - 16'd1; n.cp_k = '0; n.cp_desc = 1'b0;
                n.state = S_COPY;
              end
              default: begin
                n.accu = val_ptr(int'(r.blk));
                newsp  = r.sp + r.asize - 16'd1;
                n.sp   = newsp;
                if (op == CLOSUREREC) begin
                  req  = wr(newsp - 16'd1, val_ptr(int'(r.blk)));
                  n.sp = newsp - 16'd1;
                end
              end
            endcase
          MAKEBLOCK, MAKEBLOCK1, MAKEBLOCK2, MAKEBLOCK3:
            unique case (r.fstep)
              3'd1: begin
                req = wr(r.blk, r.accu);
                n.cp_src = r.sp; n.cp_dst = r.blk + 16'd1;
                n.cp_n = r.asize - 16'd1; n.cp_k = '0; n.cp_desc = 1'b0;
                n.state = S_COPY;
              end
              default: begin
                n.accu = val_ptr(int'(r.blk));
                n.sp   = r.sp + r.asize - 16'd1;
              end
            endcase
          PUSHTRAP: ;
          PUSH_RETADDR: ;
          RAISE, RERAISE, RAISE_NOTRACE: begin
            n.pc     = 16'(r.rbuf[0].n);
            n.trapsp = 16'(r.rbuf[1].n);
            n.env    = r.rbuf[2];
            n.extra  = r.rbuf[3].n;
            n.sp     = r.sp + 16'd4;
          end
          [C_CALL1:C_CALL5]: n.state = S_EXT;
          default: begin n.err = ERR_OPCODE; n.state = S_STOP; end
        endcase
      end

      S_DONE: begin
        if (r.sp < 16'(STACK_START)) begin
          n.err = ERR_STACK; n.state = S_STOP;
        end else n.state = S_F0;
      end
      S_STOP: ;
      default: n.state = S_STOP;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r       <= '0;
      r.state <= S_IDLE;
      r.accu  <= VAL_UNIT;
      r.env   <= VAL_UNIT;
      r.err   <= ERR_NONE;
    end else if (en) begin
      r <= n;
    end
  end
endmodule
