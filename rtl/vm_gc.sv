// vm_gc: stop-and-copy garbage collector (Cheney's algorithm) for the heap of
// the virtual machine. The heap is two semi-spaces of SEMI_SIZE words; the
// interpreter allocates in one (from-space) and, when it is full, stops and
// starts this block. The collector copies every block reachable from the
// roots into the other semi-space (to-space) and returns the new allocation
// pointer; the interpreter then swaps the roles of the two semi-spaces.
//
// Roots, in this order: the accumulator, the environment, every stack slot
// from sp up to STACK_END, and the N_GLOBALS global slots. Then the to-space
// is scanned block by block (the scan pointer chases the free pointer) and
// every field of a scannable block (tag < NO_SCAN_TAG) is forwarded.
// Forwarding a value: integers and pointers outside from-space are kept. For
// a from-space pointer p the header at p-1 is read; if its colour is
// HDR_FORWARDED, field 0 holds the new address. Otherwise header and fields
// are copied to the free pointer, the old header is marked forwarded and the
// new address is written into the old field 0. Blocks of size 0 are never
// allocated in the heap, so field 0 always exists.
//
// Timing: start is sampled while idle; done is high for one tick with the
// updated accu/env and the new free pointer. Every memory read costs two
// ticks, every write one, on the single memory port (req/rdata) that the
// collector owns while busy.
//
// Follows the published design in: a stop-and-copy collector over two
// semi-spaces, with the stack, the global data and the registers as roots;
// the semi-spaces swap after each collection.
// Choices made here: Cheney's breadth-first algorithm, the forwarding mark
// (colour 3) and the order of the roots.
module vm_gc
  import vm_pkg::*;
#(
  parameter int unsigned SEMI_SIZE  = 6000,
  parameter int unsigned STACK_END  = 4000,
  parameter int unsigned GLOB_BASE  = 1,     // address of global slot 0
  parameter int unsigned N_GLOBALS  = 64     // at least 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        start,
  input  logic [15:0] from_base,
  input  logic [15:0] to_base,
  input  logic [15:0] sp,
  input  value_t      accu_in,
  input  value_t      env_in,
  output logic        busy,
  output logic        done,
  output value_t      accu_out,
  output value_t      env_out,
  output logic [15:0] free_out,
  output ram_req_t    req,
  input  value_t      rdata
);
  typedef enum logic [1:0] {PH_REGS, PH_STACK, PH_GLOB, PH_SCAN} phase_e;
  typedef enum logic [3:0] {
    G_IDLE, G_ROOT, G_SLOT_RD, G_SLOT_GOT, G_FWD, G_HDR_GOT, G_FWDADDR_GOT,
    G_COPY_RD, G_COPY_WR, G_MARK_HDR, G_MARK_F0, G_RESULT, G_SCAN_HDR,
    G_SCAN_GOT, G_DONE
  } state_e;

  state_e      state_q;
  phase_e      phase_q;
  logic        reg_env_q;       // PH_REGS: 0 accu, 1 env
  logic [15:0] sa_q, slot_end_q; // slot being processed and end of run
  logic [15:0] free_q, scan_q;
  logic [15:0] src_q;           // header address of the block being copied
  logic [15:0] k_q, cnt_q;      // copy counter and length (header included)
  value_t      cv_q;            // value being forwarded
  value_t      hdr_q;
  value_t      res_q;           // forwarded value
  value_t      accu_q, env_q;

  logic in_from;
  assign in_from = !cv_q.is_int &&
                   (cv_q.n >= long_t'(from_base)) &&
                   (cv_q.n <  long_t'(from_base) + long_t'(SEMI_SIZE));

  assign busy     = (state_q != G_IDLE);
  assign done     = (state_q == G_DONE);
  assign accu_out = accu_q;
  assign env_out  = env_q;
  assign free_out = free_q;

  // ------------------------------------------------------ memory requests
  always_comb begin
    req = '0;
    unique case (state_q)
      G_SLOT_RD:  begin req.en = 1'b1; req.addr = sa_q; end
      G_FWD:      if (in_from) begin req.en = 1'b1; req.addr = 16'(cv_q.n - 1); end
      G_HDR_GOT:  if (hdr_colour(rdata) == HDR_FORWARDED) begin
                    req.en = 1'b1; req.addr = 16'(cv_q.n);
                  end
      G_COPY_RD:  begin req.en = 1'b1; req.addr = src_q + k_q; end
      G_COPY_WR:  begin req.en = 1'b1; req.we = 1'b1; req.addr = free_q + k_q; req.wdata = rdata; end
      G_MARK_HDR: begin
                    req.en = 1'b1; req.we = 1'b1; req.addr = src_q;
                    req.wdata = mk_header(hdr_size(hdr_q), hdr_tag(hdr_q), HDR_FORWARDED);
                  end
      G_MARK_F0:  begin
                    req.en = 1'b1; req.we = 1'b1; req.addr = src_q + 16'd1;
                    req.wdata = val_ptr(int'(free_q) + 1);
                  end
      G_RESULT:   if (phase_q != PH_REGS && res_q != cv_q) begin
                    req.en = 1'b1; req.we = 1'b1; req.addr = sa_q; req.wdata = res_q;
                  end
      G_SCAN_HDR: if (scan_q != free_q) begin req.en = 1'b1; req.addr = scan_q; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= G_IDLE;
      phase_q <= PH_REGS;
      reg_env_q <= 1'b0;
      sa_q <= '0; slot_end_q <= '0; free_q <= '0; scan_q <= '0;
      src_q <= '0; k_q <= '0; cnt_q <= '0;
      cv_q <= VAL_UNIT; hdr_q <= VAL_UNIT; res_q <= VAL_UNIT;
      accu_q <= VAL_UNIT; env_q <= VAL_UNIT;
    end else if (en) begin
      unique case (state_q)
        G_IDLE: if (start) begin
          accu_q    <= accu_in;
          env_q     <= env_in;
          free_q    <= to_base;
          scan_q    <= to_base;
          phase_q   <= PH_REGS;
          reg_env_q <= 1'b0;
          state_q   <= G_ROOT;
        end
        G_ROOT: begin                       // register roots
          cv_q    <= reg_env_q ? env_q : accu_q;
          state_q <= G_FWD;
        end
        G_SLOT_RD:  state_q <= G_SLOT_GOT;
        G_SLOT_GOT: begin cv_q <= rdata; state_q <= G_FWD; end
        G_FWD:
          if (in_from) state_q <= G_HDR_GOT;
          else begin res_q <= cv_q; state_q <= G_RESULT; end
        G_HDR_GOT: begin
          hdr_q <= rdata;
          src_q <= 16'(cv_q.n - 1);
          if (hdr_colour(rdata) == HDR_FORWARDED) state_q <= G_FWDADDR_GOT;
          else begin
            k_q     <= '0;
            cnt_q   <= 16'(hdr_size(rdata) + 1);
            state_q <= G_COPY_RD;
          end
        end
        G_FWDADDR_GOT: begin res_q <= rdata; state_q <= G_RESULT; end
        G_COPY_RD: state_q <= G_COPY_WR;
        G_COPY_WR: begin
          k_q     <= k_q + 16'd1;
          state_q <= (k_q + 16'd1 == cnt_q) ? G_MARK_HDR : G_COPY_RD;
        end
        G_MARK_HDR: state_q <= G_MARK_F0;
        G_MARK_F0: begin
          res_q   <= val_ptr(int'(free_q) + 1);
          free_q  <= free_q + cnt_q;
          state_q <= G_RESULT;
        end
        G_RESULT: begin
          unique case (phase_q)
            PH_REGS:
              if (!reg_env_q) begin
                accu_q <= res_q; reg_env_q <= 1'b1; state_q <= G_ROOT;
              end else begin
                env_q <= res_q;
                if (sp != 16'(STACK_END)) begin
                  phase_q <= PH_STACK; sa_q <= sp; slot_end_q <= 16'(STACK_END);
                  state_q <= G_SLOT_RD;
                end else begin
                  phase_q <= PH_GLOB; sa_q <= 16'(GLOB_BASE);
                  slot_end_q <= 16'(GLOB_BASE + N_GLOBALS);
                  state_q <= G_SLOT_RD;
                end
              end
            default:
              // memory slot done: next slot of this run, or next phase
              if (sa_q + 16'd1 != slot_end_q) begin
                sa_q    <= sa_q + 16'd1;
                state_q <= G_SLOT_RD;
              end else if (phase_q == PH_STACK) begin
                phase_q    <= PH_GLOB;
                sa_q       <= 16'(GLOB_BASE);
                slot_end_q <= 16'(GLOB_BASE + N_GLOBALS);
                state_q    <= G_SLOT_RD;
              end else begin
                phase_q <= PH_SCAN;
                state_q <= G_SCAN_HDR;
              end
          endcase
        end
        G_SCAN_HDR:
          if (scan_q == free_q) state_q <= G_DONE;
          else state_q <= G_SCAN_GOT;
        G_SCAN_GOT: begin
          scan_q <= scan_q + 16'(hdr_size(rdata)) + 16'd1;
          if (hdr_tag(rdata) >= NO_SCAN_TAG || hdr_size(rdata) == 0)
            state_q <= G_SCAN_HDR;
          else begin
            sa_q       <= scan_q + 16'd1;
            slot_end_q <= scan_q + 16'(hdr_size(rdata)) + 16'd1;
            state_q    <= G_SLOT_RD;
          end
        end
        G_DONE: state_q <= G_IDLE;
        default: state_q <= G_IDLE;
      endcase
    end
  end
endmodule
