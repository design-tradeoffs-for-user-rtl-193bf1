// table_walk_engine: programmable page table walker of the UIO device.
//
// On a device TLB miss the engine runs a short program that walks the host's
// own page tables in memory and returns the leaf page table entry, so the
// device resolves misses without interrupting the host processor. Being
// programmable, it can follow whatever page table layout the operating
// system uses. The instruction set has only what a walk needs: memory loads,
// add, logic operations, shifts and compare-and-branch (see uio_pkg).
//
// Operation: start (with ctx and vaddr) loads r1 = virtual address,
// r2 = context ID, r3 = ctx_table_base and begins at address 0 of the
// instruction memory. One instruction executes per cycle; a load issues a
// line read on the memory port and waits for the response, then takes the
// low 32 bits of the addressed 64-bit word. DONE rs ends the walk with
// done = 1 and pte = rs; FAULT, or running more than MAX_STEPS instructions,
// ends it with done = 1 and fault = 1. done is a one-cycle pulse.
//
// The instruction memory is a register array that resets to the default
// two-level walk program of uio_pkg and can be rewritten by the host through
// prog_we/prog_addr/prog_data while the engine is idle.
//
// Following the original architecture: a programmable engine with memory access, add, compare
// and logic instructions, sharing the host's page tables (a two-level table
// in the evaluated system). The encoding, register count, start-up register
// contents, step limit and context-table convention are this design's own.
module table_walk_engine
  import uio_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = TW_IMEM_DEPTH,
  parameter int unsigned MAX_STEPS  = 255
) (
  input  logic        clk,
  input  logic        rst_n,
  // walk request and result
  input  logic        start,
  input  ctx_t        ctx,
  input  addr_t       vaddr,
  input  addr_t       ctx_table_base,
  output logic        busy,
  output logic        done,
  output logic        fault,
  output logic [31:0] pte,
  // memory port (line reads)
  output logic        mem_valid,
  output addr_t       mem_addr,
  input  logic        mem_ready,
  input  logic        mem_resp_valid,
  input  line_t       mem_rdata,
  // program load
  input  logic        prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  logic [31:0] prog_data
);
  localparam int unsigned PC_W = $clog2(IMEM_DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_MEMREQ, S_MEMWAIT} state_e;

  state_e           state;
  logic [31:0]      imem [IMEM_DEPTH];
  logic [31:0]      regs [8];
  logic [PC_W-1:0]  pc;
  logic [7:0]       steps;
  logic [2:0]       ld_rd;
  logic [2:0]       ld_word;

  // decode
  logic [31:0] ins;
  tw_op_e      op;
  logic [2:0]  rd, rs, rt;
  logic [31:0] a, b, imm;
  assign ins = imem[pc];
  assign op  = tw_op_e'(ins[31:28]);
  assign rd  = ins[27:25];
  assign rs  = ins[24:22];
  assign rt  = ins[21:19];
  assign imm = {16'b0, ins[15:0]};
  assign a   = (rs == 3'd0) ? 32'd0 : regs[rs];
  assign b   = (rt == 3'd0) ? 32'd0 : regs[rt];

  logic [31:0] alu;
  always_comb begin
    case (op)
      TW_ADD:  alu = a + b;
      TW_ADDI: alu = a + imm;
      TW_AND:  alu = a & b;
      TW_ANDI: alu = a & imm;
      TW_OR:   alu = a | b;
      TW_XOR:  alu = a ^ b;
      TW_SHLI: alu = a << imm[4:0];
      TW_SHRI: alu = a >> imm[4:0];
      default: alu = a + imm;  // load address
    endcase
  end

  logic take_branch;
  always_comb begin
    case (op)
      TW_BEQ:  take_branch = (a == b);
      TW_BNE:  take_branch = (a != b);
      TW_BLTU: take_branch = (a < b);
      default: take_branch = 1'b0;
    endcase
  end

  assign busy = (state != S_IDLE);
  assign mem_valid = (state == S_MEMREQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < IMEM_DEPTH; i++) imem[i] <= tw_default_prog(i);
    end else if (prog_we && state == S_IDLE) begin
      imem[prog_addr] <= prog_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pc       <= '0;
      steps    <= '0;
      done     <= 1'b0;
      fault    <= 1'b0;
      pte      <= '0;
      mem_addr <= '0;
      ld_rd    <= '0;
      ld_word  <= '0;
      for (int unsigned i = 0; i < 8; i++) regs[i] <= '0;
    end else begin
      done  <= 1'b0;
      fault <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          regs[1] <= vaddr;
          regs[2] <= 32'(ctx);
          regs[3] <= ctx_table_base;
          pc      <= '0;
          steps   <= '0;
          state   <= S_EXEC;
        end
        S_EXEC: begin
          steps <= steps + 1'b1;
          pc    <= pc + 1'b1;
          if (32'(steps) >= MAX_STEPS) begin
            done  <= 1'b1;
            fault <= 1'b1;
            state <= S_IDLE;
          end else begin
            case (op)
              TW_DONE: begin
                done  <= 1'b1;
                pte   <= a;
                state <= S_IDLE;
              end
              TW_FAULT: begin
                done  <= 1'b1;
                fault <= 1'b1;
                state <= S_IDLE;
              end
              TW_LD: begin
                mem_addr <= {alu[31:LINE_SHIFT], {LINE_SHIFT{1'b0}}};
                ld_word  <= alu[LINE_SHIFT-1:3];
                ld_rd    <= rd;
                state    <= S_MEMREQ;
              end
              TW_BEQ, TW_BNE, TW_BLTU: begin
                if (take_branch) pc <= ins[PC_W-1:0];
              end
              default: if (rd != 3'd0) regs[rd] <= alu;
            endcase
          end
        end
        S_MEMREQ: if (mem_ready) state <= S_MEMWAIT;
        S_MEMWAIT: if (mem_resp_valid) begin
          if (ld_rd != 3'd0) regs[ld_rd] <= mem_rdata[32'(ld_word)*WORD_W +: 32];
          state <= S_EXEC;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
