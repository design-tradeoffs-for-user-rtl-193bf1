// uio_pkg: types and constants shared by the user-level I/O (UIO) blocks.
//
// The request structure is one 64-byte cache line, eight 64-bit words, because
// a line is the natural transfer size of the system bus. The architecture lists
// its fields (capability, command, arguments and flags, return status, context
// ID, buffer address and length, notification buffer, notification handler,
// request argument) but not their positions; the word layout below is this
// design's own. The context ID sits in the last word, the CSB slot that the
// processor's privileged process-ID register is wired to.
//
// Addresses are 32 bits, pages 4 KB. A cache line is 64 bytes, so every bus
// transaction of the DMA engines moves one line and needs one translation.
// The table walk engine instruction set and its default two-level walk
// program are also defined here.
package uio_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned CTX_W       = 16;
  localparam int unsigned WORD_W      = 64;
  localparam int unsigned LINE_WORDS  = 8;
  localparam int unsigned LINE_BYTES  = 64;
  localparam int unsigned LINE_W      = WORD_W * LINE_WORDS;  // 512
  localparam int unsigned PAGE_SHIFT  = 12;
  localparam int unsigned VPN_W       = ADDR_W - PAGE_SHIFT;  // 20
  localparam int unsigned PPN_W       = ADDR_W - PAGE_SHIFT;  // 20
  localparam int unsigned LINE_SHIFT  = 6;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [CTX_W-1:0]  ctx_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LINE_W-1:0] line_t;

  // Word positions of the request structure fields inside the line.
  localparam int unsigned RW_CAPABILITY = 0;  // remote: capability
  localparam int unsigned RW_COMMAND    = 1;  // remote: [31:0] command, [63:32] return status
  localparam int unsigned RW_ARGS       = 2;  // remote: arguments and flags
  localparam int unsigned RW_BUFFER     = 3;  // local:  [31:0] buffer address, [63:32] length in bytes
  localparam int unsigned RW_NOTIF_BUF  = 4;  // local:  notification buffer address
  localparam int unsigned RW_HANDLER    = 5;  // local:  notification handler address
  localparam int unsigned RW_REQ_ARG    = 6;  // local:  request argument
  localparam int unsigned RW_CONTEXT    = 7;  // local:  context ID (hardwired CSB slot)

  // Command encoding: bit 0 says that data flows from client memory to the
  // remote device, bit 1 that data flows from the remote device to memory.
  localparam logic [31:0] CMD_READ  = 32'h0000_0002;
  localparam logic [31:0] CMD_WRITE = 32'h0000_0001;

  typedef struct packed {
    word_t       capability;
    logic [31:0] command;
    logic [31:0] status;
    word_t       args;
    addr_t       buf_addr;
    logic [31:0] buf_len;
    addr_t       notif_buf;
    addr_t       handler;
    word_t       req_arg;
    ctx_t        ctx;
  } uio_req_t;

  function automatic word_t line_word(line_t l, int unsigned i);
    return l[i*WORD_W +: WORD_W];
  endfunction

  function automatic uio_req_t unpack_req(line_t l);
    uio_req_t r;
    word_t w;
    r.capability = line_word(l, RW_CAPABILITY);
    w            = line_word(l, RW_COMMAND);
    r.command    = w[31:0];
    r.status     = w[63:32];
    r.args       = line_word(l, RW_ARGS);
    w            = line_word(l, RW_BUFFER);
    r.buf_addr   = w[31:0];
    r.buf_len    = w[63:32];
    w            = line_word(l, RW_NOTIF_BUF);
    r.notif_buf  = w[31:0];
    w            = line_word(l, RW_HANDLER);
    r.handler    = w[31:0];
    r.req_arg    = line_word(l, RW_REQ_ARG);
    w            = line_word(l, RW_CONTEXT);
    r.ctx        = w[CTX_W-1:0];
    return r;
  endfunction

  // Network packets. A request packet carries the whole request structure;
  // data packets carry the context ID and the virtual address of the line so
  // that the receiving side needs no per-request state.
  typedef enum logic [1:0] {
    PKT_REQUEST    = 2'd0,  // client -> remote device: request structure
    PKT_DATA       = 2'd1,  // either way: one line of buffer data
    PKT_COMPLETION = 2'd2   // remote device -> client: returned request structure
  } pkt_kind_e;

  typedef struct packed {
    pkt_kind_e kind;
    ctx_t      ctx;
    addr_t     vaddr;
    line_t     payload;
  } net_pkt_t;

  // Result of a conditional flush returned to the application.
  typedef enum logic [1:0] {
    FLUSH_OK    = 2'd0,  // burst issued and accepted by the device
    FLUSH_FULL  = 2'd1,  // burst issued, device request queue full (flow control)
    FLUSH_ABORT = 2'd2   // address or hit count mismatch, nothing issued
  } flush_result_e;

  // Memory (system bus) transaction: one line read or written.
  typedef struct packed {
    logic  we;
    addr_t addr;
    line_t wdata;
  } mem_req_t;

  // Address translation request and response.
  typedef struct packed {
    ctx_t  ctx;
    addr_t vaddr;
    logic  write;
  } xlate_req_t;

  typedef struct packed {
    logic  fault;   // page not mapped or write to a read-only page
    addr_t paddr;
  } xlate_resp_t;

  // Page table entry format used by the default walk program and the TLB:
  // bit 0 valid, bit 1 writable, bits [31:12] physical page number.
  localparam int unsigned PTE_V = 0;
  localparam int unsigned PTE_W = 1;

  // DMA job handed to one of the DMA engines.
  typedef enum logic [0:0] {
    DMA_TO_MEM   = 1'b0,  // line(s) from the network written to user memory
    DMA_FROM_MEM = 1'b1   // lines read from user memory and sent to the network
  } dma_dir_e;

  typedef struct packed {
    dma_dir_e    dir;
    logic        notify;  // the job writes a request structure back for a notification
    ctx_t        ctx;
    addr_t       vaddr;
    logic [31:0] len;     // bytes, rounded up to whole lines
    line_t       data;    // line to write for DMA_TO_MEM
  } dma_job_t;

  // ---------------------------------------------------------------------
  // Table walk engine instruction set. 32-bit instructions:
  // [31:28] opcode, [27:25] rd, [24:22] rs, [21:19] rt, [15:0] imm.
  // Register r0 reads as zero. On start r1 = virtual address, r2 = context
  // ID, r3 = base of the context table (one 64-bit root pointer per context).
  typedef enum logic [3:0] {
    TW_ADD   = 4'h0,  // rd = rs + rt
    TW_ADDI  = 4'h1,  // rd = rs + imm
    TW_AND   = 4'h2,  // rd = rs & rt
    TW_ANDI  = 4'h3,  // rd = rs & zext(imm)
    TW_OR    = 4'h4,  // rd = rs | rt
    TW_XOR   = 4'h5,  // rd = rs ^ rt
    TW_SHLI  = 4'h6,  // rd = rs << imm[4:0]
    TW_SHRI  = 4'h7,  // rd = rs >> imm[4:0]
    TW_LD    = 4'h8,  // rd = low 32 bits of memory word at rs + imm
    TW_BEQ   = 4'h9,  // if (rs == rt) pc = imm
    TW_BNE   = 4'hA,  // if (rs != rt) pc = imm
    TW_BLTU  = 4'hB,  // if (rs <  rt) pc = imm (unsigned)
    TW_DONE  = 4'hC,  // finish, rs holds the leaf page table entry
    TW_FAULT = 4'hD   // finish, page fault
  } tw_op_e;

  localparam int unsigned TW_IMEM_DEPTH = 32;

  function automatic logic [31:0] tw_enc(tw_op_e op, int unsigned rd, int unsigned rs,
                                         int unsigned rt, int unsigned imm);
    logic [31:0] i;
    i        = '0;
    i[31:28] = op;
    i[27:25] = rd[2:0];
    i[24:22] = rs[2:0];
    i[21:19] = rt[2:0];
    i[15:0]  = imm[15:0];
    return i;
  endfunction

  // Default program: two-level page table, 10-bit first-level index,
  // 10-bit second-level index, 8-byte entries, table bases page aligned.
  function automatic logic [31:0] tw_default_prog(int unsigned pc);
    case (pc)
      0:  return tw_enc(TW_SHLI, 4, 2, 0, 3);     // r4 = ctx * 8
      1:  return tw_enc(TW_ADD,  4, 4, 3, 0);     // r4 = &ctx_table[ctx]
      2:  return tw_enc(TW_LD,   5, 4, 0, 0);     // r5 = root of page table
      3:  return tw_enc(TW_SHRI, 6, 1, 0, 22);    // r6 = level-1 index
      4:  return tw_enc(TW_SHLI, 6, 6, 0, 3);
      5:  return tw_enc(TW_ADD,  6, 6, 5, 0);     // r6 = &l1[idx]
      6:  return tw_enc(TW_LD,   7, 6, 0, 0);     // r7 = level-1 entry
      7:  return tw_enc(TW_ANDI, 4, 7, 0, 1);
      8:  return tw_enc(TW_BEQ,  0, 4, 0, 19);    // not valid -> fault
      9:  return tw_enc(TW_SHRI, 6, 1, 0, 12);
      10: return tw_enc(TW_ANDI, 6, 6, 0, 'h3FF); // r6 = level-2 index
      11: return tw_enc(TW_SHLI, 6, 6, 0, 3);
      12: return tw_enc(TW_SHRI, 7, 7, 0, 12);
      13: return tw_enc(TW_SHLI, 7, 7, 0, 12);    // r7 = level-2 table base
      14: return tw_enc(TW_ADD,  6, 6, 7, 0);     // r6 = &l2[idx]
      15: return tw_enc(TW_LD,   7, 6, 0, 0);     // r7 = leaf entry
      16: return tw_enc(TW_ANDI, 4, 7, 0, 1);
      17: return tw_enc(TW_BEQ,  0, 4, 0, 19);    // not valid -> fault
      18: return tw_enc(TW_DONE, 0, 7, 0, 0);
      19: return tw_enc(TW_FAULT, 0, 0, 0, 0);
      default: return tw_enc(TW_FAULT, 0, 0, 0, 0);
    endcase
  endfunction

endpackage
