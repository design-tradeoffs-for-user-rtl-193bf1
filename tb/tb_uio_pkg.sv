// tb_uio_pkg: helpers shared by the UIO testbenches: the data pattern the
// remote device model returns, and request structure packing.
package tb_uio_pkg;
  import uio_pkg::*;

  // Line of read data a remote device returns for (ctx, vaddr): word i is
  // {ctx, 16'hDA7A, vaddr + 8*i}.
  function automatic line_t data_pattern(ctx_t ctx, addr_t vaddr);
    line_t l;
    for (int i = 0; i < 8; i++) l[i*64 +: 64] = {ctx, 16'hDA7A, vaddr + addr_t'(8 * i)};
    return l;
  endfunction

  // Line a host buffer holds before a write request: word i is
  // {16'h5EED, ctx, paddr + 8*i} (independent of the virtual address).
  function automatic line_t mem_pattern(addr_t paddr);
    line_t l;
    for (int i = 0; i < 8; i++) l[i*64 +: 64] = {16'h5EED, 16'h0, paddr + addr_t'(8 * i)};
    return l;
  endfunction

  function automatic line_t make_req(word_t cap, logic [31:0] cmd, word_t args,
                                     addr_t buf_addr, logic [31:0] len, addr_t nbuf,
                                     addr_t handler, word_t arg, ctx_t ctx);
    line_t l;
    l = '0;
    l[RW_CAPABILITY*64 +: 64] = cap;
    l[RW_COMMAND*64    +: 64] = {32'h0, cmd};
    l[RW_ARGS*64       +: 64] = args;
    l[RW_BUFFER*64     +: 64] = {len, buf_addr};
    l[RW_NOTIF_BUF*64  +: 64] = {32'h0, nbuf};
    l[RW_HANDLER*64    +: 64] = {32'h0, handler};
    l[RW_REQ_ARG*64    +: 64] = arg;
    l[RW_CONTEXT*64    +: 64] = {48'h0, ctx};
    return l;
  endfunction
endpackage
