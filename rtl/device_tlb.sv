// device_tlb: set-associative address translation cache of the UIO device.
//
// The DMA engines present a virtual address and a context ID once per bus
// transaction; the TLB returns the physical address or reports a miss, and
// flags a protection violation when a write hits a read-only page. Entries
// are tagged with the context ID, so mappings of different processes with
// the same virtual address live side by side and no flush is needed on a
// process switch. The operating system invalidates the entries of one page
// of one context when it changes a page table entry (inv_*). Misses are
// filled from the table walk engine through fill_*.
//
// Organisation: SETS x WAYS entries, set index = low bits of the virtual
// page number (sequential DMA streams spread over the sets), tag = context
// ID and the rest of the page number. A fill takes an invalid way of the
// set if there is one, else the way named by the set's round-robin pointer.
//
// Timing: a lookup is accepted in any cycle and answered one cycle later
// (lk_done with lk_hit, lk_fault, lk_paddr), like a synchronous SRAM read.
// Fills and invalidations take effect at the next clock edge; a lookup in
// the same cycle sees the old contents. Invalidation has priority over a
// fill of the same cycle.
//
// Following the original architecture: 32 entries, 4-way set associative, context
// tags, per-transaction lookup, access-violation flag and OS-driven
// invalidation. Index function, replacement policy and the registered read
// are this design's own.
module device_tlb
  import uio_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned WAYS    = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // lookup
  input  logic  lk_valid,
  input  ctx_t  lk_ctx,
  input  addr_t lk_vaddr,
  input  logic  lk_write,
  output logic  lk_done,
  output logic  lk_hit,
  output logic  lk_fault,
  output addr_t lk_paddr,
  // fill from the table walk engine
  input  logic  fill_valid,
  input  ctx_t  fill_ctx,
  input  addr_t fill_vaddr,
  input  logic [31:0] fill_pte,
  // invalidation from the operating system
  input  logic  inv_valid,
  input  ctx_t  inv_ctx,
  input  addr_t inv_vaddr
);
  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = VPN_W - SET_W;

  typedef struct packed {
    logic             valid;
    ctx_t             ctx;
    logic [TAG_W-1:0] tag;
    logic [PPN_W-1:0] ppn;
    logic             writable;
  } tlb_entry_t;

  tlb_entry_t       tab [SETS][WAYS];
  logic [WAY_W-1:0] rr  [SETS];

  function automatic logic [SET_W-1:0] set_of(addr_t va);
    return va[PAGE_SHIFT +: SET_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(addr_t va);
    return va[ADDR_W-1 -: TAG_W];
  endfunction

  // lookup, combinational compare of the addressed set
  logic       hit_c;
  tlb_entry_t hit_e;
  always_comb begin
    hit_c = 1'b0;
    hit_e = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      tlb_entry_t e;
      e = tab[set_of(lk_vaddr)][w];
      if (!hit_c && e.valid && e.ctx == lk_ctx && e.tag == tag_of(lk_vaddr)) begin
        hit_c = 1'b1;
        hit_e = e;
      end
    end
  end

  // victim choice for a fill
  logic [WAY_W-1:0] victim;
  logic             have_free;
  always_comb begin
    have_free = 1'b0;
    victim    = rr[set_of(fill_vaddr)];
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (!have_free && !tab[set_of(fill_vaddr)][w].valid) begin
        have_free = 1'b1;
        victim    = WAY_W'(w);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_done  <= 1'b0;
      lk_hit   <= 1'b0;
      lk_fault <= 1'b0;
      lk_paddr <= '0;
    end else begin
      lk_done  <= lk_valid;
      lk_hit   <= lk_valid && hit_c;
      lk_fault <= lk_valid && hit_c && lk_write && !hit_e.writable;
      lk_paddr <= {hit_e.ppn, lk_vaddr[PAGE_SHIFT-1:0]};
    end
  end

  // a fill of the page being invalidated in the same cycle is dropped
  logic do_fill;
  assign do_fill = fill_valid && !(inv_valid && inv_ctx == fill_ctx &&
                   inv_vaddr[ADDR_W-1:PAGE_SHIFT] == fill_vaddr[ADDR_W-1:PAGE_SHIFT]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int unsigned w = 0; w < WAYS; w++) tab[s][w] <= '0;
      end
    end else begin
      if (do_fill) begin
        tab[set_of(fill_vaddr)][victim] <= '{valid:    1'b1,
                                             ctx:      fill_ctx,
                                             tag:      tag_of(fill_vaddr),
                                             ppn:      fill_pte[31:PAGE_SHIFT],
                                             writable: fill_pte[PTE_W]};
        if (!have_free) rr[set_of(fill_vaddr)] <= victim + 1'b1;
      end
      if (inv_valid) begin
        for (int unsigned w = 0; w < WAYS; w++) begin
          if (tab[set_of(inv_vaddr)][w].ctx == inv_ctx &&
              tab[set_of(inv_vaddr)][w].tag == tag_of(inv_vaddr))
            if (!(do_fill && set_of(fill_vaddr) == set_of(inv_vaddr) && WAY_W'(w) == victim))
              tab[set_of(inv_vaddr)][w].valid <= 1'b0;
        end
      end
    end
  end
endmodule
